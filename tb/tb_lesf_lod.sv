// tb_lesf_lod: self-checking test of the leading-one detector.
// Applies zero, every single-bit value, every all-ones-below-k value and
// random operands, and compares the one-hot output with a reference found by
// scanning the operand from the MSB. One vector per clock cycle; a watchdog
// ends the run if it does not finish in time.
module tb_lesf_lod;
  localparam int unsigned N_W = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N_W-1:0] in, onehot;
  int checks = 0, failures = 0;

  lesf_lod #(.N_W(N_W)) dut (.in_i(in), .onehot_o(onehot));

  function automatic logic [N_W-1:0] ref_lod(logic [N_W-1:0] v);
    for (int i = N_W - 1; i >= 0; i--) if (v[i]) return N_W'(1) << i;
    return '0;
  endfunction

  task automatic apply(logic [N_W-1:0] v);
    in = v;
    @(posedge clk);
    checks++;
    if (onehot !== ref_lod(v)) begin
      failures++;
      $display("FAIL in=%h onehot=%h expected=%h", v, onehot, ref_lod(v));
    end
  endtask

  initial begin
    apply('0);
    for (int i = 0; i < N_W; i++) apply(N_W'(1) << i);
    for (int i = 0; i < N_W; i++) apply((N_W'(2) << i) - 1'b1);
    for (int i = 0; i < 2000; i++) apply(N_W'($urandom));
    for (int i = 0; i < 500; i++) apply(N_W'($urandom) >> ($urandom % N_W));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
