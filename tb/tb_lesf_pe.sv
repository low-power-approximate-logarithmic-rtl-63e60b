// tb_lesf_pe: self-checking test of the one-hot priority encoder.
// Applies every one-hot value and zero and checks that the output equals the
// bit position (0 for zero). One vector per clock cycle, with a watchdog.
module tb_lesf_pe;
  localparam int unsigned N_W = 16;
  localparam int unsigned K_W = $clog2(N_W);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N_W-1:0] onehot;
  logic [K_W-1:0] k;
  int checks = 0, failures = 0;

  lesf_pe #(.N_W(N_W)) dut (.onehot_i(onehot), .k_o(k));

  task automatic apply(logic [N_W-1:0] v, int expected);
    onehot = v;
    @(posedge clk);
    checks++;
    if (int'(k) != expected) begin
      failures++;
      $display("FAIL onehot=%h k=%0d expected=%0d", v, k, expected);
    end
  endtask

  initial begin
    apply('0, 0);
    for (int rep = 0; rep < 4; rep++)
      for (int i = 0; i < N_W; i++) apply(N_W'(1) << i, i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
