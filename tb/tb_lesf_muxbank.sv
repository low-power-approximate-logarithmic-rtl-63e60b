// tb_lesf_muxbank: self-checking test of the XOR / multiplexer-bank stage.
// For each operand the testbench finds k itself, subtracts 2^k arithmetically
// and left-aligns the remainder to n-1 bits; the stage must give the same
// R_x. Covers the worked example I = 0000000000001001 (k = 3, R_x = 001 then
// zeros), every operand below 4096 and random operands. One vector per
// clock cycle, with a watchdog.
module tb_lesf_muxbank;
  localparam int unsigned N_W = 16;
  localparam int unsigned K_W = $clog2(N_W);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N_W-1:0] in, onehot;
  logic [K_W-1:0] k;
  logic [N_W-2:0] rx;
  int checks = 0, failures = 0;

  lesf_muxbank #(.N_W(N_W)) dut (.in_i(in), .onehot_i(onehot), .k_i(k), .rx_o(rx));

  task automatic apply(logic [N_W-1:0] v);
    int kk;
    longint unsigned expected;
    kk = 0;
    for (int i = 0; i < N_W; i++) if (v[i]) kk = i;
    in     = v;
    onehot = (v == '0) ? '0 : N_W'(1) << kk;
    k      = K_W'(kk);
    expected = (v == '0) ? 0 : ((longint'(v) - (longint'(1) << kk)) << (N_W - 1 - kk));
    @(posedge clk);
    checks++;
    if (longint'(rx) != expected) begin
      failures++;
      $display("FAIL in=%h rx=%h expected=%h", v, rx, expected);
    end
  endtask

  initial begin
    apply(16'h0009);   // k = 3, x = 001b -> R_x = 001 followed by zeros
    if (rx !== 15'b001_0000_0000_0000) begin
      failures++;
      $display("FAIL worked example rx=%b", rx);
    end
    checks++;
    for (int i = 0; i < 4096; i++) apply(N_W'(i));
    for (int i = 0; i < 4000; i++) apply(N_W'($urandom));
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
