// tb_lesf_const_adder: exhaustive test of the constant adder y = 2x + Rc.
// Every 15-bit R_x (the integer LESF's width) and every 10-bit mantissa (the
// binary16 variant's width) is applied; R_y must equal 2 R_x + 5/128 scaled
// to the fraction width, i.e. 2 R_x + 5 * 2^(FRAC_W - 7), computed with an
// ordinary integer addition. One vector per clock cycle, with a watchdog.
module tb_lesf_const_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [14:0] rx15;
  logic [16:0] ry15;
  logic [9:0]  rx10;
  logic [11:0] ry10;
  int checks = 0, failures = 0;

  lesf_const_adder #(.FRAC_W(15)) dut15 (.rx_i(rx15), .ry_o(ry15));
  lesf_const_adder #(.FRAC_W(10)) dut10 (.rx_i(rx10), .ry_o(ry10));

  initial begin
    for (int i = 0; i < (1 << 15); i++) begin
      rx15 = 15'(i);
      rx10 = 10'(i);
      @(posedge clk);
      checks++;
      if (int'(ry15) != 2 * i + 5 * (1 << 8)) begin
        failures++;
        if (failures < 10) $display("FAIL rx=%h ry=%h", rx15, ry15);
      end
      if (i < (1 << 10)) begin
        checks++;
        if (int'(ry10) != 2 * i + 5 * (1 << 3)) begin
          failures++;
          if (failures < 10) $display("FAIL mantissa=%h ry=%h", rx10, ry10);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
