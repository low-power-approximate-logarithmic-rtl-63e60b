// lesf_const_adder: the constant adder y = 2x + Rc of the LESF.
//
// Input is the fraction R_x (FRAC_W bits, MSB weight 1/2); 2R_x is the same
// bits one place up, so it has one integer bit and a zero LSB. Output R_y has
// two integer bits (y < 3) and FRAC_W fraction bits. Since Rc is a constant,
// no full adder is needed: bits below the lowest '1' of Rc pass straight
// through, the lowest '1' becomes an inverter whose carry is the input bit
// itself, every other bit above it is a half adder fed by the carry, and a
// bit where Rc has a further '1' adds 1 + a + c (sum = ~a ^ c,
// carry = a | c). The final carry is the top integer bit of R_y. With the
// default Rc = 5/128 that is one inverter, one three-input bit and a short
// half-adder chain up to the integer bits. Purely combinational.
//
// The function R_y = 2R_x + Rc, Rc = 5/128 and the inverter/half-adder
// structure follow the published LESF design. The exact carry at the second '1' of Rc,
// and writing the adder for any constant, are this design's choices.
module lesf_const_adder
  import lesf_pkg::*;
#(
  parameter int unsigned FRAC_W = 15,            // fraction bits of x (n-1)
  parameter int unsigned C_NUM  = RC_NUM,        // Rc = C_NUM / 2^C_FRAC
  parameter int unsigned C_FRAC = RC_FRAC_BITS
) (
  input  logic [FRAC_W-1:0] rx_i,  // R_x
  output logic [FRAC_W+1:0] ry_o   // R_y = 2 R_x + Rc
);

  // 2R_x: bit FRAC_W has weight 1, bit i weight 2^-(FRAC_W-i)
  localparam int unsigned A_W = FRAC_W + 1;
  // Rc aligned to 2R_x
  localparam logic [A_W-1:0] CONST = A_W'(C_NUM) << (FRAC_W - C_FRAC);

  // position of the lowest '1' of the constant
  function automatic int unsigned lowest_one(logic [A_W-1:0] v);
    for (int unsigned i = 0; i < A_W; i++) if (v[i]) return i;
    return A_W;
  endfunction
  localparam int unsigned LSB1 = lowest_one(CONST);

  logic [A_W-1:0] a;
  logic [A_W:0]   carry;  // carry[i] enters bit i

  assign a = {rx_i, 1'b0};
  assign carry[0] = 1'b0;

  for (genvar i = 0; i < A_W; i++) begin : g_bit
    if (i < LSB1) begin : g_pass
      assign ry_o[i]    = a[i];
      assign carry[i+1] = 1'b0;
    end else if (i == LSB1) begin : g_inv
      assign ry_o[i]    = ~a[i];
      assign carry[i+1] = a[i];
    end else if (CONST[i]) begin : g_one
      assign ry_o[i]    = ~a[i] ^ carry[i];
      assign carry[i+1] = a[i] | carry[i];
    end else begin : g_ha
      assign ry_o[i]    = a[i] ^ carry[i];
      assign carry[i+1] = a[i] & carry[i];
    end
  end

  assign ry_o[A_W] = carry[A_W];

  initial begin
    assert (C_FRAC <= FRAC_W && C_NUM > 0 && C_NUM < (1 << C_FRAC))
      else $error("lesf_const_adder: constant does not fit in the fraction");
  end

endmodule
