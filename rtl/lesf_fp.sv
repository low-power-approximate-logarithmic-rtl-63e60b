// lesf_fp: Low-Error Squaring Function for IEEE 754 floating point
// (binary16 by default).
//
// For a normal number A = 2^(e-bias) (1 + m) the leading-one position and
// the fraction are already the exponent and mantissa fields, so the LOD,
// encoder, XOR and multiplexer bank of the integer version are not needed.
// The mantissa goes through the same constant adder, y = 2m + Rc, and the
// result is 2^(2(e-bias) + floor(y)) (1 + frac(y)): biased exponent
// 2e - bias + floor(y), mantissa frac(y), sign 0. The operand's sign bit is
// therefore unused and the result's sign bit is constant 0. Purely
// combinational.
//
// Special values (this design's choice; the published LESF does not treat them):
// zero and subnormal operands give +0; a result exponent below 1 gives +0
// with unf_o set (unf_o is also set for a nonzero subnormal operand); a
// result exponent of all ones or more gives +infinity with ovf_o set;
// infinity gives +infinity and NaN a quiet NaN.
module lesf_fp #(
  parameter int unsigned EXP_W = 5,    // exponent field width
  parameter int unsigned MAN_W = 10,   // mantissa field width (>= 7)
  localparam int unsigned FP_W = 1 + EXP_W + MAN_W
) (
  input  logic [FP_W-1:0] a_i,    // operand {sign, exponent, mantissa}
  output logic [FP_W-1:0] sq_o,   // approximate square
  output logic            ovf_o,  // finite result too large: +infinity
  output logic            unf_o   // nonzero result too small: +0
);

  localparam int BIAS    = (1 << (EXP_W - 1)) - 1;
  localparam int EXP_MAX = (1 << EXP_W) - 1;
  localparam int E_W     = EXP_W + 3;   // signed result exponent

  logic [EXP_W-1:0]        e;
  logic [MAN_W-1:0]        m;
  logic [MAN_W+1:0]        ry;
  logic signed [E_W-1:0]   res_e;

  assign e = a_i[FP_W-2 -: EXP_W];
  assign m = a_i[MAN_W-1:0];

  lesf_const_adder #(.FRAC_W(MAN_W)) u_adder (
    .rx_i (m),
    .ry_o (ry)
  );

  always_comb begin
    res_e = E_W'(2 * int'(e) - BIAS) + E_W'(ry[MAN_W+1:MAN_W]);
    ovf_o = 1'b0;
    unf_o = 1'b0;
    if (int'(e) == EXP_MAX) begin
      // infinity squared is infinity, NaN stays NaN
      sq_o = (m == '0) ? {1'b0, {EXP_W{1'b1}}, {MAN_W{1'b0}}}
                       : {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};
    end else if (e == '0) begin
      sq_o  = '0;
      unf_o = (m != '0);
    end else if (int'(res_e) <= 0) begin
      sq_o  = '0;
      unf_o = 1'b1;
    end else if (int'(res_e) >= EXP_MAX) begin
      sq_o  = {1'b0, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
      ovf_o = 1'b1;
    end else begin
      sq_o  = {1'b0, res_e[EXP_W-1:0], ry[MAN_W-1:0]};
    end
  end

endmodule
