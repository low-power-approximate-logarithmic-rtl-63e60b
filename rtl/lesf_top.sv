// lesf_top: the two Low-Error Squaring Function variants side by side.
//
// An n-bit unsigned integer squarer (lesf_int) and a binary16 floating-point
// squarer (lesf_fp) share no logic and have separate ports. Both are purely
// combinational: each output follows its own input with no clock or latency.
// See lesf_int and lesf_fp for the arithmetic.
module lesf_top
  import lesf_pkg::*;
#(
  parameter int unsigned N_W = 16  // integer operand width n
) (
  input  logic [N_W-1:0]   int_i,      // integer operand
  output logic [2*N_W-1:0] int_sq_o,   // integer approximate square
  output logic             int_sat_o,  // integer result saturated
  input  fp16_t            fp_i,       // binary16 operand
  output fp16_t            fp_sq_o,    // binary16 approximate square
  output logic             fp_ovf_o,   // binary16 result overflowed to +inf
  output logic             fp_unf_o    // binary16 result flushed to +0
);

  lesf_int #(.N_W(N_W)) u_int (
    .in_i  (int_i),
    .sq_o  (int_sq_o),
    .sat_o (int_sat_o)
  );

  lesf_fp #(.EXP_W(FP16_EXP_W), .MAN_W(FP16_MAN_W)) u_fp (
    .a_i   (fp_i),
    .sq_o  (fp_sq_o),
    .ovf_o (fp_ovf_o),
    .unf_o (fp_unf_o)
  );

endmodule
