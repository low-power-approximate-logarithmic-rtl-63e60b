// lesf_int: n-bit unsigned integer Low-Error Squaring Function (LESF).
//
// Approximates I^2 for an n-bit unsigned I without a multiplier. Writing
// I = 2^k (1 + x), log2(I^2) is approximated by 2k + y with y = 2x + Rc,
// Rc = 5/128, and 2^y is approximated piecewise by 1 + frac(y) scaled by
// 2^floor(y). The error is two-sided, so errors partly cancel in sums.
//
// Datapath (all combinational, no clock, one result per input change):
//   lesf_lod         one-hot leading one 2^k
//   lesf_pe          k from the one-hot vector (R_k)
//   lesf_muxbank     x: XOR removes the leading one, muxes left-align (R_x)
//   lesf_const_adder y = 2x + Rc with an inverter/half-adder chain (R_y)
//   lesf_shifter     E = 2k + floor(y), places 1.frac(y) at bit E of O
// The output is 2n bits wide; I = 0 gives 0, and the top 0.98% of the range
// (k = n-1, y >= 2) saturates to all ones with sat_o set.
//
// The architecture follows the published LESF; widths of O, the zero case and the
// saturation are this design's choices.
module lesf_int #(
  parameter int unsigned N_W = 16  // operand width n
) (
  input  logic [N_W-1:0]   in_i,   // operand I
  output logic [2*N_W-1:0] sq_o,   // approximate I^2
  output logic             sat_o   // result saturated
);

  localparam int unsigned K_W = $clog2(N_W);

  logic [N_W-1:0] onehot;
  logic [K_W-1:0] k;
  logic [N_W-2:0] rx;
  logic [N_W:0]   ry;

  lesf_lod #(.N_W(N_W)) u_lod (
    .in_i     (in_i),
    .onehot_o (onehot)
  );

  lesf_pe #(.N_W(N_W)) u_pe (
    .onehot_i (onehot),
    .k_o      (k)
  );

  lesf_muxbank #(.N_W(N_W)) u_muxbank (
    .in_i     (in_i),
    .onehot_i (onehot),
    .k_i      (k),
    .rx_o     (rx)
  );

  lesf_const_adder #(.FRAC_W(N_W - 1)) u_adder (
    .rx_i (rx),
    .ry_o (ry)
  );

  lesf_shifter #(.N_W(N_W)) u_shifter (
    .zero_i (onehot == '0),
    .k_i    (k),
    .ry_i   (ry),
    .sq_o   (sq_o),
    .sat_o  (sat_o)
  );

endmodule
