// lesf_shifter: exponent adder and left-shift output stage of the LESF.
//
// With y = 2x + Rc held in R_y (two integer bits, n-1 fraction bits) the
// square is 2^(2k + floor(y)) * (1 + frac(y)), which covers the three ranges
// y < 1, 1 <= y < 2 and 2 <= y < 3. The exponent E = 2k + floor(y) is the
// position of the result's leading one; the n-1 fraction bits of R_y follow
// it. Three placements occur: E < n-1 drops the low fraction bits, E = n-1
// fits them exactly, E > n-1 fills the bits below them with zeros.
//
// Output O is 2n bits. For k = n-1 and y >= 2 the exponent reaches 2n, which
// 2n bits cannot hold; the output then saturates to all ones and sat_o is
// set. A zero operand gives zero. The output width, the saturation and the
// zero case are this design's choices; the rest follows the published LESF.
// Purely combinational.
module lesf_shifter #(
  parameter int unsigned N_W = 16,             // operand width n
  localparam int unsigned K_W = $clog2(N_W)
) (
  input  logic             zero_i,  // operand is zero
  input  logic [K_W-1:0]   k_i,     // R_k
  input  logic [N_W:0]     ry_i,    // R_y: ry[n:n-1] integer, ry[n-2:0] fraction
  output logic [2*N_W-1:0] sq_o,    // approximate square O
  output logic             sat_o    // exponent beyond the output width
);

  localparam int unsigned E_W = K_W + 2;

  logic [E_W-1:0]   expo;    // E = 2k + floor(y)
  logic [N_W-1:0]   mant;    // 1.frac(y)
  logic [3*N_W-2:0] placed;  // mant << E, fraction point at bit n-1

  always_comb begin
    expo   = E_W'({k_i, 1'b0}) + E_W'(ry_i[N_W:N_W-1]);
    mant   = {1'b1, ry_i[N_W-2:0]};
    placed = (3*N_W-1)'(mant) << expo;
    sat_o  = !zero_i && (int'(expo) >= 2 * N_W);
    if (zero_i)     sq_o = '0;
    else if (sat_o) sq_o = '1;
    else            sq_o = placed[3*N_W-2:N_W-1];
  end

endmodule
