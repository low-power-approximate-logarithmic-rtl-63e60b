// lesf_muxbank: fraction extraction of the LESF front end (XOR and MuxBank).
//
// For N = 2^k (1 + x) the fraction x is the set of bits below the leading
// one. XOR with the one-hot LOD output clears the leading one (a subtraction
// of 2^k without a carry chain); the multiplexer bank, selected by k, then
// left-aligns the remaining k bits into the (n-1)-bit field R_x and pads the
// low end with zeros. The MSB of R_x has weight 1/2. Example for n = 8:
// I = 00001001 gives k = 3 and R_x = 0010000. Purely combinational.
//
// Structure follows the published LESF; the multiplexer bank is written as a shift
// by (n-1-k), which is the same bank of k-selected multiplexers.
module lesf_muxbank #(
  parameter int unsigned N_W = 16,             // operand width n
  localparam int unsigned K_W = $clog2(N_W)
) (
  input  logic [N_W-1:0] in_i,      // operand I
  input  logic [N_W-1:0] onehot_i,  // LOD output, 2^k
  input  logic [K_W-1:0] k_i,       // PE output, k
  output logic [N_W-2:0] rx_o       // R_x: fraction x, MSB weight 2^-1
);

  logic [N_W-1:0] rest;     // I with the leading one removed
  logic [N_W-1:0] aligned;  // rest moved so that bit k-1 lands at bit n-2

  always_comb begin
    rest    = in_i ^ onehot_i;
    aligned = rest << (K_W'(N_W - 1) - k_i);
    rx_o    = aligned[N_W-2:0];
  end

endmodule
