// lesf_pe: priority encoder for a one-hot input (the R_k stage of the LESF).
//
// Because the leading-one detector already delivers a one-hot vector, no
// priority resolution is needed: bit j of the position k is the OR of all
// one-hot bits whose index has bit j set. This is the simplified encoder the
// LESF uses. For an all-zero input the output is 0. Purely combinational.
module lesf_pe #(
  parameter int unsigned N_W = 16,                 // one-hot width n
  localparam int unsigned K_W = $clog2(N_W)        // width of k
) (
  input  logic [N_W-1:0] onehot_i,  // one-hot position (at most one bit set)
  output logic [K_W-1:0] k_o        // binary position k
);

  always_comb begin
    k_o = '0;
    for (int i = 0; i < N_W; i++) begin
      for (int j = 0; j < K_W; j++) begin
        if (((i >> j) & 1) == 1) k_o[j] = k_o[j] | onehot_i[i];
      end
    end
  end

  // The encoder is only correct for one-hot or zero inputs.
  always_comb assert ((onehot_i & (onehot_i - 1'b1)) == '0)
    else $error("lesf_pe: input is not one-hot");

endmodule
