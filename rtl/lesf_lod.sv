// lesf_lod: leading-one detector of the LESF front end.
//
// Marks the most significant '1' of the operand with a one-hot vector, which
// is 2^k for an operand N = 2^k (1 + x). It is the conventional ripple form:
// a prefix OR runs from the MSB down and each output bit is set when its
// input bit is 1 and no higher input bit is. An all-zero operand gives an
// all-zero output. Purely combinational.
//
// The published LESF uses a conventional LOD without detailing it; the prefix-OR
// structure is this design's choice.
module lesf_lod #(
  parameter int unsigned N_W = 16  // operand width n
) (
  input  logic [N_W-1:0] in_i,     // operand I
  output logic [N_W-1:0] onehot_o  // one-hot position of the leading one
);

  // seen[i]: some bit above position i is set
  logic [N_W-1:0] seen;

  always_comb begin
    seen[N_W-1] = 1'b0;
    for (int i = N_W - 2; i >= 0; i--) begin
      seen[i] = seen[i+1] | in_i[i+1];
    end
    onehot_o = in_i & ~seen;
  end

endmodule
