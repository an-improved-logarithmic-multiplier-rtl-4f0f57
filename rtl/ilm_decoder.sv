// ilm_decoder: binary-to-one-hot decoder producing 2^(k1+k2), the most
// significant term of the approximate product.
//
// Output bit e is set when the exponent sum equals e. The output is OUT_W
// bits wide (2W for a W-bit multiplier); exponents of OUT_W and above cannot
// occur in the multiplier and give an all-zero output. The decoder is
// part of the original datapath; its gate structure is left to synthesis.
//
// Purely combinational.
module ilm_decoder #(
  parameter int unsigned IN_W  = 4,
  parameter int unsigned OUT_W = 16
) (
  input  logic [IN_W-1:0]  i_exp,     // k1 + k2
  output logic [OUT_W-1:0] o_onehot   // 2^(k1 + k2)
);

  always_comb begin
    for (int e = 0; e < OUT_W; e++) begin
      o_onehot[e] = (int'(i_exp) == e);
    end
  end

endmodule
