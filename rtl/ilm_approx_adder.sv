// ilm_approx_adder: the "conventional/approximate" adder that sums the two
// shifted residues, q1*2^k2 + q2*2^k1.
//
// With APPROX_BITS = 0 it is an ordinary W-bit two's-complement adder (the
// exact ILM-0 variant). With APPROX_BITS = k > 0 (the ILM-k variants) the k
// least significant sum bits are not computed: they are set to a fixed
// pattern that alternates 1 and 0, starting with 1 at bit k-1 (k = 5 gives
// 10101). Because the pattern sits near the middle of the dropped range, the
// result is sometimes too large and sometimes too small, which keeps the
// error of the whole multiplier two-sided. The upper W-k bits are added
// exactly and receive no carry from the dropped bits. Which end of the
// pattern starts with 1, and the absent carry, are choices of this
// implementation; they only differ for even k.
//
// Purely combinational.
module ilm_approx_adder #(
  parameter int unsigned W           = 16,
  parameter int unsigned APPROX_BITS = 0
) (
  input  logic [W-1:0] i_a,
  input  logic [W-1:0] i_b,
  output logic [W-1:0] o_sum
);

  if (APPROX_BITS == 0) begin : g_exact
    assign o_sum = i_a + i_b;
  end else begin : g_approx
    logic [APPROX_BITS-1:0] pattern;
    always_comb begin
      for (int j = 0; j < int'(APPROX_BITS); j++) begin
        pattern[j] = ((int'(APPROX_BITS) - 1 - j) % 2) == 0;
      end
    end
    assign o_sum[W-1:APPROX_BITS] = i_a[W-1:APPROX_BITS] + i_b[W-1:APPROX_BITS];
    assign o_sum[APPROX_BITS-1:0] = pattern;
  end

endmodule
