// ilm_nod: nearest-one detector (NOD).
//
// Rounds an unsigned W-bit input to the nearest power of two and returns it
// as a one-hot W-bit word. If the leading one of the input is at bit k, the
// input lies in [2^k, 2^(k+1)); it is closer to 2^(k+1) exactly when bit k-1
// is also set, and a tie (input = 1.5 * 2^k) rounds up. To keep the output
// W bits wide the result never exceeds 2^(W-1): every input of 2^(W-1) and
// above gives 2^(W-1), even where 2^W would be nearer (a simplification that
// accepts larger errors for rare large operands). An input of 0 gives an
// all-zero output.
//
// The logic follows the two-level structure of the published NOD circuit:
// output bit j is set when no bit above j is set (the "T" terms) and either
//   bit j is set and bit j-1 is clear   (round down to 2^j), or
//   bit j is clear and bits j-1, j-2 are set (round up from 2^(j-1) to 2^j).
// The top output bit is I[W-1] | (I[W-2] & I[W-3]), bit 1 is only the
// round-down case (an input of 3 rounds up to 4) and bit 0 is set for an
// input of exactly 1. The MSB-to-LSB evaluation order of the "no bit above"
// chain is also as published; the tie rule comes from the rounding
// algorithm ("use underestimate" only when N - 2^k < 2^(k+1) - N).
//
// Purely combinational. Needs W >= 3.
module ilm_nod #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] i_val,   // unsigned operand
  output logic [W-1:0] o_pow2   // one-hot nearest power of two (0 for 0)
);

  logic [W-1:0] above;  // above[j]: some input bit above j is set

  always_comb begin
    above[W-1] = 1'b0;
    for (int j = W - 2; j >= 0; j--) begin
      above[j] = above[j+1] | i_val[j+1];
    end
  end

  always_comb begin
    o_pow2        = '0;
    o_pow2[W-1]   = i_val[W-1] | (i_val[W-2] & i_val[W-3]);
    for (int j = W - 2; j >= 2; j--) begin
      o_pow2[j] = ~above[j] & ((i_val[j] & ~i_val[j-1]) |
                               (~i_val[j] & i_val[j-1] & i_val[j-2]));
    end
    o_pow2[1] = ~above[1] & i_val[1] & ~i_val[0];
    o_pow2[0] = ~above[0] & i_val[0];
  end

endmodule
