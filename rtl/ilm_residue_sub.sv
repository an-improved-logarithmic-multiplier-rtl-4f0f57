// ilm_residue_sub: residue subtractor, q = A - 2^k.
//
// Subtracts the nearest power of two found by the nearest-one detector from
// the operand. The residue is negative when the operand was rounded up. For
// an unsigned W-bit operand and a detector that never returns more than
// 2^(W-1), q lies in [-2^(W-3), 2^(W-1) - 1] ([-32, 127] for W = 8), so a
// W-bit two's-complement result is exact; the W-bit width is a choice of
// this implementation.
//
// Purely combinational.
module ilm_residue_sub #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]        i_val,   // operand A
  input  logic [W-1:0]        i_pow2,  // nearest power of two 2^k (one-hot)
  output logic signed [W-1:0] o_q      // residue A - 2^k, two's complement
);

  // Modulo-2^W subtraction is exact because the true difference fits.
  assign o_q = signed'(i_val - i_pow2);

endmodule
