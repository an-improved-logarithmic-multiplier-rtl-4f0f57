// ilm_shifter: shifts a signed residue left by the other operand's exponent,
// forming q1 * 2^k2 (or q2 * 2^k1).
//
// The W-bit two's-complement residue is sign-extended to the 2W-bit product
// width before the shift, so negative residues stay negative. With
// k <= W-1 and |q| < 2^(W-1) nothing is lost. The shift is part of the
// original datapath; the sign extension is needed for residues of rounded-up
// operands and is this implementation's reading of it.
//
// Purely combinational.
module ilm_shifter #(
  parameter int unsigned W   = 8,
  parameter int unsigned K_W = $clog2(W)
) (
  input  logic signed [W-1:0]   i_q,    // residue
  input  logic [K_W-1:0]        i_k,    // shift amount
  output logic signed [2*W-1:0] o_term  // i_q * 2^i_k
);

  logic signed [2*W-1:0] q_ext;

  always_comb begin
    q_ext  = (2*W)'(i_q);
    o_term = q_ext <<< i_k;
  end

endmodule
