// ilm_onehot_adder: exact W-bit adder for a one-hot addend plus an arbitrary
// addend, built as a ripple chain of the reduced full adders (ilm_prop_fa).
//
// It forms the final product 2^(k1+k2) + (q1*2^k2 + q2*2^k1). The sum is
// exact modulo 2^W as long as i_onehot has at most one bit set, which the
// decoder guarantees. Carry-in of bit 0 is 0; the carry out of the top bit
// is dropped (the product fits in W bits).
//
// Purely combinational.
module ilm_onehot_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] i_onehot,  // one-hot addend (2^(k1+k2))
  input  logic [W-1:0] i_b,       // other addend (two's complement)
  output logic [W-1:0] o_sum
);

  logic [W:0] carry;

  assign carry[0] = 1'b0;

  for (genvar j = 0; j < W; j++) begin : g_fa
    ilm_prop_fa u_fa (
      .i_a   (i_onehot[j]),
      .i_b   (i_b[j]),
      .i_cin (carry[j]),
      .o_sum (o_sum[j]),
      .o_cout(carry[j+1])
    );
  end

endmodule
