// ilm_prop_fa: the reduced full adder used where one addend is one-hot.
//
// When addend a is one-hot, a = 1 and carry-in = 1 can never occur together
// at the same bit (below the set bit a is 0, so no carry is generated, and
// above it a is 0 again). Dropping those two rows of the full-adder truth
// table lets both outputs be simplified:
//   sum  = ~b & cin | ~a & b & ~cin | a & ~b
//   cout =  a & b   |  b & cin
// For every other input the outputs equal those of a normal full adder.
//
// Purely combinational.
module ilm_prop_fa (
  input  logic i_a,    // bit of the one-hot addend
  input  logic i_b,    // bit of the other addend
  input  logic i_cin,
  output logic o_sum,
  output logic o_cout
);

  assign o_sum  = (~i_b & i_cin) | (~i_a & i_b & ~i_cin) | (i_a & ~i_b);
  assign o_cout = (i_a & i_b) | (i_b & i_cin);

endmodule
