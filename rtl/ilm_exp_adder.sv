// ilm_exp_adder: the small conventional adder that sums the two exponents,
// k1 + k2, for the decoder. The sum is one bit wider than the exponents, so
// it never overflows. The multiplier only needs the sum; its adder
// structure is not specified, so a plain behavioural '+' is used.
//
// Purely combinational.
module ilm_exp_adder #(
  parameter int unsigned K_W = 3
) (
  input  logic [K_W-1:0] i_k1,
  input  logic [K_W-1:0] i_k2,
  output logic [K_W:0]   o_sum   // k1 + k2
);

  assign o_sum = {1'b0, i_k1} + {1'b0, i_k2};

endmodule
