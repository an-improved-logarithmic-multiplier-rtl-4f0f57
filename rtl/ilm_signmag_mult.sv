// ilm_signmag_mult: signed multiplication with the ILM in sign-magnitude
// form.
//
// The magnitudes go through ilm_mult; the product's sign is the XOR of the
// operand signs. A zero product keeps the XOR sign (a "negative zero" is
// possible), which a consumer must treat as 0.
//
// Interface: separate sign bits and W-bit magnitudes in, a sign bit and a
// 2W-bit magnitude out. Purely combinational.
module ilm_signmag_mult #(
  parameter int unsigned W           = ilm_pkg::OP_W,
  parameter int unsigned APPROX_BITS = 0
) (
  input  logic           i_a_sign,
  input  logic [W-1:0]   i_a_mag,
  input  logic           i_b_sign,
  input  logic [W-1:0]   i_b_mag,
  output logic           o_p_sign,
  output logic [2*W-1:0] o_p_mag
);

  assign o_p_sign = i_a_sign ^ i_b_sign;

  ilm_mult #(.W(W), .APPROX_BITS(APPROX_BITS)) u_mult (
    .i_a(i_a_mag),
    .i_b(i_b_mag),
    .o_p(o_p_mag)
  );

endmodule
