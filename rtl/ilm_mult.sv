// ilm_mult: improved logarithmic multiplier (ILM) for unsigned W-bit
// operands.
//
// Each operand is written as its nearest power of two plus a signed residue,
// A = 2^k1 + q1 and B = 2^k2 + q2, so that
//   A * B = 2^(k1+k2) + q1*2^k2 + q2*2^k1 + q1*q2.
// The multiplier drops the last term and computes the other three with
// shifts and additions only. Because operands are rounded to the *nearest*
// power of two (up or down), q1 and q2 can have either sign and the error
// -q1*q2 is two-sided, unlike Mitchell's method which always truncates.
//
// Datapath (all combinational), per operand:
//   ilm_nod          nearest power of two 2^k (one-hot, capped at 2^(W-1))
//   ilm_pe           exponent k from the one-hot word
//   ilm_residue_sub  q = operand - 2^k
//   ilm_shifter      q1 << k2 and q2 << k1
// then ilm_exp_adder (k1+k2), ilm_decoder (2^(k1+k2)), ilm_approx_adder
// (sum of the two shifted residues; exact for APPROX_BITS = 0, the ILM-0
// variant, otherwise ILM-k) and ilm_onehot_adder, the reduced-full-adder
// chain that adds the one-hot term.
//
// Zero operands: the detector gives 0 for an operand of 0, but the datapath
// above would still return the other operand. This implementation forces the
// product to 0 whenever either operand is 0; that gate is its own addition.
//
// With APPROX_BITS > 0 and tiny operands (for example 3 x 1, where the
// exact residue sum is -1) the fixed low bits can make the residue sum more
// negative than 2^(k1+k2). Those variants therefore add the one-hot term in
// 2W+1 bits and return 0 for a negative sum instead of letting it wrap to a
// huge product; this clamp is also this implementation's own choice.
//
// Interface: o_p = approximate product of i_a and i_b, 2W bits, no clock;
// the delay is that of the combinational path.
module ilm_mult #(
  parameter int unsigned W           = ilm_pkg::OP_W,
  parameter int unsigned APPROX_BITS = 0
) (
  input  logic [W-1:0]   i_a,
  input  logic [W-1:0]   i_b,
  output logic [2*W-1:0] o_p
);

  localparam int unsigned K_W = $clog2(W);

  logic [W-1:0]          pow_a, pow_b;    // 2^k1, 2^k2
  logic [K_W-1:0]        k1, k2;
  logic signed [W-1:0]   q1, q2;
  logic signed [2*W-1:0] q1_sh, q2_sh;    // q1*2^k2, q2*2^k1
  logic [K_W:0]          ksum;
  logic [2*W-1:0]        msb_term;        // 2^(k1+k2)
  logic [2*W-1:0]        res_sum;
  logic [2*W-1:0]        prod;

  ilm_nod #(.W(W)) u_nod_a (.i_val(i_a), .o_pow2(pow_a));
  ilm_nod #(.W(W)) u_nod_b (.i_val(i_b), .o_pow2(pow_b));

  ilm_pe #(.W(W), .K_W(K_W)) u_pe_a (.i_onehot(pow_a), .o_k(k1));
  ilm_pe #(.W(W), .K_W(K_W)) u_pe_b (.i_onehot(pow_b), .o_k(k2));

  ilm_residue_sub #(.W(W)) u_sub_a (.i_val(i_a), .i_pow2(pow_a), .o_q(q1));
  ilm_residue_sub #(.W(W)) u_sub_b (.i_val(i_b), .i_pow2(pow_b), .o_q(q2));

  ilm_shifter #(.W(W), .K_W(K_W)) u_sh_a (.i_q(q1), .i_k(k2), .o_term(q1_sh));
  ilm_shifter #(.W(W), .K_W(K_W)) u_sh_b (.i_q(q2), .i_k(k1), .o_term(q2_sh));

  ilm_exp_adder #(.K_W(K_W)) u_kadd (.i_k1(k1), .i_k2(k2), .o_sum(ksum));

  ilm_decoder #(.IN_W(K_W + 1), .OUT_W(2 * W)) u_dec (
    .i_exp   (ksum),
    .o_onehot(msb_term)
  );

  ilm_approx_adder #(.W(2 * W), .APPROX_BITS(APPROX_BITS)) u_radd (
    .i_a  (q1_sh),
    .i_b  (q2_sh),
    .o_sum(res_sum)
  );

  // A zero operand has no power of two; its product is 0.
  logic zero_op;
  assign zero_op = (pow_a == '0) || (pow_b == '0);

  if (APPROX_BITS == 0) begin : g_exact_final
    // 2^(k1+k2) + q1*2^k2 + q2*2^k1 = A*B - q1*q2 >= 0, so 2W bits suffice.
    ilm_onehot_adder #(.W(2 * W)) u_fadd (
      .i_onehot(msb_term),
      .i_b     (res_sum),
      .o_sum   (prod)
    );
    assign o_p = zero_op ? '0 : prod;
  end else begin : g_approx_final
    // The fixed low bits can pull the sum of small products below zero, so
    // the final addition is one bit wider (signed) and a negative result is
    // returned as 0.
    logic [2*W:0] prod_s;
    ilm_onehot_adder #(.W(2 * W + 1)) u_fadd (
      .i_onehot({1'b0, msb_term}),
      .i_b     ({res_sum[2*W-1], res_sum}),
      .o_sum   (prod_s)
    );
    assign prod = prod_s[2*W-1:0];
    assign o_p  = (zero_op || prod_s[2*W]) ? '0 : prod;
  end

endmodule
