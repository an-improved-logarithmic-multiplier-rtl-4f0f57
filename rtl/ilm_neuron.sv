// ilm_neuron: artificial neuron whose synapse multipliers are ILMs; the top
// of the design.
//
// y = sat127( sum_i x_i * w_i )
//
// Each of the N_IN inputs x_i and weights w_i is an 8-bit sign-magnitude
// word (sign bit plus 7-bit magnitude, range [-127, 127]). Every pair is
// multiplied by an ilm_signmag_mult (8-bit magnitudes, the 7-bit magnitude
// zero-extended), the signed products are converted to two's complement and
// summed by an adder chain (N_IN - 1 adders; two for the default of three
// inputs), and the sum is hard-limited to [-127, 127] so that the result is
// again an 8-bit sign-magnitude word that can feed the next layer. No bias
// input and no activation function are included: the neuron evaluated for
// hardware cost has neither, and saturation is its only output
// non-linearity. A zero result is always returned with sign 0.
//
// Three inputs, the adder count and the +-127 hard limit follow the
// reference neuron; the two's-complement accumulation, the adder order and
// the sign of zero are choices of this implementation.
//
// Interface: i_x, i_w arrays of ilm_pkg::sm8_t; o_y an ilm_pkg::sm8_t.
// Purely combinational, no clock.
module ilm_neuron
  import ilm_pkg::*;
#(
  parameter int unsigned N_IN        = 3,
  parameter int unsigned APPROX_BITS = 0
) (
  input  sm8_t i_x [N_IN],
  input  sm8_t i_w [N_IN],
  output sm8_t o_y
);

  localparam int unsigned PS_W  = PROD_W + 1;                 // signed product
  localparam int unsigned ACC_W = PS_W + $clog2(N_IN + 1);    // signed sum

  logic                     p_sign [N_IN];
  logic [PROD_W-1:0]        p_mag  [N_IN];
  logic signed [ACC_W-1:0]  acc;
  logic [ACC_W-1:0]         acc_abs;

  for (genvar n = 0; n < N_IN; n++) begin : g_syn
    ilm_signmag_mult #(.W(OP_W), .APPROX_BITS(APPROX_BITS)) u_mul (
      .i_a_sign(i_x[n].sign),
      .i_a_mag ({{(OP_W - SM_W + 1){1'b0}}, i_x[n].mag}),
      .i_b_sign(i_w[n].sign),
      .i_b_mag ({{(OP_W - SM_W + 1){1'b0}}, i_w[n].mag}),
      .o_p_sign(p_sign[n]),
      .o_p_mag (p_mag[n])
    );
  end

  // Adder chain over the signed products.
  always_comb begin
    acc = '0;
    for (int n = 0; n < int'(N_IN); n++) begin
      if (p_sign[n]) acc = acc - signed'(ACC_W'(p_mag[n]));
      else           acc = acc + signed'(ACC_W'(p_mag[n]));
    end
  end

  // Hard limit to [-127, 127] and return to sign-magnitude.
  always_comb begin
    acc_abs  = acc[ACC_W-1] ? ACC_W'(-acc) : ACC_W'(acc);
    o_y.sign = acc[ACC_W-1];
    if (acc_abs > ACC_W'(SM_MAX)) o_y.mag = (SM_W-1)'(SM_MAX);
    else                          o_y.mag = acc_abs[SM_W-2:0];
  end

endmodule
