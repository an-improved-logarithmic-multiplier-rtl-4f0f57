// ilm_pkg: widths and types shared by the improved logarithmic multiplier
// (ILM) and the neuron built from it.
//
// The multiplier works on OP_W-bit unsigned magnitudes (8 bits, the only
// size the design is specified for) and produces a PROD_W = 2*OP_W bit
// product. Signed operands use sign-magnitude coding: one sign bit and a
// magnitude. The neuron exchanges 8-bit sign-magnitude words, i.e. a sign
// bit and a 7-bit magnitude, so its values lie in [-127, 127].
package ilm_pkg;

  localparam int unsigned OP_W   = 8;           // multiplier operand width
  localparam int unsigned PROD_W = 2 * OP_W;    // multiplier product width

  // 8-bit sign-magnitude word used at the neuron's ports.
  localparam int unsigned SM_W   = 8;
  localparam int unsigned SM_MAX = (1 << (SM_W - 1)) - 1;  // 127

  typedef struct packed {
    logic             sign;   // 1 = negative
    logic [SM_W-2:0]  mag;    // magnitude 0..127
  } sm8_t;

endpackage
