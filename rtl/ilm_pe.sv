// ilm_pe: priority encoder that turns the one-hot output of the nearest-one
// detector into the exponent k, i.e. the shift amount.
//
// Because the input is one-hot, no priority logic is needed: output bit b is
// the OR of every input bit whose index has bit b set (for W = 8:
// out0 = a1|a3|a5|a7, out1 = a2|a3|a6|a7, out2 = a4|a5|a6|a7). Input bit 0
// takes part in no OR, so an input of 1 and an input of 0 both give k = 0;
// the multiplier treats a zero operand separately. This is the low-power
// encoder structure the multiplier reuses from earlier logarithmic-multiplier
// work; with more than one bit set the output is the OR of their indices.
//
// Purely combinational.
module ilm_pe #(
  parameter int unsigned W   = 8,
  parameter int unsigned K_W = $clog2(W)
) (
  input  logic [W-1:0]   i_onehot,  // one-hot power of two
  output logic [K_W-1:0] o_k        // its bit position
);

  always_comb begin
    o_k = '0;
    for (int j = 1; j < W; j++) begin
      for (int b = 0; b < K_W; b++) begin
        if (((j >> b) & 1) == 1) o_k[b] = o_k[b] | i_onehot[j];
      end
    end
  end

endmodule
