// tb_ilm_residue_sub: for every 8-bit operand, feeds the operand and its
// nearest power of two (from the arithmetic reference) and checks the signed
// residue operand - power. Fails if no negative and no positive residue was
// seen.
module tb_ilm_residue_sub;
  import ilm_ref_pkg::*;

  localparam int W = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]        i_val, i_pow2;
  logic signed [W-1:0] o_q;
  int checks = 0, failures = 0, n_neg = 0, n_pos = 0;

  ilm_residue_sub #(.W(W)) dut (.i_val(i_val), .i_pow2(i_pow2), .o_q(o_q));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, e;
    for (int n = 1; n < (1 << W); n++) begin
      p = ref_nearest_pow2(n, W);
      @(negedge clk);
      i_val  = W'(n);
      i_pow2 = W'(p);
      @(posedge clk);
      e = n - p;
      checks++;
      if (int'(o_q) != e) begin
        failures++;
        $display("FAIL %0d - %0d = %0d expected %0d", n, p, o_q, e);
      end
      if (e < 0) n_neg++;
      if (e > 0) n_pos++;
    end
    checks++;
    if (n_neg == 0 || n_pos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
