// tb_ilm_signmag_mult: random sign-magnitude operand pairs (8-bit
// magnitudes, both signs) through the sign-magnitude ILM. The product sign
// must be the XOR of the signs and the magnitude the reference ILM product.
module tb_ilm_signmag_mult;
  import ilm_ref_pkg::*;

  localparam int W = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           as, bs, ps;
  logic [W-1:0]   am, bm;
  logic [2*W-1:0] pm;
  int checks = 0, failures = 0, n_negprod = 0;

  ilm_signmag_mult #(.W(W)) dut (
    .i_a_sign(as), .i_a_mag(am), .i_b_sign(bs), .i_b_mag(bm),
    .o_p_sign(ps), .o_p_mag(pm)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, sa, sb;
    for (int t = 0; t < 2000; t++) begin
      a  = int'($urandom_range(0, 255));
      b  = int'($urandom_range(0, 255));
      sa = int'($urandom_range(0, 1));
      sb = int'($urandom_range(0, 1));
      @(negedge clk);
      {as, am, bs, bm} = {1'(sa), W'(a), 1'(sb), W'(b)};
      @(posedge clk);
      checks += 2;
      if (ps != 1'(sa ^ sb)) begin
        failures++;
        $display("FAIL sign %0d ^ %0d = %0d", sa, sb, ps);
      end
      if (longint'(pm) != ref_ilm(a, b, W, 0)) begin
        failures++;
        $display("FAIL |%0d x %0d| = %0d", a, b, pm);
      end
      if (ps) n_negprod++;
    end
    checks++;
    if (n_negprod == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
