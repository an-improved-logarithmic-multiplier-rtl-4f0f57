// tb_ilm_nod: exhaustive check of the nearest-one detector for W = 8.
// Every input 0..255 is compared with the arithmetic nearest power of two
// (ties round up, capped at 128). Also counts how often the result rounded
// up, rounded down and hit the cap, and fails if any of them never occurred.
module tb_ilm_nod;
  import ilm_ref_pkg::*;

  localparam int W = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] i_val, o_pow2;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_cap = 0;

  ilm_nod #(.W(W)) dut (.i_val(i_val), .o_pow2(o_pow2));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_p, lo;
    for (int n = 0; n < (1 << W); n++) begin
      @(negedge clk);
      i_val = W'(n);
      @(posedge clk);
      exp_p = ref_nearest_pow2(n, W);
      checks++;
      if (int'(o_pow2) != exp_p) begin
        failures++;
        $display("FAIL nod(%0d) = %0d expected %0d", n, o_pow2, exp_p);
      end
      if (n > 0) begin
        lo = 1;
        while (2 * lo <= n) lo = 2 * lo;
        if (exp_p > lo) n_up++;
        else if (lo >= 2 ** (W - 1) && n - lo >= lo / 2) n_cap++;
        else n_down++;
      end
    end
    checks++;
    if (n_up == 0 || n_down == 0 || n_cap == 0) begin
      failures++;
      $display("FAIL coverage up=%0d down=%0d cap=%0d", n_up, n_down, n_cap);
    end
    $display("rounded up %0d, rounded down %0d, capped %0d", n_up, n_down, n_cap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
