// tb_ilm_neuron_variants: the three-input neuron built with the approximate
// ILM-5 and ILM-9 multipliers (APPROX_BITS = 5 and 9). Random sign-magnitude
// inputs and weights, with many small values so that the fixed low bits and
// the clamp of negative sums matter. Each output is compared with the
// hard-limited sum of the reference ILM-k products; the test fails if no
// product was clamped to 0 or if no output stayed inside [-127, 127].
module tb_ilm_neuron_variants;
  import ilm_pkg::*;
  import ilm_ref_pkg::*;

  localparam int N = 3;
  localparam int KS [2] = '{5, 9};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  sm8_t x [N];
  sm8_t w [N];
  sm8_t y [2];
  int checks = 0, failures = 0, n_clamped = 0, n_inrange = 0;

  ilm_neuron #(.N_IN(N), .APPROX_BITS(5)) dut5 (.i_x(x), .i_w(w), .o_y(y[0]));
  ilm_neuron #(.N_IN(N), .APPROX_BITS(9)) dut9 (.i_x(x), .i_w(w), .o_y(y[1]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xm [N], wm [N], xs [N], ws [N];
    int acc, expv, got, hi;
    longint p;
    for (int t = 0; t < 10000; t++) begin
      hi = (t % 2 == 0) ? 7 : 127;
      for (int n = 0; n < N; n++) begin
        xm[n] = int'($urandom_range(0, hi));
        wm[n] = int'($urandom_range(0, (t % 3 == 0) ? 127 : 7));
        xs[n] = int'($urandom_range(0, 1));
        ws[n] = int'($urandom_range(0, 1));
      end
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        x[n] = '{sign: 1'(xs[n]), mag: 7'(xm[n])};
        w[n] = '{sign: 1'(ws[n]), mag: 7'(wm[n])};
      end
      @(posedge clk);
      for (int v = 0; v < 2; v++) begin
        acc = 0;
        for (int n = 0; n < N; n++) begin
          p = ref_ilm(xm[n], wm[n], OP_W, KS[v]);
          if (p == 0 && xm[n] != 0 && wm[n] != 0) n_clamped++;
          acc += ((xs[n] ^ ws[n]) != 0) ? -int'(p) : int'(p);
        end
        expv = (acc > 127) ? 127 : (acc < -127) ? -127 : acc;
        if (expv == acc) n_inrange++;
        got = y[v].sign ? -int'(y[v].mag) : int'(y[v].mag);
        checks++;
        if (got != expv) begin
          failures++;
          if (failures < 10) $display("FAIL ILM-%0d t=%0d y=%0d expected %0d", KS[v], t, got, expv);
        end
      end
    end
    checks++;
    if (n_clamped == 0 || n_inrange == 0) begin
      failures++;
      $display("FAIL clamped %0d in range %0d", n_clamped, n_inrange);
    end
    $display("products clamped to 0: %0d, outputs in range: %0d", n_clamped, n_inrange);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
