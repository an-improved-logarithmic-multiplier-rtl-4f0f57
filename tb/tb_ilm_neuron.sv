// tb_ilm_neuron: end-to-end test of the three-input ILM neuron at its
// default parameters.
//
// Random and directed 8-bit sign-magnitude inputs and weights are applied;
// the expected output is the sum of the reference ILM products with their
// XOR signs, hard-limited to [-127, 127]. The test counts how often each
// mechanism of the design was exercised and fails if one never was:
// operand rounded down, rounded up, rounded up to the top power (128), zero
// operand, negative product, positive saturation, negative saturation, and
// an output inside the range.
module tb_ilm_neuron;
  import ilm_pkg::*;
  import ilm_ref_pkg::*;

  localparam int N = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  sm8_t x [N];
  sm8_t w [N];
  sm8_t y;
  int checks = 0, failures = 0;
  int n_down = 0, n_up = 0, n_top = 0, n_zero = 0, n_neg = 0;
  int n_sat_pos = 0, n_sat_neg = 0, n_inrange = 0;

  ilm_neuron dut (.i_x(x), .i_w(w), .o_y(y));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void note_operand(int m);
    int lo;
    if (m == 0) begin
      n_zero++;
      return;
    end
    lo = 1;
    while (2 * lo <= m) lo = 2 * lo;
    if (ref_nearest_pow2(m, OP_W) == 128 && lo == 64) n_top++;
    else if (ref_nearest_pow2(m, OP_W) > lo) n_up++;
    else n_down++;
  endfunction

  initial begin
    int xm [N], wm [N], xs [N], ws [N];
    int acc, expv, got, mode;
    longint p;
    for (int t = 0; t < 20000; t++) begin
      mode = t % 4;
      for (int n = 0; n < N; n++) begin
        case (mode)
          0: begin  // full range
            xm[n] = int'($urandom_range(0, 127));
            wm[n] = int'($urandom_range(0, 127));
          end
          1: begin  // small weights, as in trained networks
            xm[n] = int'($urandom_range(0, 127));
            wm[n] = int'($urandom_range(0, 12));
          end
          2: begin  // small values on both sides
            xm[n] = int'($urandom_range(0, 15));
            wm[n] = int'($urandom_range(0, 15));
          end
          default: begin
            xm[n] = int'($urandom_range(0, 3));
            wm[n] = int'($urandom_range(0, 127));
          end
        endcase
        xs[n] = int'($urandom_range(0, 1));
        ws[n] = int'($urandom_range(0, 1));
      end
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        x[n] = '{sign: 1'(xs[n]), mag: 7'(xm[n])};
        w[n] = '{sign: 1'(ws[n]), mag: 7'(wm[n])};
      end
      @(posedge clk);
      acc = 0;
      for (int n = 0; n < N; n++) begin
        p = ref_ilm(xm[n], wm[n], OP_W, 0);
        if ((xs[n] ^ ws[n]) != 0) begin
          acc -= int'(p);
          if (p != 0) n_neg++;
        end else begin
          acc += int'(p);
        end
        note_operand(xm[n]);
        note_operand(wm[n]);
      end
      expv = acc;
      if (expv > 127) begin
        expv = 127;
        n_sat_pos++;
      end else if (expv < -127) begin
        expv = -127;
        n_sat_neg++;
      end else begin
        n_inrange++;
      end
      got = y.sign ? -int'(y.mag) : int'(y.mag);
      checks++;
      if (got != expv || (expv == 0 && y.sign)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d y=%0d expected %0d", t, got, expv);
      end
    end
    checks++;
    if (n_down == 0 || n_up == 0 || n_top == 0 || n_zero == 0 || n_neg == 0 ||
        n_sat_pos == 0 || n_sat_neg == 0 || n_inrange == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("operands: rounded down %0d, up %0d, up to 128 %0d, zero %0d", n_down, n_up, n_top, n_zero);
    $display("negative products %0d; outputs: +sat %0d, -sat %0d, in range %0d",
             n_neg, n_sat_pos, n_sat_neg, n_inrange);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
