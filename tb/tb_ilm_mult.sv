// tb_ilm_mult: exhaustive check of the 8x8 ILM in its exact variant
// (ILM-0) and in the ILM-5 and ILM-9 variants: all 65536 operand pairs are
// compared with the arithmetic reference of ilm_ref_pkg. For ILM-0 it also
// checks that the error equals -q1*q2 (the dropped term), that it takes both
// signs, reports mean error and mean relative error distance, and checks
// the worst-case error of the capped detector (-127*127 at 255 x 255).
// For ILM-5 and ILM-9 it counts the small products whose sum went negative
// and was returned as 0, and fails if that never happened.
module tb_ilm_mult;
  import ilm_ref_pkg::*;

  localparam int W = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]   i_a, i_b;
  logic [2*W-1:0] p0, p5, p9;
  int checks = 0, failures = 0;
  int n_clamp5 = 0, n_clamp9 = 0;
  int q1 = 0, q2 = 0, err = 0, worst = 0, n_pos = 0, n_neg = 0, n_red = 0;
  longint sum_err = 0, sum_red_ppm = 0;

  ilm_mult #(.W(W), .APPROX_BITS(0)) dut0 (.i_a(i_a), .i_b(i_b), .o_p(p0));
  ilm_mult #(.W(W), .APPROX_BITS(5)) dut5 (.i_a(i_a), .i_b(i_b), .o_p(p5));
  ilm_mult #(.W(W), .APPROX_BITS(9)) dut9 (.i_a(i_a), .i_b(i_b), .o_p(p9));

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Error of the exact variant must be the dropped term -q1*q2.
  function automatic void note_error(int a, int b, int e);
    err = e;
    if (a != 0 && b != 0) begin
      q1 = a - ref_nearest_pow2(a, W);
      q2 = b - ref_nearest_pow2(b, W);
      checks++;
      if (err != -(q1 * q2)) begin
        failures++;
        if (failures < 10) $display("FAIL error %0d x %0d: %0d vs %0d", a, b, err, -(q1 * q2));
      end
      sum_red_ppm += longint'((err < 0) ? -err : err) * 64'd1000000 / longint'(a * b);
      n_red++;
    end
    if (err > 0) n_pos++;
    if (err < 0) n_neg++;
    if (err < worst) worst = err;
    sum_err += longint'(err);
  endfunction

  initial begin
    longint e0, e5, e9;
    for (int a = 0; a < (1 << W); a++) begin
      for (int b = 0; b < (1 << W); b++) begin
        @(negedge clk);
        i_a = W'(a);
        i_b = W'(b);
        @(posedge clk);
        e0 = ref_ilm(a, b, W, 0);
        e5 = ref_ilm(a, b, W, 5);
        e9 = ref_ilm(a, b, W, 9);
        checks += 3;
        if (longint'(p0) != e0) begin
          failures++;
          if (failures < 10) $display("FAIL ILM-0 %0d x %0d = %0d expected %0d", a, b, p0, e0);
        end
        if (longint'(p5) != e5) begin
          failures++;
          if (failures < 10) $display("FAIL ILM-5 %0d x %0d = %0d expected %0d", a, b, p5, e5);
        end
        if (longint'(p9) != e9) begin
          failures++;
          if (failures < 10) $display("FAIL ILM-9 %0d x %0d = %0d expected %0d", a, b, p9, e9);
        end
        note_error(a, b, int'(p0) - a * b);
        if (a != 0 && b != 0 && p5 == 0) n_clamp5++;
        if (a != 0 && b != 0 && p9 == 0) n_clamp9++;
      end
    end
    checks += 3;
    if (n_clamp5 == 0 || n_clamp9 == 0) begin
      failures++;
      $display("FAIL negative ILM-k sum never clamped");
    end
    $display("ILM-5 / ILM-9 negative sums clamped to 0: %0d / %0d pairs", n_clamp5, n_clamp9);
    if (n_pos == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL error is one-sided: %0d positive, %0d negative", n_pos, n_neg);
    end
    if (worst != -127 * 127) begin
      failures++;
      $display("FAIL worst error %0d", worst);
    end
    $display("ILM-0: error sum %0d over 65536 pairs, MRED %0d ppm, worst %0d, %0d over / %0d under",
             sum_err, sum_red_ppm / longint'(n_red), worst, n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
