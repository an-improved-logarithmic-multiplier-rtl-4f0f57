// tb_ilm_mult_error: error statistics of the 8x8 ILM over one million
// random operand pairs for each of two operand distributions.
//
//   uniform: A, B uniform in [0, 255]
//   normal : A, B = |z| * 255/4 rounded and clipped to 255, z standard
//            normal (Box-Muller from $urandom), i.e. mostly small operands
//
// For each pair the ILM-0, ILM-5 and ILM-9 products are checked against the
// arithmetic reference, and for each variant the testbench accumulates the
// average error AE = mean(Pa - Pe), the mean relative error distance
// MRED = mean(|Pa - Pe| / Pe) over pairs with Pe > 0, and the normalized
// mean error distance NMED = mean(|Pa - Pe|) / 65025, and prints them.
// It also checks that ILM-0 errs in both directions for each distribution.
module tb_ilm_mult_error;
  import ilm_ref_pkg::*;

  localparam int W     = 8;
  localparam int PAIRS = 1000000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]   i_a, i_b;
  logic [2*W-1:0] p [3];
  int checks = 0, failures = 0;
  longint sum_err [3] = '{0, 0, 0};
  longint sum_ed  [3] = '{0, 0, 0};
  real    sum_red [3] = '{0.0, 0.0, 0.0};
  int     n_red = 0, n_over = 0, n_under = 0;
  real    pi = 3.14159265358979;

  localparam int KS [3] = '{0, 5, 9};

  for (genvar v = 0; v < 3; v++) begin : g_dut
    ilm_mult #(.W(W), .APPROX_BITS(KS[v])) dut (.i_a(i_a), .i_b(i_b), .o_p(p[v]));
  end

  initial begin
    repeat (2 * PAIRS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int normal_operand();
    real u1, u2, z;
    int m;
    u1 = (real'($urandom_range(1, 32'hFFFF_FFFE))) / 4294967296.0;
    u2 = (real'($urandom_range(0, 32'hFFFF_FFFE))) / 4294967296.0;
    z  = $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * pi * u2);
    if (z < 0.0) z = -z;
    m = int'(z * 255.0 / 4.0);
    return (m > 255) ? 255 : m;
  endfunction

  function automatic void clear_stats();
    for (int v = 0; v < 3; v++) begin
      sum_err[v] = 0;
      sum_ed[v]  = 0;
      sum_red[v] = 0.0;
    end
    n_red = 0; n_over = 0; n_under = 0;
  endfunction

  function automatic void note(int a, int b);
    longint e, d;
    e = longint'(a) * longint'(b);
    for (int v = 0; v < 3; v++) begin
      checks++;
      if (longint'(p[v]) != ref_ilm(a, b, W, KS[v])) begin
        failures++;
        if (failures < 10) $display("FAIL ILM-%0d %0d x %0d = %0d", KS[v], a, b, p[v]);
      end
      d = longint'(p[v]) - e;
      sum_err[v] += d;
      sum_ed[v]  += (d < 0) ? -d : d;
      if (e > 0) sum_red[v] += real'((d < 0) ? -d : d) / real'(e);
      if (v == 0 && d > 0) n_over++;
      if (v == 0 && d < 0) n_under++;
    end
    if (e > 0) n_red++;
  endfunction

  function automatic void report(string dname);
    for (int v = 0; v < 3; v++) begin
      $display("%s ILM-%0d: AE %0.2f  MRED %0.4f  NMED %0.4f", dname, KS[v],
               real'(sum_err[v]) / PAIRS, sum_red[v] / n_red,
               real'(sum_ed[v]) / PAIRS / 65025.0);
    end
    checks++;
    if (n_over == 0 || n_under == 0) begin
      failures++;
      $display("FAIL %s: ILM-0 error one-sided", dname);
    end
  endfunction

  initial begin
    int a, b;
    for (int dk = 0; dk < 2; dk++) begin
      clear_stats();
      for (int t = 0; t < PAIRS; t++) begin
        if (dk == 0) begin
          a = int'($urandom_range(0, 255));
          b = int'($urandom_range(0, 255));
        end else begin
          a = normal_operand();
          b = normal_operand();
        end
        @(negedge clk);
        i_a = W'(a);
        i_b = W'(b);
        @(posedge clk);
        note(a, b);
      end
      report((dk == 0) ? "uniform" : "normal ");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
