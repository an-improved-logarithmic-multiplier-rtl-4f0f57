// tb_ilm_approx_adder: drives the exact (APPROX_BITS = 0) and the ILM-5
// (APPROX_BITS = 5) residue adders with the same random 16-bit addends.
// The exact one must give (a + b) mod 2^16. The ILM-5 one must give the sum
// of the upper 11 bits of a and b, shifted back, plus the constant 10101,
// and its error against the exact sum must take both signs.
module tb_ilm_approx_adder;
  localparam int W = 16;
  localparam int K = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] i_a, i_b, sum_exact, sum_apx;
  int checks = 0, failures = 0, n_over = 0, n_under = 0;

  ilm_approx_adder #(.W(W), .APPROX_BITS(0)) dut_exact (.i_a(i_a), .i_b(i_b), .o_sum(sum_exact));
  ilm_approx_adder #(.W(W), .APPROX_BITS(K)) dut_apx   (.i_a(i_a), .i_b(i_b), .o_sum(sum_apx));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, e_exact, e_apx, d;
    for (int t = 0; t < 5000; t++) begin
      a = int'($urandom_range(0, 65535));
      b = int'($urandom_range(0, 65535));
      if (t < 4) begin  // corners
        a = (t[0]) ? 65535 : 0;
        b = (t[1]) ? 65535 : 31;
      end
      @(negedge clk);
      i_a = W'(a);
      i_b = W'(b);
      @(posedge clk);
      e_exact = (a + b) % 65536;
      e_apx   = (((a / 32) + (b / 32)) * 32 + 21) % 65536;
      checks += 2;
      if (int'(sum_exact) != e_exact) begin
        failures++;
        $display("FAIL exact %0d + %0d = %0d", a, b, sum_exact);
      end
      if (int'(sum_apx) != e_apx) begin
        failures++;
        $display("FAIL ilm-5 %0d + %0d = %0d expected %0d", a, b, sum_apx, e_apx);
      end
      d = ((a % 32) + (b % 32));
      if (d > 21) n_under++;
      if (d < 21) n_over++;
    end
    checks++;
    if (n_over == 0 || n_under == 0) failures++;
    $display("ILM-5 adder: over %0d, under %0d", n_over, n_under);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
