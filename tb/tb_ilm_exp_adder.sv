// tb_ilm_exp_adder: exhaustive check of k1 + k2 for 3-bit exponents.
module tb_ilm_exp_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] i_k1, i_k2;
  logic [3:0] o_sum;
  int checks = 0, failures = 0;

  ilm_exp_adder #(.K_W(3)) dut (.i_k1(i_k1), .i_k2(i_k2), .o_sum(o_sum));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) begin
      for (int b = 0; b < 8; b++) begin
        @(negedge clk);
        i_k1 = 3'(a);
        i_k2 = 3'(b);
        @(posedge clk);
        checks++;
        if (int'(o_sum) != a + b) begin
          failures++;
          $display("FAIL %0d + %0d = %0d", a, b, o_sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
