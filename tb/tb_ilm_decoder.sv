// tb_ilm_decoder: every 4-bit exponent sum e is decoded and compared with
// the integer 2^e (0 for e >= 16, which cannot occur in the multiplier).
module tb_ilm_decoder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  i_exp;
  logic [15:0] o_onehot;
  int checks = 0, failures = 0;

  ilm_decoder #(.IN_W(4), .OUT_W(16)) dut (.i_exp(i_exp), .o_onehot(o_onehot));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 16; e++) begin
      @(negedge clk);
      i_exp = 4'(e);
      @(posedge clk);
      checks++;
      if (int'(o_onehot) != (1 << e)) begin
        failures++;
        $display("FAIL dec(%0d) = %h", e, o_onehot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
