// tb_ilm_prop_fa: checks the reduced full adder on the six input rows that
// can occur (all rows except a = 1 with carry-in = 1) against
// a + b + cin computed as integers.
module tb_ilm_prop_fa;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic i_a, i_b, i_cin, o_sum, o_cout;
  int checks = 0, failures = 0;

  ilm_prop_fa dut (.i_a(i_a), .i_b(i_b), .i_cin(i_cin), .o_sum(o_sum), .o_cout(o_cout));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot;
    for (int r = 0; r < 8; r++) begin
      if (r[2] && r[0]) continue;   // a = 1, cin = 1: cannot occur
      @(negedge clk);
      {i_a, i_b, i_cin} = 3'(r);
      @(posedge clk);
      tot = int'(r[2]) + int'(r[1]) + int'(r[0]);
      checks++;
      if ({o_cout, o_sum} != 2'(tot)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> cout=%0b sum=%0b", i_a, i_b, i_cin, o_cout, o_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
