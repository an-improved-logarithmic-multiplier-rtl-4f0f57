// tb_ilm_onehot_adder: adds each one-hot 16-bit value (and zero) to random
// and corner 16-bit values and compares with (a + b) mod 2^16.
module tb_ilm_onehot_adder;
  localparam int W = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] i_onehot, i_b, o_sum;
  int checks = 0, failures = 0;

  ilm_onehot_adder #(.W(W)) dut (.i_onehot(i_onehot), .i_b(i_b), .o_sum(o_sum));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b;
    for (int j = -1; j < W; j++) begin
      for (int t = 0; t < 400; t++) begin
        a = (j < 0) ? 0 : (1 << j);
        case (t)
          0: b = 0;
          1: b = 65535;
          2: b = (a == 0) ? 1 : a - 1;    // carry ripples to the top
          3: b = a;                        // carry out of the one-hot bit
          default: b = int'($urandom_range(0, 65535));
        endcase
        @(negedge clk);
        i_onehot = W'(a);
        i_b      = W'(b);
        @(posedge clk);
        checks++;
        if (int'(o_sum) != (a + b) % 65536) begin
          failures++;
          $display("FAIL %h + %h = %h", a, b, o_sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
