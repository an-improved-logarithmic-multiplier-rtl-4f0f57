// tb_ilm_pe: checks the one-hot to exponent encoder for W = 8 on every
// one-hot input (expected k = bit position) and on an all-zero input
// (expected 0).
module tb_ilm_pe;
  localparam int W = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] i_onehot;
  logic [2:0]   o_k;
  int checks = 0, failures = 0;

  ilm_pe #(.W(W)) dut (.i_onehot(i_onehot), .o_k(o_k));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = -1; j < W; j++) begin
      @(negedge clk);
      i_onehot = (j < 0) ? '0 : W'(1) << j;
      @(posedge clk);
      checks++;
      if (int'(o_k) != ((j < 0) ? 0 : j)) begin
        failures++;
        $display("FAIL pe(%b) = %0d", i_onehot, o_k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
