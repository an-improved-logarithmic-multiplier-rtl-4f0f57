// tb_ilm_shifter: every 8-bit signed residue times every shift 0..7 is
// compared with q * 2^k computed by multiplication.
module tb_ilm_shifter;
  localparam int W = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0]   i_q;
  logic [2:0]            i_k;
  logic signed [2*W-1:0] o_term;
  int checks = 0, failures = 0;

  ilm_shifter #(.W(W)) dut (.i_q(i_q), .i_k(i_k), .o_term(o_term));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = -(1 << (W - 1)); q < (1 << (W - 1)); q++) begin
      for (int k = 0; k < W; k++) begin
        @(negedge clk);
        i_q = W'(q);
        i_k = 3'(k);
        #1;
        checks++;
        if (int'(o_term) != q * (1 << k)) begin
          failures++;
          $display("FAIL %0d << %0d = %0d", q, k, o_term);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
