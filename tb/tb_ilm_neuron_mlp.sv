// tb_ilm_neuron_mlp: the hidden layer of a 784-128-10 MNIST-style MLP,
// computed one hidden neuron at a time by an ILM neuron with 784 inputs.
//
// No trained network or image data is used: the 784 inputs are a synthetic
// 28x28 "image" (about 80 % zero pixels, the rest 1..127, all positive) and
// each of the 128 weight vectors is drawn from a distribution centred on
// zero (most magnitudes below 16, a few up to 127, random signs), the shape
// trained weights usually have. For each hidden neuron the 784 products and
// their hard-limited sum are checked against the arithmetic reference.
// The activation function of the network is not part of the neuron and is
// not applied.
module tb_ilm_neuron_mlp;
  import ilm_pkg::*;
  import ilm_ref_pkg::*;

  localparam int N_IN   = 784;
  localparam int HIDDEN = 128;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  sm8_t x [N_IN];
  sm8_t w [N_IN];
  sm8_t y;
  int checks = 0, failures = 0, n_sat = 0, n_inrange = 0;
  int xm [N_IN];

  ilm_neuron #(.N_IN(N_IN)) dut (.i_x(x), .i_w(w), .o_y(y));

  initial begin
    repeat (HIDDEN + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int weight_mag();
    int r;
    r = int'($urandom_range(0, 99));
    if (r < 30) return 0;
    if (r < 90) return int'($urandom_range(1, 8));
    if (r < 98) return int'($urandom_range(9, 31));
    return int'($urandom_range(32, 127));
  endfunction

  initial begin
    int wm, ws, acc, expv, got;
    for (int n = 0; n < N_IN; n++) begin
      xm[n] = ($urandom_range(0, 9) < 8) ? 0 : int'($urandom_range(1, 127));
      x[n]  = '{sign: 1'b0, mag: 7'(xm[n])};
    end
    for (int h = 0; h < HIDDEN; h++) begin
      acc = 0;
      @(negedge clk);
      for (int n = 0; n < N_IN; n++) begin
        // every fourth neuron is sparse, so that some sums stay in range
        wm = ((h % 4) == 0 && $urandom_range(0, 99) < 97) ? 0 : weight_mag();
        ws = int'($urandom_range(0, 1));
        w[n] = '{sign: 1'(ws), mag: 7'(wm)};
        if (ws != 0) acc -= int'(ref_ilm(xm[n], wm, OP_W, 0));
        else         acc += int'(ref_ilm(xm[n], wm, OP_W, 0));
      end
      @(posedge clk);
      expv = (acc > 127) ? 127 : (acc < -127) ? -127 : acc;
      if (expv != acc) n_sat++;
      else n_inrange++;
      got = y.sign ? -int'(y.mag) : int'(y.mag);
      checks++;
      if (got != expv) begin
        failures++;
        $display("FAIL hidden neuron %0d: %0d expected %0d (sum %0d)", h, got, expv, acc);
      end
    end
    $display("hidden neurons: %0d saturated, %0d in range", n_sat, n_inrange);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
