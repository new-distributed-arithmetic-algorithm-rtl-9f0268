// tb_da_fir48_prop: end-to-end test of the 48-tap DA FIR filter at its
// default parameters (48 taps, 16-bit samples, the default lowpass set).
//
// Feeds, one sample per 16-clock frame: an impulse (the output must replay the
// coefficients), runs of the most positive and most negative sample, 2500
// uniformly random zero-mean samples, and 1200 samples of a low-amplitude
// signal that swings slowly around zero (a stand-in for speech, for which no
// recording is used). Each output is compared with a direct convolution
// computed here from the sample history. Also checked: a sample is taken
// every 16 clocks, and each y_valid comes 18 clock edges after the take edge
// of its sample (y registered 17 edges later). Counted mechanisms: sample
// takes (the slow-clock enable), MAC restarts that had to discard a nonzero
// previous sum (an output that follows a nonzero output), negative and
// positive outputs (the final signed subtraction), and negative samples
// (a sign-bit plane digit of -1).
module tb_da_fir48_prop;
  import da_pkg::*;

  localparam int N_IMP  = 60;
  localparam int N_EXT  = 100;
  localparam int N_RND  = 2500;
  localparam int N_SPH  = 1200;
  localparam int N_ALL  = N_IMP + N_EXT + N_RND + N_SPH;
  localparam int WATCHDOG = (N_ALL + 10) * W + 100;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic signed [W-1:0]   x = '0;
  logic                  x_take;
  logic signed [Y_W-1:0] y;
  logic                  y_valid;

  int checks = 0, failures = 0;
  int n_take = 0, n_clear = 0, n_out = 0, n_neg = 0, n_pos = 0, n_signplane = 0;
  longint cycle = 0;
  longint last_take = -1;
  longint prev_y = 0;
  int hist [N_TAPS];
  longint exp_q [$];
  longint take_q [$];
  int idx = 0;
  logic signed [W-1:0] stim [N_ALL];

  da_fir48_prop dut (.clk, .rst_n, .x, .x_take, .y, .y_valid);

  always #5 clk = ~clk;

  function automatic longint conv();
    longint s = 0;
    for (int i = 0; i < N_TAPS; i++) s += longint'(int'(signed'(DEFAULT_COEF[i]))) * hist[i];
    return s;
  endfunction

  task automatic fail(string what);
    failures++;
    $display("FAIL: %s", what);
  endtask

  initial begin
    automatic int k = 0;
    automatic int tri_v = 0;
    automatic int dir = 37;
    for (int i = 0; i < N_IMP; i++) stim[k++] = (i == 0) ? 16'sd1 : 16'sd0;
    for (int i = 0; i < N_EXT; i++) stim[k++] = (i < N_EXT / 2) ? 16'sh7FFF : 16'sh8000;
    for (int i = 0; i < N_RND; i++) stim[k++] = W'($urandom);
    for (int i = 0; i < N_SPH; i++) begin
      tri_v += dir;
      if (tri_v > 1500 || tri_v < -1500) dir = -dir;
      stim[k++] = W'(tri_v + $signed($urandom_range(0, 200)) - 100);
    end
    for (int i = 0; i < N_TAPS; i++) hist[i] = 0;
    x = stim[0];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (x_take) begin
        n_take++;
        if (x < 0) n_signplane++;
        if (last_take >= 0) begin
          checks++;
          if (cycle - last_take != longint'(W)) fail($sformatf("take spacing %0d", cycle - last_take));
        end
        last_take = cycle;
        for (int i = N_TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = int'(x);
        exp_q.push_back(conv());
        take_q.push_back(cycle);
        idx++;
        x <= (idx < N_ALL) ? stim[idx] : '0;
      end
      if (y_valid) begin
        n_out++;
        if (prev_y != 0) n_clear++;
        prev_y = longint'(y);
        if (y < 0) n_neg++;
        if (y > 0) n_pos++;
        checks++;
        if (exp_q.size() == 0) fail("output with no sample");
        else begin
          longint e, t;
          e = exp_q.pop_front();
          t = take_q.pop_front();
          if (longint'(y) != e) fail($sformatf("output %0d: y=%0d expected %0d", n_out, y, e));
          checks++;
          if (cycle - t != 18) fail($sformatf("latency %0d", cycle - t));
        end
        if (n_out == N_ALL) finish();
      end
    end
  end

  task automatic finish();
    checks++;
    if (n_take < N_ALL)   fail("too few samples taken");
    checks++;
    if (n_clear == 0)  fail("too few outputs that followed a nonzero output");
    checks++;
    if (n_neg == 0)       fail("no negative output");
    checks++;
    if (n_pos == 0)       fail("no positive output");
    checks++;
    if (n_signplane == 0) fail("no negative sample taken");
    $display("mechanisms: takes=%0d clears=%0d outputs=%0d neg=%0d pos=%0d signplane=%0d",
             n_take, n_clear, n_out, n_neg, n_pos, n_signplane);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
