// tb_lut_toggle: switching activity of the 2^3-word table outputs.
//
// Runs 10000 random zero-mean 16-bit samples through the full filter and
// counts, for each of the 13 output bits, how often it changes from one
// bit-plane clock to the next, averaged over all sixteen 2^3-word tables
// (transitions per clock). Because the tables hold only nonnegative
// magnitudes, the upper bits, which a two's complement table would toggle
// on every sign change, stay mostly quiet. The test checks that the average
// rate of the top four bits is below half of that of the low seven bits and
// that every output of the filter matches a direct convolution.
module tb_lut_toggle;
  import da_pkg::*;

  localparam int N_SMP = 10000;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic signed [W-1:0]   x = '0;
  logic                  x_take;
  logic signed [Y_W-1:0] y;
  logic                  y_valid;

  int checks = 0, failures = 0;
  int hist [N_TAPS];
  longint exp_q [$];
  int taken = 0, outs = 0;
  longint toggles [LUT3_W];
  longint clocks = 0;
  logic [15:0][LUT3_W-1:0] words, prev_words;

  da_fir48_prop dut (.clk, .rst_n, .x, .x_take, .y, .y_valid);

  for (genvar g = 0; g < 4; g++) begin : g_g
    for (genvar t = 0; t < 4; t++) begin : g_t
      assign words[4*g + t] = dut.u_lut.g_lut[g].u_lut.g_lut[t].u_lut.word;
    end
  end

  always #5 clk = ~clk;

  function automatic longint conv();
    longint s = 0;
    for (int i = 0; i < N_TAPS; i++) s += longint'(int'(signed'(DEFAULT_COEF[i]))) * hist[i];
    return s;
  endfunction

  initial begin
    for (int i = 0; i < N_TAPS; i++) hist[i] = 0;
    for (int b = 0; b < LUT3_W; b++) toggles[b] = 0;
    x = W'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (taken > 0) begin
        clocks++;
        for (int l = 0; l < 16; l++)
          for (int b = 0; b < LUT3_W; b++)
            if (words[l][b] != prev_words[l][b]) toggles[b]++;
      end
      prev_words <= words;
      if (x_take) begin
        for (int i = N_TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = int'(x);
        exp_q.push_back(conv());
        taken++;
        x <= W'($urandom);
      end
      if (y_valid) begin
        longint e;
        e = exp_q.pop_front();
        outs++;
        checks++;
        if (longint'(y) != e) begin
          failures++;
          if (failures < 10) $display("FAIL: output %0d y=%0d expected %0d", outs, y, e);
        end
        if (outs == N_SMP) report();
      end
    end
  end

  task automatic report();
    real lo, hi;
    lo = 0.0;
    hi = 0.0;
    for (int b = 0; b < LUT3_W; b++) begin
      real r;
      r = real'(toggles[b]) / (16.0 * real'(clocks));
      $display("bit %0d: average transition rate %0.3f", b + 1, r);
      if (b < 7) lo += r / 7.0;
      if (b >= LUT3_W - 4) hi += r / 4.0;
    end
    checks++;
    if (!(hi < lo / 2.0)) begin
      failures++;
      $display("FAIL: upper bits toggle %0.3f, lower bits %0.3f", hi, lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat ((N_SMP + 10) * W + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
