// tb_da_mac: shift-right accumulator. Feeds frames of 16 random 15-bit
// words m_0 .. m_15 (clr with m_0) and, one clock after the last word,
// compares acc with sum_k m_k * 2^k. Includes frames of all-maximum words
// and of zeros. A sum needs exactly 16 clocks.
module tb_da_mac;
  localparam int IN_W = 15, W = 16, ACC_W = 30;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [IN_W-1:0]  m = '0;
  logic [ACC_W-1:0] acc;
  int checks = 0, failures = 0;

  da_mac #(.IN_W(IN_W), .W(W), .ACC_W(ACC_W)) dut (.clk, .rst_n, .clr, .m, .acc);

  always #5 clk = ~clk;

  initial begin
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int f = 0; f < 300; f++) begin
      automatic longint sum = 0;
      for (int k = 0; k < W; k++) begin
        clr = (k == 0);
        // Frame 0 uses 2^14-1 (the largest word the filter's range rule
        // allows), frame 1 zeros, later frames random.
        m = (f == 0) ? IN_W'((1 << 14) - 1) : (f == 1) ? '0 : IN_W'($urandom_range(0, (1 << 14) - 1));
        sum += longint'(m) << k;
        @(posedge clk);
        #1;
      end
      checks++;
      if (longint'(acc) != sum) begin
        failures++;
        if (failures < 10) $display("FAIL: frame %0d acc=%0d want %0d", f, acc, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
