// tb_bit_counter: 4-bit bit-plane counter. After reset it must read 0 and
// then count by one each clock, wrapping after 15; first must be high exactly
// at 0 and last exactly at 15, so last recurs every 16 clocks.
module tb_bit_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] cnt;
  logic first, last;
  int checks = 0, failures = 0;
  int expect_cnt;
  int last_seen = -1, lasts = 0;

  bit_counter #(.CNT_W(4)) dut (.clk, .rst_n, .cnt, .first, .last);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    @(posedge clk);
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    expect_cnt = 0;
    for (int t = 0; t < 200; t++) begin
      check(cnt == 4'(expect_cnt), $sformatf("t=%0d cnt=%0d expected %0d", t, cnt, expect_cnt));
      check(first == (expect_cnt == 0), "first decode");
      check(last == (expect_cnt == 15), "last decode");
      if (last) begin
        if (last_seen >= 0) check(t - last_seen == 16, "last spacing");
        last_seen = t;
        lasts++;
      end
      @(posedge clk);
      #1;
      expect_cnt = (expect_cnt + 1) % 16;
    end
    check(lasts >= 12, "last seen often enough");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
