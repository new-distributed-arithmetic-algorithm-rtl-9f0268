// tb_lut48_prop: 2^48-word table with the default coefficients. Checks the
// all-+1 and all--1 addresses, one-hot addresses for every tap, and 5000
// random addresses against (sum|c| - sum c*d) / 2 computed from the digits.
module tb_lut48_prop;
  import da_pkg::*;

  logic [N_TAPS-1:0] addr;
  logic [LUT48_W-1:0] word;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  lut48_prop dut (.addr, .word);

  always #5 clk = ~clk;

  task automatic check_addr(logic [N_TAPS-1:0] a);
    int sa = 0, sd = 0;
    addr = a;
    #1;
    for (int k = 0; k < N_TAPS; k++) begin
      automatic int cv = int'(signed'(DEFAULT_COEF[k]));
      sa += (cv < 0) ? -cv : cv;
      sd += a[k] ? -cv : cv;
    end
    checks++;
    if (int'(word) != (sa - sd) / 2) begin
      failures++;
      if (failures < 10) $display("FAIL: addr %h got %0d want %0d", a, word, (sa - sd) / 2);
    end
  endtask

  initial begin
    check_addr('0);
    check_addr('1);
    for (int k = 0; k < N_TAPS; k++) begin
      check_addr(N_TAPS'(1) << k);
      check_addr(~(N_TAPS'(1) << k));
    end
    for (int r = 0; r < 5000; r++) check_addr({16'($urandom), 32'($urandom)});
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
