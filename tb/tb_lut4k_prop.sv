// tb_lut4k_prop: 2^12-word table. Uses taps 12..23 of the default set (the
// group with the largest magnitudes) and checks all 4096 addresses against
// (sum|c| - sum c*d) / 2 computed from the digits.
module tb_lut4k_prop;
  import da_pkg::*;
  localparam logic [11:0][C_W-1:0] C = DEFAULT_COEF[12 +: 12];

  logic [11:0] addr;
  logic [LUT12_W-1:0] word;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  lut4k_prop #(.COEF(C)) dut (.addr, .word);

  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < 4096; a++) begin
      automatic int sa = 0, sd = 0;
      addr = 12'(a);
      #1;
      for (int k = 0; k < 12; k++) begin
        automatic int cv = int'(signed'(C[k]));
        sa += (cv < 0) ? -cv : cv;
        sd += addr[k] ? -cv : cv;
      end
      checks++;
      if (int'(word) != (sa - sd) / 2) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %h got %0d want %0d", addr, word, (sa - sd) / 2);
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
