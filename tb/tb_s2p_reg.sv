// tb_s2p_reg: bit-plane shift register. Checks the reset value, then shifts
// random bits under a random enable and compares every clock with a model
// kept as an array of the last N accepted bits (tap 0 newest).
module tb_s2p_reg;
  localparam int N = 48;
  logic clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0, d_in = 1'b0;
  logic [N-1:0] q;
  logic [N-1:0] model;
  int checks = 0, failures = 0, shifts = 0;

  s2p_reg #(.N(N), .RST_BIT(1'b1)) dut (.clk, .rst_n, .shift_en, .d_in, .q);

  always #5 clk = ~clk;

  initial begin
    model = '1;
    @(posedge clk);
    @(posedge clk);
    #1;
    checks++;
    if (q != '1) begin failures++; $display("FAIL: reset value %h", q); end
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      shift_en = ($urandom_range(0, 3) == 0);
      d_in     = 1'($urandom);
      @(posedge clk);
      if (shift_en) begin
        for (int i = N - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = d_in;
        shifts++;
      end
      #1;
      checks++;
      if (q != model) begin
        failures++;
        if (failures < 10) $display("FAIL: t=%0d q=%h model=%h", t, q, model);
      end
    end
    checks++;
    if (shifts < 100) begin failures++; $display("FAIL: too few shifts"); end
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
