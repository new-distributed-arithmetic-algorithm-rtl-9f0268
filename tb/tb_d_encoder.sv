// tb_d_encoder: exhaustive test of the digit recoder over all 2^16 samples.
// For every sample it checks each code bit against the recoding rule
// (d_j = x_j - not x_j, negated for the sign bit; code 1 means d = -1) and
// checks the offset-binary identity x = (sum_j d_j 2^j - 1) / 2.
module tb_d_encoder;
  localparam int W = 16;
  logic [W-1:0] x, code;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  d_encoder #(.W(W)) dut (.x, .code);

  always #5 clk = ~clk;

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      automatic longint sum = 0;
      automatic bit ok = 1'b1;
      x = W'(v);
      #1;
      for (int j = 0; j < W; j++) begin
        automatic int d = (x[j] ? 1 : 0) - (x[j] ? 0 : 1);
        if (j == W - 1) d = -d;
        if (code[j] != (d == -1)) ok = 1'b0;
        sum += longint'(d) << j;
      end
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL: x=%h code=%h", x, code);
      end
      // Identity uses the digits the block produced.
      sum = 0;
      for (int j = 0; j < W; j++) sum += (code[j] ? -1 : 1) * (longint'(1) << j);
      checks++;
      if ((sum - 1) / 2 != longint'(signed'(x))) begin
        failures++;
        if (failures < 10) $display("FAIL: identity x=%0d sum=%0d", signed'(x), sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
