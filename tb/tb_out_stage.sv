// tb_out_stage: final subtraction. With K = K_PROP of the default set it
// loads random accumulator values and checks y = K - acc one clock later,
// that y_valid follows load by one clock, and that y holds without load.
module tb_out_stage;
  import da_pkg::*;
  localparam logic signed [Y_W-1:0] K = Y_W'(k_prop(DEFAULT_COEF));

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [ACC_W-1:0] acc = '0;
  logic signed [Y_W-1:0] y;
  logic y_valid;
  int checks = 0, failures = 0;
  longint want = 0;

  out_stage #(.ACC_W(ACC_W), .Y_W(Y_W), .K(K)) dut (.clk, .rst_n, .load, .acc, .y, .y_valid);

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
    #1;
    rst_n = 1'b1;
    check(k_prop(DEFAULT_COEF) == 232647304, "K_PROP of the default set");
    for (int t = 0; t < 500; t++) begin
      load = 1'($urandom);
      acc  = ACC_W'($urandom);
      if (load) want = k_prop(DEFAULT_COEF) - longint'(acc);
      @(posedge clk);
      #1;
      check(y_valid == load, "y_valid timing");
      check(longint'(y) == want, $sformatf("y=%0d want %0d", y, want));
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
