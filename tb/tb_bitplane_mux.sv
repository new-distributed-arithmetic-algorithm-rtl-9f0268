// tb_bitplane_mux: 48-bit 16-to-1 bit-plane multiplexer. Loads random planes
// and checks every select value against the addressed plane, bit by bit.
module tb_bitplane_mux;
  localparam int N = 48, W = 16;
  logic [W-1:0][N-1:0] planes;
  logic [3:0]          sel;
  logic [N-1:0]        y;
  logic                clk = 1'b0;
  int checks = 0, failures = 0;

  bitplane_mux #(.N(N), .W(W)) dut (.planes, .sel, .y);

  always #5 clk = ~clk;

  initial begin
    for (int r = 0; r < 50; r++) begin
      for (int j = 0; j < W; j++) planes[j] = {16'($urandom), 32'($urandom)};
      for (int s = 0; s < W; s++) begin
        sel = 4'(s);
        #1;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (y[i] != planes[s][i]) begin
            failures++;
            if (failures < 10) $display("FAIL: sel=%0d bit %0d", s, i);
          end
        end
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
