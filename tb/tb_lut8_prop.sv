// tb_lut8_prop: 2^3-word nonnegative table. Three instances: the two-tap
// example y = -x1 + 2*x2 (third tap 0), whose words must be 1, 3, 0, 2 for
// (d1,d2) = (1,1), (1,-1), (-1,1), (-1,-1); a set with the extreme
// coefficients -2048 and 2047; and a random set. Every word is compared with
// (sum|c| - sum c*d) / 2, worked out from the digits, and must be >= 0.
module tb_lut8_prop;
  import da_pkg::*;
  localparam logic [2:0][C_W-1:0] CA = {12'sd0, 12'sd2, -12'sd1};
  localparam logic [2:0][C_W-1:0] CB = {-12'sd2048, 12'sd2047, -12'sd2048};
  localparam logic [2:0][C_W-1:0] CC = {-12'sd469, 12'sd173, -12'sd5};

  logic [2:0] addr;
  logic [LUT3_W-1:0] wa, wb, wc;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  lut8_prop #(.COEF(CA)) u_a (.addr, .word(wa));
  lut8_prop #(.COEF(CB)) u_b (.addr, .word(wb));
  lut8_prop #(.COEF(CC)) u_c (.addr, .word(wc));

  always #5 clk = ~clk;

  function automatic int ref_word(logic [2:0][C_W-1:0] c, logic [2:0] a);
    int sa = 0, sd = 0;
    for (int k = 0; k < 3; k++) begin
      automatic int cv = int'(signed'(c[k]));
      sa += (cv < 0) ? -cv : cv;
      sd += a[k] ? -cv : cv;
    end
    return (sa - sd) / 2;
  endfunction

  task automatic check(int got, int want, string what);
    checks++;
    if (got != want || got < 0) begin
      failures++;
      $display("FAIL: %s got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    for (int a = 0; a < 8; a++) begin
      addr = 3'(a);
      #1;
      check(int'(wa), ref_word(CA, addr), $sformatf("A addr %0d", a));
      check(int'(wb), ref_word(CB, addr), $sformatf("B addr %0d", a));
      check(int'(wc), ref_word(CC, addr), $sformatf("C addr %0d", a));
    end
    // The worked two-tap example (code 1 means d = -1).
    addr = 3'b000; #1; check(int'(wa), 1, "example (1,1)");
    addr = 3'b010; #1; check(int'(wa), 3, "example (1,-1)");
    addr = 3'b001; #1; check(int'(wa), 0, "example (-1,1)");
    addr = 3'b011; #1; check(int'(wa), 2, "example (-1,-1)");
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
