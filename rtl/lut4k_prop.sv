// lut4k_prop: 2^12-word lookup table of the nonnegative DA algorithm.
//
// Serves twelve taps, COEF[0..11], addressed by their twelve digit codes.
// As in the published design it is decomposed into four 2^3-word tables
// (taps 3t..3t+2 on addr[3t+2:3t]) and three adders in a two-level tree:
//   word = (T0 + T1) + (T2 + T3)
// All values are unsigned magnitudes, so the adders have no sign extension
// and their carry inputs are zero. Every adder is OUT_W = 13 bits wide, as in
// the published figure; a coefficient set must keep its 12-tap magnitude sum
// below 2^13 (da_pkg::coef_set_fits). Combinational.
module lut4k_prop
  import da_pkg::*;
#(
  parameter logic [11:0][C_W-1:0] COEF  = '0,
  parameter int                   OUT_W = LUT12_W
) (
  input  logic [11:0]      addr,
  output logic [OUT_W-1:0] word
);
  logic [3:0][LUT3_W-1:0] t;
  logic [OUT_W-1:0]       s01, s23;

  for (genvar g = 0; g < 4; g++) begin : g_lut
    lut8_prop #(.COEF(COEF[3*g +: 3]), .OUT_W(LUT3_W)) u_lut (
      .addr(addr[3*g +: 3]),
      .word(t[g])
    );
  end

  always_comb begin
    s01  = OUT_W'(t[0]) + OUT_W'(t[1]);
    s23  = OUT_W'(t[2]) + OUT_W'(t[3]);
    word = s01 + s23;
  end
endmodule
