// lut8_prop: 2^3-word lookup table of the nonnegative DA algorithm.
//
// Serves three filter taps with coefficients COEF[0..2]. addr[k] is the digit
// code of tap k (1 for d = -1). The word stored at addr is
//   sum_k |c_k| * u_k,  u_k = 1 when sign(c_k) * d_k = -1,
// so the sign of each coefficient is folded into the table contents and no
// word is ever negative (no sign extension and no negation downstream). The
// table is computed at elaboration from the coefficients and read
// combinationally. OUT_W = 13 follows the published design.
module lut8_prop
  import da_pkg::*;
#(
  parameter logic [2:0][C_W-1:0] COEF  = '0,
  parameter int                  OUT_W = LUT3_W
) (
  input  logic [2:0]       addr,
  output logic [OUT_W-1:0] word
);
  typedef logic [7:0][OUT_W-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int a = 0; a < 8; a++) t[a] = OUT_W'(lut3_word(COEF, 3'(a)));
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_comb word = TABLE[addr];
endmodule
