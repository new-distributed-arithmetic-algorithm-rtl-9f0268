// lut48_prop: the 2^48-word lookup table of the 48-tap filter, built by
// table decomposition.
//
// The 48 digit codes of one bit plane are split into four datasets of twelve
// (taps 12g..12g+11), each served by a 2^12-word table. Their outputs are
// summed by three adders in a chain, as in the published block diagram:
//   word = ((L0 + L1) + L2) + L3
// The carry inputs are zero because every word is a nonnegative magnitude.
// OUT_W = 15 is derived from the 30-bit MAC register (30 - 15 shifts).
// Combinational.
module lut48_prop
  import da_pkg::*;
#(
  parameter coef_set_t COEF  = DEFAULT_COEF,
  parameter int        OUT_W = LUT48_W
) (
  input  logic [N_TAPS-1:0] addr,
  output logic [OUT_W-1:0]  word
);
  logic [3:0][LUT12_W-1:0] l;
  logic [OUT_W-1:0]        s1, s2;

  for (genvar g = 0; g < 4; g++) begin : g_lut
    lut4k_prop #(.COEF(COEF[12*g +: 12]), .OUT_W(LUT12_W)) u_lut (
      .addr(addr[12*g +: 12]),
      .word(l[g])
    );
  end

  always_comb begin
    s1   = OUT_W'(l[0]) + OUT_W'(l[1]);
    s2   = s1 + OUT_W'(l[2]);
    word = s2 + OUT_W'(l[3]);
  end
endmodule
