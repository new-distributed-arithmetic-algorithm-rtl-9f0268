// bitplane_mux: the N-bit W-to-1 multiplexer of the DA FIR filter.
//
// Presents bit plane sel (the digit codes of bit position sel for all N taps)
// to the lookup table. Combinational. With W = 16 and N = 48 it is the
// 48-bit 16x1 MUX of the published block diagram.
module bitplane_mux #(
  parameter int N = 48,
  parameter int W = 16
) (
  input  logic [W-1:0][N-1:0]   planes,
  input  logic [$clog2(W)-1:0]  sel,
  output logic [N-1:0]          y
);
  always_comb y = planes[sel];
endmodule
