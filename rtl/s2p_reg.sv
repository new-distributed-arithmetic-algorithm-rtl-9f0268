// s2p_reg: one bit-plane shift register of the DA FIR filter (s2p_reg48_j).
//
// Holds the digit code of one bit position j for the N most recent samples:
// q[i] belongs to tap i, so q[0] is the newest sample and q[N-1] the oldest.
// On each clock edge with shift_en high (the sample clock, Clk1, of the
// published design, given here as an enable of the fast clock) the register
// shifts towards higher taps and takes d_in into q[0]. Synchronous active-low
// reset loads RST_BIT into every stage; the filter uses the code of a zero
// sample so that it starts from an all-zero history (a choice of this design).
module s2p_reg #(
  parameter int   N       = 48,
  parameter logic RST_BIT = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_en,
  input  logic         d_in,
  output logic [N-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)        q <= {N{RST_BIT}};
    else if (shift_en) q <= {q[N-2:0], d_in};
  end
endmodule
