// da_mac: shift-right multiply-and-accumulate block of the DA FIR filter.
//
// Over W clocks it forms sum_k m_k * 2^k from the table words m_k of bit
// planes k = 0 .. W-1, least significant plane first. Each clock the new word
// enters at the top of the register (weight 2^(W-1)) and the previous sum is
// shifted right by one place:
//   acc <= (clr ? 0 : acc >> 1) + (m << (W-1))
// After the W-th word, acc holds the exact sum with no bit lost, because the
// register has IN_W + W - 1 = ACC_W bits. The words are nonnegative, so the
// shift is a logical shift and needs no sign extension. clr is asserted with
// the first plane of every output (it clears the feedback, not the register,
// as in the published diagram). Synchronous active-low reset clears acc.
module da_mac #(
  parameter int IN_W  = 15,
  parameter int W     = 16,
  parameter int ACC_W = IN_W + W - 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic [IN_W-1:0]  m,
  output logic [ACC_W-1:0] acc
);
  logic [ACC_W-1:0] fb;

  always_comb fb = clr ? '0 : (acc >> 1);

  always_ff @(posedge clk) begin
    if (!rst_n) acc <= '0;
    else        acc <= fb + (ACC_W'(m) << (W - 1));
  end
endmodule
