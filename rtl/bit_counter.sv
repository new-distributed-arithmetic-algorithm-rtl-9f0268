// bit_counter: the bit-plane counter of the DA FIR filter, clocked by the
// fast clock (Clk16).
//
// Counts 0, 1, ..., 2^CNT_W - 1 and wraps, one step per clock; synchronous
// active-low reset to 0. cnt selects the bit plane, least significant first.
// Two decodes of the count drive the rest of the filter (their form is this
// design's choice; the source shows only that the counter value reaches the
// MAC clear logic):
//   first : cnt == 0, the MAC discards its feedback and starts a new sum
//   last  : cnt == max, the final plane; the sample shift registers advance
//           on the same edge, so this is the slow sample clock as an enable.
module bit_counter #(
  parameter int CNT_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [CNT_W-1:0] cnt,
  output logic             first,
  output logic             last
);
  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  always_comb begin
    first = (cnt == '0);
    last  = (cnt == '1);
  end
endmodule
