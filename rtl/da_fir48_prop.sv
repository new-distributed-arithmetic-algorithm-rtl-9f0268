// da_fir48_prop: 48-tap lowpass FIR filter using distributed arithmetic with
// nonnegative lookup tables.
//
// Dataflow (one output per W = 16 fast clocks):
//   x --d_encoder--> 16 bit-plane shift registers (48 taps each)
//     --16:1 bit-plane mux (4-bit counter)--> 2^48-word table
//     (4 x 2^12-word tables, each 4 x 2^3-word tables)
//     --> shift-right MAC (30 bits) --> y = K_prop - MAC
// Every table word and the MAC contents are unsigned magnitudes; only the
// final subtraction is signed.
//
// Clocking: clk is the bit clock (Clk16). The published design also has a
// sample clock Clk1 at 1/16 of it; here it is the enable x_take, high in the
// last clock of each 16-clock frame, which is this design's choice.
//
// Interface and timing:
//   x       sample input, two's complement. It is taken on the rising edge of
//           clk where x_take is high (once every 16 clocks).
//   y       Y = sum_{i=0}^{47} COEF[i] * x[n-i], integer units, where x[n] is
//           the sample taken at the start of the frame. y_valid pulses for one
//           clock 17 clocks after that sample was taken, and y then holds
//           until the next output. The frame running when reset is released
//           belongs to no sample and gives no output, so every y_valid pulse
//           matches exactly one taken sample.
//   rst_n   synchronous, active low; clears the sample history to zero.
// COEF must satisfy da_pkg::coef_set_fits(); an assertion checks it.
module da_fir48_prop
  import da_pkg::*;
#(
  parameter coef_set_t COEF = DEFAULT_COEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [W-1:0]   x,
  output logic                  x_take,
  output logic signed [Y_W-1:0] y,
  output logic                  y_valid
);
  localparam logic signed [Y_W-1:0] K_PROP = Y_W'(k_prop(COEF));

  logic [W-1:0]       code;
  plane_set_t         planes;
  logic [CNT_W-1:0]   cnt;
  logic               first, last;
  logic [N_TAPS-1:0]  plane;
  logic [LUT48_W-1:0] word;
  logic [ACC_W-1:0]   acc;
  logic               have_sample;  // at least one sample has been taken
  logic               primed;       // the frame now ending began after a take

  initial assert (coef_set_fits(COEF))
    else $error("da_fir48_prop: coefficient magnitudes exceed the table widths");

  bit_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .cnt, .first, .last
  );

  assign x_take = last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have_sample <= 1'b0;
      primed      <= 1'b0;
    end else if (last) begin
      have_sample <= 1'b1;
      primed      <= have_sample;
    end
  end

  d_encoder #(.W(W)) u_enc (.x(x), .code(code));

  for (genvar j = 0; j < W; j++) begin : g_s2p
    // Reset value: the code of a zero sample (sign digit +1, others -1).
    s2p_reg #(.N(N_TAPS), .RST_BIT(j != W - 1)) u_s2p (
      .clk, .rst_n, .shift_en(x_take), .d_in(code[j]), .q(planes[j])
    );
  end

  bitplane_mux #(.N(N_TAPS), .W(W)) u_mux (
    .planes(planes), .sel(cnt), .y(plane)
  );

  lut48_prop #(.COEF(COEF), .OUT_W(LUT48_W)) u_lut (
    .addr(plane), .word(word)
  );

  da_mac #(.IN_W(LUT48_W), .W(W), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n, .clr(first), .m(word), .acc(acc)
  );

  out_stage #(.ACC_W(ACC_W), .Y_W(Y_W), .K(K_PROP)) u_out (
    .clk, .rst_n, .load(first && primed), .acc(acc), .y(y), .y_valid(y_valid)
  );
endmodule
