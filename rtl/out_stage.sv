// out_stage: final subtraction of the nonnegative DA algorithm (region 'A'
// of the published block diagram: gain -1 and constant K_prop).
//
// When load is high the completed MAC sum is turned into the filter output,
//   y <= K - acc,
// and y_valid is high for the following clock. This is the only place in the
// filter where a signed (two's complement) value appears. K is the constant
// da_pkg::k_prop() of the coefficient set. Registering y is this design's
// choice. Synchronous active-low reset clears y and y_valid.
module out_stage #(
  parameter int                   ACC_W = 30,
  parameter int                   Y_W   = ACC_W + 1,
  parameter logic signed [Y_W-1:0] K    = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [ACC_W-1:0]      acc,
  output logic signed [Y_W-1:0] y,
  output logic                  y_valid
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= load;
      if (load) y <= K - signed'(Y_W'(acc));
    end
  end
endmodule
