// d_encoder: recodes the bits of a two's complement sample into the
// offset-binary digits d_{i,j} in {-1,+1} used by the DA filter.
//
// Following the offset-binary rule, d_j = x_j - not(x_j) for the magnitude
// bits and d_{W-1} = -(x_{W-1} - not(x_{W-1})) for the sign bit. Each digit is
// stored as one bit, 0 for +1 and 1 for -1, as in the published design, so
// the magnitude bits pass through an inverter and the sign bit passes
// unchanged. Purely combinational; the code of sample value 0 is
// {1'b0, {W-1{1'b1}}}.
module d_encoder #(
  parameter int W = 16
) (
  input  logic [W-1:0] x,     // two's complement sample
  output logic [W-1:0] code   // code[j] = 1 when d_j = -1
);
  always_comb begin
    code        = ~x;
    code[W-1]   = x[W-1];
  end
endmodule
