// lenet_quantize: requantization of an accumulator to a stored activation.
//
// Combinational. The int8 bias is sign-extended and added to the 32-bit
// accumulator, the sum is shifted right arithmetically by shift_right (one
// fixed shift per layer), negative results are clamped to zero (ReLU) and
// results above the largest positive OUT_W-bit value saturate there. The
// output is therefore always in 0 .. 2**(OUT_W-1)-1 and fits the 16-bit
// feature-map words.
module lenet_quantize #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned OUT_W = 16
) (
  input  logic signed [IN_W-1:0]  value_in,
  input  logic signed [7:0]       bias_in,
  input  logic [4:0]              shift_right,
  output logic [OUT_W-1:0]        value_out
);

  localparam logic signed [IN_W:0] MAX_OUT = (IN_W+1)'((64'd1 << (OUT_W - 1)) - 1);

  logic signed [IN_W:0] biased;
  logic signed [IN_W:0] shifted;

  always_comb begin
    biased  = (IN_W+1)'(value_in) + (IN_W+1)'(bias_in);
    shifted = biased >>> shift_right;
    if (shifted < 0)
      value_out = '0;
    else if (shifted > MAX_OUT)
      value_out = OUT_W'(MAX_OUT);
    else
      value_out = OUT_W'(shifted);
  end

endmodule
