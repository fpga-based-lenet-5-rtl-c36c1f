// lenet_mac_array: the reusable multiply-accumulate datapath shared by the
// convolution and fully connected layers.
//
// Purely combinational. Lane l multiplies a signed 16-bit activation by a
// signed int8 weight; the products of the lanes whose valid_mask bit is set
// are summed into one signed 32-bit partial sum. The controller registers
// that sum (ACCUM state) and adds it to its accumulator (ADD state), so one
// group of LANES terms is consumed every three clocks. valid_mask removes
// the padding lanes of the last group when the term count is not a multiple
// of LANES (25 for conv1, 400 for fc1).
module lenet_mac_array
  import lenet_pkg::*;
#(
  parameter int unsigned LANES = 3
) (
  input  logic [LANES*ACT_W-1:0] activations_flat,
  input  logic [LANES*W_W-1:0]   weights_flat,
  input  logic [LANES-1:0]       valid_mask,
  output logic signed [ACC_W-1:0] partial_sum
);

  always_comb begin
    logic signed [ACC_W-1:0] sum;
    sum = '0;
    for (int l = 0; l < LANES; l++) begin
      logic signed [ACT_W-1:0] a;
      logic signed [W_W-1:0]   w;
      a = signed'(activations_flat[l*ACT_W +: ACT_W]);
      w = signed'(weights_flat[l*W_W +: W_W]);
      if (valid_mask[l]) sum = sum + ACC_W'(a * w);
    end
    partial_sum = sum;
  end

endmodule
