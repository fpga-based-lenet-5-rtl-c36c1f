// lenet_argmax: index of the largest of N signed logits.
//
// Combinational linear scan over the N signed ACC_W-bit logits packed in
// logits_flat (logit i in bits [32i+31:32i]). On a tie the lower index wins.
// The core registers the result in its ARGMAX state.
module lenet_argmax
  import lenet_pkg::*;
#(
  parameter int unsigned N = 10,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N*ACC_W-1:0] logits_flat,
  output logic [IW-1:0]      digit
);

  always_comb begin
    logic signed [ACC_W-1:0] best;
    best  = signed'(logits_flat[ACC_W-1:0]);
    digit = '0;
    for (int i = 1; i < N; i++) begin
      if (signed'(logits_flat[i*ACC_W +: ACC_W]) > best) begin
        best  = signed'(logits_flat[i*ACC_W +: ACC_W]);
        digit = IW'(i);
      end
    end
  end

endmodule
