// lenet_param_rom: packed int8 parameter ROM of one layer.
//
// Each word is 24 bits wide and carries MAC_LANES = 3 int8 values, lane l in
// bits [8l+7:8l], so one read feeds all three MAC lanes. For every output
// (filter or neuron) o the ROM holds ceil(TERMS/3) weight words, weight t of
// o in word o*WPO + t/3 at lane t%3 (unused lanes of the last word are zero),
// followed by one bias word with the bias in lane 0. WPO = ceil(TERMS/3)+1,
// which gives the depths 60, 816, 16200, 3444 and 290 of the five layers.
// Reads have one clock of latency. The values come from lenet_pkg::param_value.
module lenet_param_rom
  import lenet_pkg::*;
#(
  parameter int unsigned LAYER = 0,
  parameter int unsigned TERMS = 25,
  parameter int unsigned OUTS  = 6,
  localparam int unsigned WPO   = (TERMS + MAC_LANES - 1) / MAC_LANES + 1,
  localparam int unsigned DEPTH = OUTS * WPO,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             r_en,
  input  logic [AW-1:0]    r_addr,
  output logic [ROM_W-1:0] r_data
);

  logic [ROM_W-1:0] rom [DEPTH];

  initial begin
    for (int o = 0; o < OUTS; o++) begin
      for (int j = 0; j < WPO; j++) begin
        logic [ROM_W-1:0] word;
        word = '0;
        if (j == WPO - 1) begin
          word[W_W-1:0] = param_value(LAYER, OUTS * TERMS + o);
        end else begin
          for (int l = 0; l < MAC_LANES; l++) begin
            if (j * MAC_LANES + l < TERMS)
              word[l*W_W +: W_W] = param_value(LAYER, o * TERMS + j * MAC_LANES + l);
          end
        end
        rom[o * WPO + j] = word;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (r_en) r_data <= rom[r_addr];
  end

endmodule
