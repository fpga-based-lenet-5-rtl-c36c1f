// hex_digit_to_7seg: seven-segment decoder for the predicted digit.
//
// Combinational. Maps a 4-bit value to the segments of one display digit,
// seg_n[0] = segment a through seg_n[6] = segment g, active low as on the
// common-anode displays of the DE1-SoC board. Values 10..15 show A..F.
module hex_digit_to_7seg (
  input  logic [3:0] digit,
  output logic [6:0] seg_n
);

  logic [6:0] seg;  // active high, bit 0 = a

  always_comb begin
    unique case (digit)
      4'h0: seg = 7'b011_1111;
      4'h1: seg = 7'b000_0110;
      4'h2: seg = 7'b101_1011;
      4'h3: seg = 7'b100_1111;
      4'h4: seg = 7'b110_0110;
      4'h5: seg = 7'b110_1101;
      4'h6: seg = 7'b111_1101;
      4'h7: seg = 7'b000_0111;
      4'h8: seg = 7'b111_1111;
      4'h9: seg = 7'b110_1111;
      4'hA: seg = 7'b111_0111;
      4'hB: seg = 7'b111_1100;
      4'hC: seg = 7'b011_1001;
      4'hD: seg = 7'b101_1110;
      4'hE: seg = 7'b111_1001;
      default: seg = 7'b111_0001;
    endcase
    seg_n = ~seg;
  end

endmodule
