// tb_hex_digit_to_7seg: every input value against the set of values that
// light each segment (a..g, active low outputs).
module tb_hex_digit_to_7seg;
  logic [3:0] digit;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;

  hex_digit_to_7seg dut (.*);

  // Bit v of lit[s] is set when segment s is on for value v.
  localparam logic [15:0] LIT [7] = '{
    16'b1101_0111_1110_1101,  // a: 0 2 3 5 6 7 8 9 A C E F
    16'b0010_0111_1001_1111,  // b: 0 1 2 3 4 7 8 9 A D
    16'b0010_1111_1111_1011,  // c: 0 1 3 4 5 6 7 8 9 A B D
    16'b0111_1011_0110_1101,  // d: 0 2 3 5 6 8 9 B C D E
    16'b1111_1101_0100_0101,  // e: 0 2 6 8 A B C D E F
    16'b1101_1111_0111_0001,  // f: 0 4 5 6 8 9 A B C E F
    16'b1110_1111_0111_1100   // g: 2 3 4 5 6 8 9 A B D E F
  };

  initial begin
    for (int v = 0; v < 16; v++) begin
      digit = 4'(v);
      #1;
      for (int s = 0; s < 7; s++) begin
        checks++;
        if (seg_n[s] !== !LIT[s][v]) begin
          failures++;
          $display("FAIL value %0d segment %0d", v, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
