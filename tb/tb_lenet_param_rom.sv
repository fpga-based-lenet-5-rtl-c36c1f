// tb_lenet_param_rom: checks the packed layout of the parameter ROM.
// Reads every word of the conv1 (6 filters x 25 taps) ROM and compares the
// three lanes with weights and biases worked out here from the documented
// packing: ceil(25/3) = 9 weight words per filter, zero padding in the two
// unused lanes of word 8, then one bias word. The value formula is
// re-derived here from its description (multiplicative hash).
module tb_lenet_param_rom;
  localparam int unsigned LAYER = 0, TERMS = 25, OUTS = 6;
  localparam int unsigned WPO = 10, DEPTH = 60, AW = $clog2(DEPTH);
  logic clk = 0, r_en = 0;
  logic [AW-1:0] r_addr = '0;
  logic [23:0] r_data;
  int checks = 0, failures = 0;

  lenet_param_rom #(.LAYER(LAYER), .TERMS(TERMS), .OUTS(OUTS)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_value(int unsigned rom, int unsigned idx);
    logic [31:0] h;
    h = (idx + 1) * 32'd2654435761;
    h = h ^ ((rom + 1) * 32'd2246822519);
    h = h ^ (h >> 15);
    h = h * 32'd739982445;
    h = h ^ (h >> 12);
    return 8'($signed(h[7:0]) >>> 1);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nonzero = 0;
    for (int a = 0; a < DEPTH; a++) begin
      logic [23:0] exp;
      int o, j;
      o = a / WPO;
      j = a % WPO;
      exp = '0;
      if (j == WPO - 1) exp[7:0] = ref_value(LAYER, OUTS * TERMS + o);
      else for (int l = 0; l < 3; l++)
        if (3 * j + l < TERMS) exp[8*l +: 8] = ref_value(LAYER, o * TERMS + 3 * j + l);
      @(negedge clk); r_en = 1; r_addr = AW'(a);
      @(negedge clk); r_en = 0;
      checks++;
      if (r_data !== exp) begin
        failures++;
        $display("FAIL word %0d: got %h expected %h", a, r_data, exp);
      end
      if (r_data != 0) nonzero++;
    end
    checks++;
    if (nonzero < DEPTH / 2) begin
      failures++;
      $display("FAIL too few nonzero words (%0d)", nonzero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
