// tb_lenet_quantize: bias add, arithmetic shift, ReLU and 16-bit saturation.
// Covers negative results (ReLU to 0), results above 32767 (saturation)
// and random values in between.
module tb_lenet_quantize;
  logic signed [31:0] value_in;
  logic signed [7:0]  bias_in;
  logic [4:0]         shift_right;
  logic [15:0]        value_out;
  int checks = 0, failures = 0, n_relu = 0, n_sat = 0;

  lenet_quantize #(.IN_W(32), .OUT_W(16)) dut (.*);

  task automatic run_one();
    longint s, e;
    #1;
    s = (longint'(value_in) + longint'(bias_in));
    s = s >>> shift_right;      // floor division by 2**shift
    if (s < 0) begin e = 0; n_relu++; end
    else if (s > 32767) begin e = 32767; n_sat++; end
    else e = s;
    checks++;
    if (longint'(value_out) != e) begin
      failures++;
      $display("FAIL in=%0d bias=%0d sh=%0d got %0d expected %0d",
               value_in, bias_in, shift_right, value_out, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    value_in = 32'sh7FFF_FFFF; bias_in = 8'sd127;  shift_right = 0;  run_one();
    value_in = -32'sd1;        bias_in = 8'sd0;    shift_right = 4;  run_one();
    value_in = 32'sd32767;     bias_in = 8'sd1;    shift_right = 0;  run_one();
    value_in = 32'sd65535;     bias_in = -8'sd1;   shift_right = 1;  run_one();
    value_in = 32'sd100;       bias_in = -8'sd101; shift_right = 0;  run_one();
    for (int n = 0; n < 3000; n++) begin
      value_in    = 32'($urandom) >>> $urandom_range(0, 20);
      bias_in     = 8'($urandom);
      shift_right = 5'($urandom_range(0, 16));
      run_one();
    end
    checks++;
    if (n_relu == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL coverage relu=%0d sat=%0d", n_relu, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
