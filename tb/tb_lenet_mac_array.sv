// tb_lenet_mac_array: random and corner-case vectors for the 3-lane MAC.
// The expected partial sum is the masked sum of signed 16x8-bit products.
module tb_lenet_mac_array;
  localparam int unsigned LANES = 3;
  logic [LANES*16-1:0] activations_flat;
  logic [LANES*8-1:0]  weights_flat;
  logic [LANES-1:0]    valid_mask;
  logic signed [31:0]  partial_sum;
  int checks = 0, failures = 0;

  lenet_mac_array #(.LANES(LANES)) dut (.*);

  task automatic run_one();
    longint exp = 0;
    #1;
    for (int l = 0; l < LANES; l++)
      if (valid_mask[l])
        exp += longint'($signed(activations_flat[16*l +: 16])) * longint'($signed(weights_flat[8*l +: 8]));
    checks++;
    if (longint'(partial_sum) != exp) begin
      failures++;
      $display("FAIL act=%h w=%h mask=%b got %0d expected %0d",
               activations_flat, weights_flat, valid_mask, partial_sum, exp);
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
    // Extremes.
    activations_flat = {3{16'h7FFF}}; weights_flat = {3{8'h80}}; valid_mask = 3'b111; run_one();
    activations_flat = {3{16'h8000}}; weights_flat = {3{8'h80}}; valid_mask = 3'b111; run_one();
    activations_flat = {3{16'h00FF}}; weights_flat = {3{8'h7F}}; valid_mask = 3'b001; run_one();
    for (int n = 0; n < 2000; n++) begin
      activations_flat = {16'($urandom), 16'($urandom), 16'($urandom)};
      weights_flat     = 24'($urandom);
      valid_mask       = 3'($urandom);
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
