// tb_lenet_argmax: largest of ten signed logits, lowest index on ties.
module tb_lenet_argmax;
  logic [319:0] logits_flat;
  logic [3:0]   digit;
  int checks = 0, failures = 0;

  lenet_argmax #(.N(10)) dut (.*);

  task automatic run_one();
    int best = 0;
    #1;
    for (int i = 1; i < 10; i++)
      if ($signed(logits_flat[32*i +: 32]) > $signed(logits_flat[32*best +: 32])) best = i;
    checks++;
    if (int'(digit) != best) begin
      failures++;
      $display("FAIL got %0d expected %0d", digit, best);
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
    // The logits of the published example run: digit 5 wins.
    logits_flat = {32'sd5215385, 32'sd12469122, -32'sd32246193, -32'sd4557860, 32'sd29399030,
                   -32'sd21822892, 32'sd2706930, -32'sd18941875, -32'sd29893572, -32'sd21823855};
    run_one();
    checks++;
    if (digit != 4'd5) begin failures++; $display("FAIL example digit %0d", digit); end
    // All equal: index 0.
    logits_flat = {10{32'sd7}}; run_one();
    // All negative, one tie at the top.
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 10; i++) logits_flat[32*i +: 32] = $urandom;
      if (n % 3 == 0) logits_flat[32*$urandom_range(5, 9) +: 32] = logits_flat[32*$urandom_range(0, 4) +: 32];
      if (n % 5 == 0) for (int i = 0; i < 10; i++) logits_flat[32*i +: 32] = -int'($urandom_range(1, 1000));
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
