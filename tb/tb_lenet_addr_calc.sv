// tb_lenet_addr_calc: every address the controller uses, against the
// division/modulo form of the same channel-major layouts.
module tb_lenet_addr_calc;
  logic [3:0] out_ch, pool_ch;
  logic [4:0] out_y, out_x;
  logic [3:0] pool_y, pool_x;
  logic [8:0] term_idx;
  logic [1:0] pool_read_idx;
  logic [9:0]  conv1_src_addr;
  logic [12:0] conv1_dst_addr, pool1_src_addr, pool1_dst_addr, conv2_src_addr,
               conv2_dst_addr, pool2_src_addr, pool2_dst_addr;
  int checks = 0, failures = 0;

  lenet_addr_calc dut (.*);

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pool_ch = 0; pool_y = 0; pool_x = 0; pool_read_idx = 0;
    // conv1: 6 x 28 x 28 outputs, 25 taps.
    for (int c = 0; c < 6; c++) for (int y = 0; y < 28; y += 3) for (int x = 0; x < 28; x++)
      for (int t = 0; t < 25; t++) begin
        out_ch = 4'(c); out_y = 5'(y); out_x = 5'(x); term_idx = 9'(t); #1;
        chk(conv1_src_addr, (y + t / 5) * 32 + x + t % 5, "conv1_src");
        chk(conv1_dst_addr, c * 784 + y * 28 + x, "conv1_dst");
      end
    // conv2: 16 x 10 x 10 outputs, 150 terms.
    for (int c = 0; c < 16; c += 5) for (int y = 0; y < 10; y++) for (int x = 0; x < 10; x++)
      for (int t = 0; t < 150; t++) begin
        out_ch = 4'(c); out_y = 5'(y); out_x = 5'(x); term_idx = 9'(t); #1;
        chk(conv2_src_addr, (t / 25) * 196 + (y + (t % 25) / 5) * 14 + x + t % 5, "conv2_src");
        chk(conv2_dst_addr, c * 100 + y * 10 + x, "conv2_dst");
      end
    // pooling.
    for (int c = 0; c < 16; c++) for (int y = 0; y < 14; y++) for (int x = 0; x < 14; x++)
      for (int r = 0; r < 4; r++) begin
        pool_ch = 4'(c); pool_y = 4'(y); pool_x = 4'(x); pool_read_idx = 2'(r); #1;
        if (c < 6) begin
          chk(pool1_src_addr, c * 784 + (2 * y + r / 2) * 28 + 2 * x + r % 2, "pool1_src");
          chk(pool1_dst_addr, c * 196 + y * 14 + x, "pool1_dst");
        end
        if (y < 5 && x < 5) begin
          chk(pool2_src_addr, c * 100 + (2 * y + r / 2) * 10 + 2 * x + r % 2, "pool2_src");
          chk(pool2_dst_addr, c * 25 + y * 5 + x, "pool2_dst");
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
