// tb_lenet_digits: classification workload on the core - ten synthetic
// 32x32 digit images (0..9 drawn as seven-segment-style strokes of varying
// thickness, placed at varying offsets, with background noise), run back to
// back at the default parameters. Each result (ten logits and the digit) is
// compared with the golden model, and each run must take 454966 clocks.
// With the synthetic parameter set the predicted classes are not expected
// to match the drawn digits; the bench checks that the hardware computes
// exactly what the network definition says.
module tb_lenet_digits;
  logic clk = 0, rst_n = 0, start = 0;
  logic pixel_wr_en = 0, pixel_dbg_rd_en = 0;
  logic [9:0] pixel_wr_addr = '0, pixel_dbg_rd_addr = '0;
  logic [7:0] pixel_wr_data = '0, pixel_dbg_rd_data;
  logic busy, done;
  logic [3:0] predicted_digit;
  logic [319:0] logits_flat;
  logic [23:0] cycle_count;
  int checks = 0, failures = 0;

  lenet_int8_top dut (.*);
  lenet_ref u_ref ();

  always #10 clk = ~clk;

  // Segments a..g lit for each digit, bit 0 = a.
  localparam logic [6:0] SEGS [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic bit on_seg(int d, int y, int x, int t);
    // Digit box 12 wide, 20 high, at (6,10); stroke thickness t.
    bit h_top = y >= 0 && y < t && x >= 0 && x < 12;
    bit h_mid = y >= 10 - t / 2 && y < 10 - t / 2 + t && x >= 0 && x < 12;
    bit h_bot = y >= 20 - t && y < 20 && x >= 0 && x < 12;
    bit v_l_top = x >= 0 && x < t && y >= 0 && y < 11;
    bit v_r_top = x >= 12 - t && x < 12 && y >= 0 && y < 11;
    bit v_l_bot = x >= 0 && x < t && y >= 10 && y < 20;
    bit v_r_bot = x >= 12 - t && x < 12 && y >= 10 && y < 20;
    return (SEGS[d][0] && h_top) || (SEGS[d][1] && v_r_top) || (SEGS[d][2] && v_r_bot) ||
           (SEGS[d][3] && h_bot) || (SEGS[d][4] && v_l_bot) || (SEGS[d][5] && v_l_top) ||
           (SEGS[d][6] && h_mid);
  endfunction

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img [1024];
    int exp_logits [10];
    int exp_digit;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < 10; d++) begin
      int oy = 5 + $urandom_range(0, 3), ox = 9 + $urandom_range(0, 3), t = 2 + $urandom_range(0, 2);
      for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++)
        img[y * 32 + x] = on_seg(d, y - oy, x - ox, t) ? 180 + $urandom_range(0, 75) : $urandom_range(0, 15);
      u_ref.infer(img, exp_logits, exp_digit);
      for (int i = 0; i < 1024; i++) begin
        pixel_wr_en = 1; pixel_wr_addr = 10'(i); pixel_wr_data = 8'(img[i]);
        @(negedge clk);
      end
      pixel_wr_en = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      chk(cycle_count, 454966, $sformatf("image %0d clocks", d));
      for (int i = 0; i < 10; i++)
        chk($signed(logits_flat[32*i +: 32]), exp_logits[i], $sformatf("image %0d logit %0d", d, i));
      chk(predicted_digit, exp_digit, $sformatf("image %0d class", d));
      $display("drawn %0d -> class %0d", d, predicted_digit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
