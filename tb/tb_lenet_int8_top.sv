// tb_lenet_int8_top: full inference on the core at its default parameters.
// Loads a 32x32 test image (a ring-shaped stroke plus noise) through the
// pixel write port, reads a few pixels back through the debug port, starts
// the core and compares the ten logits and the predicted digit with the
// golden model. The run must take exactly 454966 clocks, counted both by
// the core's cycle_count and by this bench (start clock to done clock):
// 1 start clock, 136416 (conv1), 11760 (pool1), 243200 (conv2), 4000
// (pool2), 48480 (fc1), 10248 (fc2), 860 (fc3) and 1 argmax clock. busy
// must stay high for the whole run and done must be a single-clock pulse.
// The clocks spent in each layer are also measured (by observing the
// core's layer register) and compared with the per-layer figures above.
module tb_lenet_int8_top;
  logic clk = 0, rst_n = 0, start = 0;
  logic pixel_wr_en = 0, pixel_dbg_rd_en = 0;
  logic [9:0] pixel_wr_addr = '0, pixel_dbg_rd_addr = '0;
  logic [7:0] pixel_wr_data = '0, pixel_dbg_rd_data;
  logic busy, done;
  logic [3:0] predicted_digit;
  logic [319:0] logits_flat;
  logic [23:0] cycle_count;
  int checks = 0, failures = 0;
  int img [1024];
  initial for (int l = 0; l < 7; l++) layer_clocks[l] = 0;
  int exp_logits [10];
  int exp_digit;

  lenet_int8_top dut (.*);
  int layer_clocks [7];
  localparam int EXP_LAYER_CLOCKS [7] = '{136416, 11760, 243200, 4000, 48480, 10248, 860};

  // Sampled mid-cycle; states 1..9 are INIT..POOL_WRITE (IDLE, ARGMAX, DONE excluded).
  always @(negedge clk)
    if (dut.state >= 4'd1 && dut.state <= 4'd9) layer_clocks[dut.layer]++;
  lenet_ref u_ref ();

  always #10 clk = ~clk;

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, done_cycles;
    for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) begin
      int d2 = (y - 16) * (y - 16) + (x - 15) * (x - 15);
      img[y * 32 + x] = (d2 > 30 && d2 < 80) ? 200 + $urandom_range(0, 55) : $urandom_range(0, 20);
    end
    u_ref.infer(img, exp_logits, exp_digit);
    $display("reference digit %0d, relu clamps %0d, saturations %0d", exp_digit, u_ref.n_relu, u_ref.n_sat);

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(busy, 0, "idle after reset");
    for (int i = 0; i < 1024; i++) begin
      pixel_wr_en = 1; pixel_wr_addr = 10'(i); pixel_wr_data = 8'(img[i]);
      @(negedge clk);
    end
    pixel_wr_en = 0;
    for (int n = 0; n < 8; n++) begin
      int a = $urandom_range(0, 1023);
      pixel_dbg_rd_en = 1; pixel_dbg_rd_addr = 10'(a);
      @(negedge clk);
      pixel_dbg_rd_en = 0;
      chk(pixel_dbg_rd_data, img[a], "pixel read-back");
    end

    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1; done_cycles = 0;
    while (!done) begin
      if (!busy) begin failures++; $display("FAIL busy dropped at %0d", cycles); break; end
      @(negedge clk);
      cycles++;
    end
    // cycles = the start clock plus every clock spent in INIT..ARGMAX.
    chk(cycles, 454966, "clocks start..argmax (bench)");
    chk(cycle_count, 454966, "cycle_count");
    @(negedge clk);
    chk(done, 0, "done is one clock");
    chk(busy, 0, "idle after done");
    for (int l = 0; l < 7; l++) chk(layer_clocks[l], EXP_LAYER_CLOCKS[l], $sformatf("clocks in layer %0d", l));
    for (int i = 0; i < 10; i++) chk($signed(logits_flat[32*i +: 32]), exp_logits[i], $sformatf("logit %0d", i));
    chk(predicted_digit, exp_digit, "predicted digit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
