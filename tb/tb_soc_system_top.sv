// tb_soc_system_top: end-to-end test of the whole accelerator through its
// AXI4-Lite register interface, as the host software drives it: write the
// 1024 pixels, check input_loaded, write CONTROL.start, poll STATUS until
// done, read RESULT and the ten LOGITs, and check HEX0 and the LEDs.
// Two different images run back to back, with clear_done and
// clear_input_loaded between them and pixel read-back in between. The conv1
// shift is set to 0 here so that the 16-bit saturation of the requantizer
// is exercised; results are compared with the golden model at the same
// shifts. Each mechanism is counted and must occur at least once: ReLU
// clamping, saturation, masked MAC lanes in a last partial group (conv1,
// fc1), writes to both ping-pong buffers, all seven layers, busy seen
// while polling, done, clear_done, clear_input_loaded, AXI back-pressure.
module tb_soc_system_top;
  localparam int S1 = 0, S2 = 8, S3 = 9, S4 = 8;
  logic CLOCK_50 = 0;
  logic [3:0] KEY = 4'b1110;
  logic [15:0] s_axi_awaddr, s_axi_araddr;
  logic s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready, s_axi_bvalid, s_axi_bready;
  logic s_axi_arvalid, s_axi_arready, s_axi_rvalid, s_axi_rready;
  logic [31:0] s_axi_wdata, s_axi_rdata;
  logic [3:0] s_axi_wstrb;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic [9:0] LEDR;
  logic [6:0] HEX0;
  int checks = 0, failures = 0;
  int n_busy_seen = 0, n_done = 0, n_clear_done = 0, n_clear_loaded = 0;
  int n_masked = 0, n_wr_a = 0, n_wr_b = 0;
  bit [6:0] layers_seen = '0;

  soc_system_top #(.SHIFT_CONV1(S1), .SHIFT_CONV2(S2), .SHIFT_FC1(S3), .SHIFT_FC2(S4)) dut (.*);
  axi_lite_host u_host (
    .clk(CLOCK_50), .awaddr(s_axi_awaddr), .awvalid(s_axi_awvalid), .awready(s_axi_awready),
    .wdata(s_axi_wdata), .wstrb(s_axi_wstrb), .wvalid(s_axi_wvalid), .wready(s_axi_wready),
    .bresp(s_axi_bresp), .bvalid(s_axi_bvalid), .bready(s_axi_bready),
    .araddr(s_axi_araddr), .arvalid(s_axi_arvalid), .arready(s_axi_arready),
    .rdata(s_axi_rdata), .rresp(s_axi_rresp), .rvalid(s_axi_rvalid), .rready(s_axi_rready));
  lenet_ref #(.S1(S1), .S2(S2), .S3(S3), .S4(S4)) u_ref ();

  always #10 CLOCK_50 = ~CLOCK_50;

  // Internal activity probes.
  always @(posedge CLOCK_50) begin
    if (dut.u_core.busy) layers_seen[dut.u_core.layer] <= 1'b1;
    if (dut.u_core.state == 4'd3 && dut.u_core.u_mac.valid_mask != 3'b111) n_masked++;  // ACCUM
    if (dut.u_core.fm_wr && dut.u_core.fm_wr_to_a) n_wr_a++;
    if (dut.u_core.fm_wr && !dut.u_core.fm_wr_to_a) n_wr_b++;
  end

  localparam logic [6:0] SEG [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78, 7'h00, 7'h10};

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic need(int count, string what);
    checks++;
    if (count == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("mechanism %s: %0d", what, count);
  endtask

  task automatic run_image(input int img [1024]);
    logic [31:0] r;
    int exp_logits [10];
    int exp_digit;
    u_ref.infer(img, exp_logits, exp_digit);
    for (int i = 0; i < 1024; i++) u_host.write32(16'(16'h0030 + 4 * i), 32'(img[i]));
    u_host.read32(16'h0000, r); chk(r[3], 1, "input_loaded");
    for (int n = 0; n < 4; n++) begin
      int a = $urandom_range(0, 1023);
      u_host.read32(16'(16'h0030 + 4 * a), r); chk(r, img[a], "pixel read-back");
    end
    u_host.write32(16'h0000, 32'h1);
    do begin
      u_host.read32(16'h0000, r);
      if (r[1]) n_busy_seen++;
    end while (!r[2]);
    n_done++;
    chk(r[0], 1, "regs_valid with done");
    u_host.read32(16'h0004, r);
    chk(r[7:0], exp_digit, "RESULT digit");
    chk(r[31:8], 454966, "RESULT cycle count");
    for (int i = 0; i < 10; i++) begin
      u_host.read32(16'(8 + 4 * i), r); chk($signed(r), exp_logits[i], $sformatf("LOGIT_%0d", i));
    end
    chk(HEX0, SEG[exp_digit], "HEX0");
    chk(LEDR, {5'd0, 4'(exp_digit), 1'(exp_digit == 0)}, "LEDR");
    u_host.write32(16'h0000, 32'h2); n_clear_done++;
    u_host.read32(16'h0000, r); chk(r[2], 0, "done cleared");
    u_host.write32(16'h0000, 32'h4); n_clear_loaded++;
    u_host.read32(16'h0000, r); chk(r[3], 0, "input_loaded cleared");
  endtask

  initial begin
    repeat (2000000) @(posedge CLOCK_50);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img [1024];
    repeat (3) @(negedge CLOCK_50);
    KEY[0] = 1'b1;
    u_host.protocol_errors = 0;  // ignore the undefined pre-reset cycles
    @(negedge CLOCK_50);
    chk(HEX0, 7'h7F, "HEX0 blank before first result");
    // Image 1: ring stroke.
    for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) begin
      int d2 = (y - 16) * (y - 16) + (x - 15) * (x - 15);
      img[y * 32 + x] = (d2 > 30 && d2 < 80) ? 220 + $urandom_range(0, 35) : $urandom_range(0, 10);
    end
    run_image(img);
    // Image 2: slanted bar.
    for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++)
      img[y * 32 + x] = (x - 12 - y / 4 >= 0 && x - 12 - y / 4 < 4 && y > 3 && y < 28) ? 255 : $urandom_range(0, 30);
    run_image(img);

    chk(u_host.protocol_errors, 0, "AXI protocol errors");
    need(u_ref.n_relu, "ReLU clamp");
    need(u_ref.n_sat, "saturation");
    need(n_masked, "masked MAC lanes");
    need(n_wr_a, "feature-map A writes");
    need(n_wr_b, "feature-map B writes");
    need(int'(layers_seen == 7'h7F), "all seven layers");
    need(n_busy_seen, "busy while polling");
    need(n_done, "done");
    need(n_clear_done, "clear_done");
    need(n_clear_loaded, "clear_input_loaded");
    need(u_host.backpressure_cycles, "AXI back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
