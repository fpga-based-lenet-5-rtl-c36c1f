// tb_hps_lenet_regs: register map and AXI4-Lite behaviour of the register
// slave, with the accelerator replaced by bench-driven signals and the
// image BRAM by a one-clock-latency array. Checks the CONTROL pulses, the
// STATUS bits (regs_valid, busy, done, input_loaded) and how they are set
// and cleared, the RESULT and LOGIT words, pixel writes and read-back, an
// unmapped read, and the handshake rules under random back-pressure.
module tb_hps_lenet_regs;
  logic clk = 0, rst_n = 0;
  logic [15:0] s_axi_awaddr, s_axi_araddr;
  logic s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready, s_axi_bvalid, s_axi_bready;
  logic s_axi_arvalid, s_axi_arready, s_axi_rvalid, s_axi_rready;
  logic [31:0] s_axi_wdata, s_axi_rdata;
  logic [3:0] s_axi_wstrb;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic accel_busy = 0, accel_done = 0;
  logic [3:0] predicted_digit = 4'd7;
  logic [23:0] cycle_count = 24'd454966;
  logic [319:0] regs_flat;
  logic [7:0] pixel_rd_data;
  logic start_pulse, clear_done_pulse, pixel_wr_en, pixel_dbg_rd_en;
  logic [9:0] pixel_wr_addr, pixel_dbg_rd_addr;
  logic [7:0] pixel_wr_data;
  logic [7:0] pix_mem [1024];
  int checks = 0, failures = 0, n_start = 0, n_clear_done = 0;

  hps_lenet_regs #(.ADDR_W(16)) dut (.*);
  axi_lite_host u_host (
    .clk, .awaddr(s_axi_awaddr), .awvalid(s_axi_awvalid), .awready(s_axi_awready),
    .wdata(s_axi_wdata), .wstrb(s_axi_wstrb), .wvalid(s_axi_wvalid), .wready(s_axi_wready),
    .bresp(s_axi_bresp), .bvalid(s_axi_bvalid), .bready(s_axi_bready),
    .araddr(s_axi_araddr), .arvalid(s_axi_arvalid), .arready(s_axi_arready),
    .rdata(s_axi_rdata), .rresp(s_axi_rresp), .rvalid(s_axi_rvalid), .rready(s_axi_rready));

  always #10 clk = ~clk;

  always_ff @(posedge clk) begin
    if (pixel_wr_en) pix_mem[pixel_wr_addr] <= pixel_wr_data;
    if (pixel_dbg_rd_en) pixel_rd_data <= pix_mem[pixel_dbg_rd_addr];
    if (start_pulse) n_start++;
    if (clear_done_pulse) n_clear_done++;
  end

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic [7:0] pix(int i);
    return 8'((i * 37 + 11) ^ (i >> 3));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    for (int i = 0; i < 10; i++) regs_flat[32*i +: 32] = 32'(i * 1000003 - 5000000);
    for (int i = 0; i < 1024; i++) pix_mem[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    u_host.protocol_errors = 0;  // ignore the undefined pre-reset cycles
    u_host.read32(16'h0000, r); chk(r, 0, "STATUS after reset");

    // Load the image; input_loaded only after the last pixel.
    for (int i = 0; i < 1023; i++) u_host.write32(16'(16'h0030 + 4 * i), {24'hABCDEF, pix(i)});
    u_host.read32(16'h0000, r); chk(r[3], 0, "input_loaded before last pixel");
    u_host.write32(16'h102C, 32'(pix(1023)));
    u_host.read32(16'h0000, r); chk(r[3], 1, "input_loaded after 1024 pixels");
    for (int i = 0; i < 1024; i += 73) chk(pix_mem[i], pix(i), $sformatf("pixel %0d stored", i));
    chk(pix_mem[1023], pix(1023), "last pixel stored");
    for (int n = 0; n < 6; n++) begin
      int a = (n == 0) ? 1023 : $urandom_range(0, 1023);
      u_host.read32(16'(16'h0030 + 4 * a), r); chk(r, pix(a), $sformatf("PIXEL_INPUT[%0d] read", a));
    end

    // Start pulse, busy, done, regs_valid.
    u_host.write32(16'h0000, 32'h1);
    chk(n_start, 1, "one start pulse");
    accel_busy = 1;
    u_host.read32(16'h0000, r); chk(r[2:0], 3'b010, "busy, not done");
    @(negedge clk); accel_busy = 0; accel_done = 1;
    @(negedge clk); accel_done = 0;
    u_host.read32(16'h0000, r); chk(r, 32'b1101, "done, regs_valid, input_loaded");
    u_host.read32(16'h0004, r); chk(r, {24'd454966, 8'd7}, "RESULT");
    for (int i = 0; i < 10; i++) begin
      u_host.read32(16'(8 + 4 * i), r); chk(r, regs_flat[32*i +: 32], $sformatf("LOGIT_%0d", i));
    end
    // clear_done keeps regs_valid; start clears both.
    u_host.write32(16'h0000, 32'h2);
    chk(n_clear_done, 1, "clear_done pulse");
    u_host.read32(16'h0000, r); chk(r[2:0], 3'b001, "done cleared, regs_valid kept");
    u_host.write32(16'h0000, 32'h1);
    u_host.read32(16'h0000, r); chk(r[2:0], 3'b000, "start clears regs_valid");
    chk(n_start, 2, "second start pulse");
    // clear_input_loaded, then a reload sets it again.
    u_host.write32(16'h0000, 32'h4);
    u_host.read32(16'h0000, r); chk(r[3], 0, "input_loaded cleared");
    chk(n_start, 2, "no start from clear");
    // Writes to read-only registers are ignored.
    u_host.write32(16'h0004, 32'hFFFF_FFFF);
    u_host.read32(16'h0004, r); chk(r, {24'd454966, 8'd7}, "RESULT read-only");
    u_host.read32(16'h1030, r); chk(r, 0, "unmapped read");
    chk(u_host.protocol_errors, 0, "AXI protocol errors");
    checks++;
    if (u_host.backpressure_cycles == 0) begin failures++; $display("FAIL no back-pressure exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
