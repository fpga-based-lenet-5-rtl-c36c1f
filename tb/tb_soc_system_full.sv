// tb_soc_system_full: one complete inference through the register
// interface with every parameter of the design at its default value. The
// host sequence is the one the application software uses (pixels,
// CONTROL.start, poll STATUS.done, RESULT and LOGITs); logits, digit, the
// 454966-clock cycle count, HEX0 and the LEDs are checked against the
// golden model.
module tb_soc_system_full;
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

  soc_system_top dut (.*);
  axi_lite_host u_host (
    .clk(CLOCK_50), .awaddr(s_axi_awaddr), .awvalid(s_axi_awvalid), .awready(s_axi_awready),
    .wdata(s_axi_wdata), .wstrb(s_axi_wstrb), .wvalid(s_axi_wvalid), .wready(s_axi_wready),
    .bresp(s_axi_bresp), .bvalid(s_axi_bvalid), .bready(s_axi_bready),
    .araddr(s_axi_araddr), .arvalid(s_axi_arvalid), .arready(s_axi_arready),
    .rdata(s_axi_rdata), .rresp(s_axi_rresp), .rvalid(s_axi_rvalid), .rready(s_axi_rready));
  lenet_ref u_ref ();

  always #10 CLOCK_50 = ~CLOCK_50;

  localparam logic [6:0] SEG [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78, 7'h00, 7'h10};

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge CLOCK_50);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img [1024];
    int exp_logits [10];
    int exp_digit;
    logic [31:0] r;
    // A "7": top bar and a diagonal stroke, on a dark background.
    for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) begin
      bit on = (y >= 6 && y < 9 && x >= 8 && x < 24) || (y >= 9 && y < 27 && x >= 21 - (y - 9) / 2 && x < 24 - (y - 9) / 2);
      img[y * 32 + x] = on ? 255 : 0;
    end
    u_ref.infer(img, exp_logits, exp_digit);
    repeat (3) @(negedge CLOCK_50);
    KEY[0] = 1'b1;
    u_host.protocol_errors = 0;  // ignore the undefined pre-reset cycles
    for (int i = 0; i < 1024; i++) u_host.write32(16'(16'h0030 + 4 * i), 32'(img[i]));
    u_host.read32(16'h0000, r); chk(r, 32'h8, "STATUS: input_loaded only");
    u_host.write32(16'h0000, 32'h1);
    do u_host.read32(16'h0000, r); while (!r[2]);
    chk(r[1:0], 2'b01, "STATUS: regs_valid, not busy");
    u_host.read32(16'h0004, r);
    chk(r[7:0], exp_digit, "RESULT digit");
    chk(r[31:8], 454966, "RESULT cycle count");
    for (int i = 0; i < 10; i++) begin
      u_host.read32(16'(8 + 4 * i), r); chk($signed(r), exp_logits[i], $sformatf("LOGIT_%0d", i));
    end
    chk(HEX0, SEG[exp_digit], "HEX0");
    chk(LEDR, {5'd0, 4'(exp_digit), 1'(exp_digit == 0)}, "LEDR");
    chk(u_host.protocol_errors, 0, "AXI protocol errors");
    $display("predicted digit %0d", exp_digit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
