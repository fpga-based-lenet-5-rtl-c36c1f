// hps_lenet_regs: memory-mapped register slave between the HPS lightweight
// HPS-to-FPGA bridge and the LeNet core.
//
// Register map (byte offsets, 32-bit words):
//   0x0000 CONTROL/STATUS  write: bit0 start, bit1 clear_done,
//                                 bit2 clear_input_loaded (self-clearing pulses)
//                          read:  bit0 regs_valid, bit1 busy, bit2 done,
//                                 bit3 input_loaded
//   0x0004 RESULT          read-only: [7:0] predicted digit (0..9),
//                          [31:8] cycle count of the last inference
//   0x0008 .. 0x002C       LOGIT_0 .. LOGIT_9, read-only signed int32
//   0x0030 .. 0x102C       PIXEL_INPUT[0..1023], one word per pixel, bits
//                          [7:0] used; reads return the stored pixel
// done is a sticky flag set by the core's done pulse and cleared by
// clear_done or a new start. regs_valid is set by the done pulse and cleared
// by start: RESULT and LOGITs then hold a complete result. input_loaded is
// set once 1024 pixel writes have arrived since it was last cleared.
//
// Bus side: an AXI4-Lite slave with one transaction in flight per direction.
// A write is accepted when AWVALID and WVALID are both high and no response
// is pending (AWREADY = WREADY = 1 for that one clock); BVALID follows on
// the next clock and is held until BREADY. A read is accepted when ARVALID
// is high and no read is pending; a pixel read is issued to the image BRAM in
// the accept clock, the read data is registered one clock later and RVALID
// is raised then, held until RREADY. WSTRB is ignored; responses are OKAY;
// unmapped reads return zero. The map follows the published register table;
// placing the cycle count in RESULT[31:8] follows its register drawing, and
// the AXI4-Lite handshake details are this implementation's own.
module hps_lenet_regs
  import lenet_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0]            s_axi_awaddr,
  input  logic                         s_axi_awvalid,
  output logic                         s_axi_awready,
  input  logic [31:0]                  s_axi_wdata,
  input  logic [3:0]                   s_axi_wstrb,
  input  logic                         s_axi_wvalid,
  output logic                         s_axi_wready,
  output logic [1:0]                   s_axi_bresp,
  output logic                         s_axi_bvalid,
  input  logic                         s_axi_bready,
  input  logic [ADDR_W-1:0]            s_axi_araddr,
  input  logic                         s_axi_arvalid,
  output logic                         s_axi_arready,
  output logic [31:0]                  s_axi_rdata,
  output logic [1:0]                   s_axi_rresp,
  output logic                         s_axi_rvalid,
  input  logic                         s_axi_rready,
  // accelerator side
  input  logic                         accel_busy,
  input  logic                         accel_done,
  input  logic [3:0]                   predicted_digit,
  input  logic [23:0]                  cycle_count,
  input  logic [NUM_CLASSES*ACC_W-1:0] regs_flat,
  input  logic [PIX_W-1:0]             pixel_rd_data,
  output logic                         start_pulse,
  output logic                         clear_done_pulse,
  output logic                         pixel_wr_en,
  output logic [IMG_AW-1:0]            pixel_wr_addr,
  output logic [PIX_W-1:0]             pixel_wr_data,
  output logic                         pixel_dbg_rd_en,
  output logic [IMG_AW-1:0]            pixel_dbg_rd_addr
);

  localparam logic [ADDR_W-1:0] A_CTRL   = ADDR_W'(16'h0000);
  localparam logic [ADDR_W-1:0] A_RESULT = ADDR_W'(16'h0004);
  localparam logic [ADDR_W-1:0] A_LOGIT0 = ADDR_W'(16'h0008);
  localparam logic [ADDR_W-1:0] A_LOGIT9 = ADDR_W'(16'h002C);
  localparam logic [ADDR_W-1:0] A_PIX0   = ADDR_W'(16'h0030);
  localparam logic [ADDR_W-1:0] A_PIXN   = ADDR_W'(16'h102C);

  logic wr_fire, rd_fire;
  logic done_flag, regs_valid, input_loaded;
  logic [IMG_AW:0] pix_count;
  logic rd_phase;
  logic [ADDR_W-1:0] rd_addr_q;
  logic [ADDR_W-1:0] pix_woff, pix_roff;

  assign wr_fire       = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr_fire;
  assign s_axi_wready  = wr_fire;
  assign s_axi_bresp   = 2'b00;
  assign rd_fire       = s_axi_arvalid && !rd_phase && !s_axi_rvalid;
  assign s_axi_arready = rd_fire;
  assign s_axi_rresp   = 2'b00;

  function automatic logic in_pix(logic [ADDR_W-1:0] a);
    return (a >= A_PIX0) && (a <= A_PIXN);
  endfunction

  always_comb begin
    pix_woff = s_axi_awaddr - A_PIX0;
    pix_roff = s_axi_araddr - A_PIX0;
    // Write-side decode.
    start_pulse      = wr_fire && (s_axi_awaddr == A_CTRL) && s_axi_wdata[0];
    clear_done_pulse = wr_fire && (s_axi_awaddr == A_CTRL) && s_axi_wdata[1];
    pixel_wr_en      = wr_fire && in_pix(s_axi_awaddr);
    pixel_wr_addr    = pix_woff[IMG_AW+1:2];
    pixel_wr_data    = s_axi_wdata[PIX_W-1:0];
    // Read-side: the pixel read goes to the BRAM in the accept clock.
    pixel_dbg_rd_en   = rd_fire && in_pix(s_axi_araddr);
    pixel_dbg_rd_addr = pix_roff[IMG_AW+1:2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axi_bvalid <= 1'b0;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      rd_phase     <= 1'b0;
      rd_addr_q    <= '0;
      done_flag    <= 1'b0;
      regs_valid   <= 1'b0;
      input_loaded <= 1'b0;
      pix_count    <= '0;
    end else begin
      // Write response.
      if (wr_fire)                          s_axi_bvalid <= 1'b1;
      else if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;

      // Status flags.
      if (accel_done) begin
        done_flag  <= 1'b1;
        regs_valid <= 1'b1;
      end else begin
        if (clear_done_pulse || start_pulse) done_flag <= 1'b0;
        if (start_pulse)                     regs_valid <= 1'b0;
      end
      if (wr_fire && (s_axi_awaddr == A_CTRL) && s_axi_wdata[2]) begin
        input_loaded <= 1'b0;
        pix_count    <= '0;
      end else if (pixel_wr_en && !input_loaded) begin
        pix_count <= pix_count + 1'b1;
        if (pix_count == (IMG_AW+1)'(IMG_DEPTH - 1)) input_loaded <= 1'b1;
      end

      // Read channel: accept, then one clock for the pixel BRAM.
      if (rd_fire) begin
        rd_phase  <= 1'b1;
        rd_addr_q <= s_axi_araddr;
      end
      if (rd_phase) begin
        rd_phase     <= 1'b0;
        s_axi_rvalid <= 1'b1;
        if (rd_addr_q == A_CTRL)
          s_axi_rdata <= {28'd0, input_loaded, done_flag, accel_busy, regs_valid};
        else if (rd_addr_q == A_RESULT)
          s_axi_rdata <= {cycle_count, 4'd0, predicted_digit};
        else if (rd_addr_q >= A_LOGIT0 && rd_addr_q <= A_LOGIT9)
          s_axi_rdata <= regs_flat[32'(rd_addr_q - A_LOGIT0) * 8 +: ACC_W];
        else if (in_pix(rd_addr_q))
          s_axi_rdata <= {24'd0, pixel_rd_data};
        else
          s_axi_rdata <= '0;
      end else if (s_axi_rvalid && s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end
  end

endmodule
