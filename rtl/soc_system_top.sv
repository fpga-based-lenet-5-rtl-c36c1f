// soc_system_top: board-level integration of the LeNet-5 accelerator.
//
// The lightweight HPS-to-FPGA AXI bridge (base 0xFF200000 on the HPS side)
// enters as an AXI4-Lite slave port and reaches hps_lenet_regs, which turns
// register accesses into start / clear pulses and image writes for the
// lenet_int8_top core and returns status, the result and the ten logits.
// The HPS subsystem itself (ARM cores, DDR controller, Linux software) is
// vendor hard IP and is outside this RTL: its bridge signals are ports here.
//
// Board outputs: HEX0 shows the predicted digit; LEDR[0] lights when the
// prediction is 0, LEDR[4:1] show the digit's BCD code (LEDR[1] = LSB) and
// LEDR[9:5] are off. Both show the last completed result (blank and dark
// until the first inference finishes). KEY[0] is the active-low reset;
// KEY[3:1] are unused. Everything runs on CLOCK_50.
module soc_system_top
  import lenet_pkg::*;
#(
  parameter int unsigned SHIFT_CONV1 = 6,
  parameter int unsigned SHIFT_CONV2 = 8,
  parameter int unsigned SHIFT_FC1   = 9,
  parameter int unsigned SHIFT_FC2   = 8
) (
  input  logic        CLOCK_50,
  input  logic [3:0]  KEY,
  // lightweight HPS-to-FPGA bridge (AXI4-Lite subset)
  input  logic [15:0] s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [15:0] s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // board
  output logic [9:0]  LEDR,
  output logic [6:0]  HEX0
);

  logic                         rst_n;
  logic                         start_pulse, clear_done_pulse;
  logic                         pixel_wr_en, pixel_dbg_rd_en;
  logic [IMG_AW-1:0]            pixel_wr_addr, pixel_dbg_rd_addr;
  logic [PIX_W-1:0]             pixel_wr_data, pixel_dbg_rd_data;
  logic                         busy, done;
  logic [3:0]                   predicted_digit;
  logic [NUM_CLASSES*ACC_W-1:0] logits_flat;
  logic [23:0]                  cycle_count;
  logic                         have_result;
  logic [6:0]                   seg_n;

  assign rst_n = KEY[0];

  hps_lenet_regs #(.ADDR_W(16)) u_regs (
    .clk (CLOCK_50), .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .accel_busy (busy),
    .accel_done (done),
    .predicted_digit,
    .cycle_count,
    .regs_flat (logits_flat),
    .pixel_rd_data (pixel_dbg_rd_data),
    .start_pulse,
    .clear_done_pulse,
    .pixel_wr_en, .pixel_wr_addr, .pixel_wr_data,
    .pixel_dbg_rd_en, .pixel_dbg_rd_addr
  );

  lenet_int8_top #(
    .SHIFT_CONV1 (SHIFT_CONV1),
    .SHIFT_CONV2 (SHIFT_CONV2),
    .SHIFT_FC1   (SHIFT_FC1),
    .SHIFT_FC2   (SHIFT_FC2)
  ) u_core (
    .clk (CLOCK_50), .rst_n,
    .start (start_pulse),
    .pixel_wr_en, .pixel_wr_addr, .pixel_wr_data,
    .pixel_dbg_rd_en, .pixel_dbg_rd_addr,
    .busy, .done,
    .predicted_digit,
    .logits_flat,
    .cycle_count,
    .pixel_dbg_rd_data
  );

  hex_digit_to_7seg u_hex0 (.digit(predicted_digit), .seg_n);

  always_ff @(posedge CLOCK_50 or negedge rst_n) begin
    if (!rst_n)    have_result <= 1'b0;
    else if (done) have_result <= 1'b1;
  end

  always_comb begin
    HEX0 = have_result ? seg_n : 7'h7F;
    LEDR = '0;
    if (have_result) begin
      LEDR[0]   = (predicted_digit == 4'd0);
      LEDR[4:1] = predicted_digit;
    end
  end

endmodule
