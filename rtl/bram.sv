// bram: generic synchronous memory with one write port and one read port.
//
// Used for the 32x32 input image copies and the ping-pong feature-map
// buffers. A write happens at the rising clock edge when w_en is high. A
// read returns mem[r_addr] on r_data one clock after r_en is sampled high
// (the fixed one-cycle latency the controller relies on); r_data holds its
// value while r_en is low. Reads and writes to the same address in the same
// cycle return the old word. The memory contents start at zero.
module bram #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned DEPTH  = 8192,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              w_en,
  input  logic [AW-1:0]     w_addr,
  input  logic [DATA_W-1:0] w_data,
  input  logic              r_en,
  input  logic [AW-1:0]     r_addr,
  output logic [DATA_W-1:0] r_data
);

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (w_en) mem[w_addr] <= w_data;
  end

  always_ff @(posedge clk) begin
    if (r_en) r_data <= mem[r_addr];
  end

endmodule
