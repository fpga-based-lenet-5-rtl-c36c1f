// axi_lite_host: behavioural AXI4-Lite master standing in for the HPS
// lightweight bridge in testbenches. write32/read32 perform one transfer
// each; the address and data channels of a write are raised with an
// independent random skew, and BREADY/RREADY are delayed by a random 0..3
// clocks so that the slave sees back-pressure. It also checks the
// handshake rule that a slave's VALID stays high until it is accepted.
module axi_lite_host (
  input  logic        clk,
  output logic [15:0] awaddr,
  output logic        awvalid,
  input  logic        awready,
  output logic [31:0] wdata,
  output logic [3:0]  wstrb,
  output logic        wvalid,
  input  logic        wready,
  input  logic [1:0]  bresp,
  input  logic        bvalid,
  output logic        bready,
  output logic [15:0] araddr,
  output logic        arvalid,
  input  logic        arready,
  input  logic [31:0] rdata,
  input  logic [1:0]  rresp,
  input  logic        rvalid,
  output logic        rready
);

  int protocol_errors = 0;
  int backpressure_cycles = 0;
  logic bvalid_q = 0, rvalid_q = 0, bready_q = 0, rready_q = 0;

  initial begin
    awaddr = '0; awvalid = 0; wdata = '0; wstrb = 4'hF; wvalid = 0; bready = 0;
    araddr = '0; arvalid = 0; rready = 0;
  end

  // VALID must stay high until READY.
  always @(posedge clk) begin
    if (bvalid_q && !bready_q && !bvalid) protocol_errors++;
    if (rvalid_q && !rready_q && !rvalid) protocol_errors++;
    if ((bvalid && !bready) || (rvalid && !rready)) backpressure_cycles++;
    bvalid_q <= bvalid; rvalid_q <= rvalid; bready_q <= bready; rready_q <= rready;
  end

  task automatic write32(input logic [15:0] addr, input logic [31:0] data);
    bit aw_done = 0, w_done = 0;
    int skew = $urandom_range(0, 2);
    @(negedge clk);
    awaddr = addr; wdata = data;
    awvalid = 1;
    if (skew == 0) wvalid = 1;
    while (!(aw_done && w_done)) begin
      @(posedge clk);
      if (awvalid && awready) aw_done = 1;
      if (wvalid && wready) w_done = 1;
      @(negedge clk);
      if (aw_done) awvalid = 0;
      if (w_done) wvalid = 0;
      if (!w_done) wvalid = 1;
    end
    repeat ($urandom_range(0, 3)) @(negedge clk);
    bready = 1;
    do @(posedge clk); while (!bvalid);
    if (bresp != 2'b00) protocol_errors++;
    @(negedge clk);
    bready = 0;
  endtask

  task automatic read32(input logic [15:0] addr, output logic [31:0] data);
    @(negedge clk);
    araddr = addr; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    rready = 1;
    do @(posedge clk); while (!rvalid);
    data = rdata;
    if (rresp != 2'b00) protocol_errors++;
    @(negedge clk);
    rready = 0;
  endtask

endmodule
