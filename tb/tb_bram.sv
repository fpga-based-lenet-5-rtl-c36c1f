// tb_bram: self-checking test of the generic synchronous memory.
// Writes random words to a 64-entry instance, then checks one-cycle read
// latency, that r_data holds while r_en is low, and that a read of the
// address being written in the same clock returns the old word.
module tb_bram;
  localparam int unsigned DW = 16, DEPTH = 64, AW = $clog2(DEPTH);
  logic clk = 0;
  logic w_en = 0, r_en = 0;
  logic [AW-1:0] w_addr = '0, r_addr = '0;
  logic [DW-1:0] w_data = '0, r_data;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  bram #(.DATA_W(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [DW-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Initial contents are zero.
    @(negedge clk); r_en = 1; r_addr = 5;
    @(negedge clk); check(r_data, '0, "initial zero");
    r_en = 0;
    // Fill.
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = DW'($urandom);
      w_en = 1; w_addr = AW'(i); w_data = model[i];
      @(negedge clk);
    end
    w_en = 0;
    // Read back in random order with one clock of latency.
    for (int n = 0; n < 200; n++) begin
      int a = $urandom_range(DEPTH - 1);
      r_en = 1; r_addr = AW'(a);
      @(negedge clk);
      check(r_data, model[a], "read");
      // Hold while r_en is low.
      r_en = 0; r_addr = AW'($urandom);
      @(negedge clk);
      check(r_data, model[a], "hold");
    end
    // Read during write: old data returned, new data stored.
    r_en = 1; r_addr = 7; w_en = 1; w_addr = 7; w_data = ~model[7];
    @(negedge clk);
    check(r_data, model[7], "read-during-write old");
    model[7] = ~model[7];
    w_en = 0;
    @(negedge clk);
    check(r_data, model[7], "read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
