// lenet_addr_calc: memory address generation for convolution and pooling.
//
// Combinational. From the controller's loop counters it forms the source
// (read) and destination (write) addresses of conv1, pool1, conv2 and pool2.
// Feature maps are stored channel-major, address = ch*H*W + y*W + x, so the
// pool2 output (16x5x5) is already the flattened 400-vector that fc1 reads.
//
// A convolution term index is decoded without division: the input channel
// of conv2 (term_idx / 25) and the kernel row (tap / 5) come from chains of
// range comparisons, and the remainders from one subtraction each. Remaining
// multiplications are by constants. Term indices at or beyond the kernel
// size (padding lanes of the last MAC group) give addresses that the MAC
// array masks off. pool_read_idx 0..3 selects the 2x2 window element
// (0,0), (0,1), (1,0), (1,1) as (dy,dx).
module lenet_addr_calc
  import lenet_pkg::*;
(
  input  logic [3:0]        out_ch,
  input  logic [4:0]        out_y,
  input  logic [4:0]        out_x,
  input  logic [3:0]        pool_ch,
  input  logic [3:0]        pool_y,
  input  logic [3:0]        pool_x,
  input  logic [8:0]        term_idx,
  input  logic [1:0]        pool_read_idx,
  output logic [IMG_AW-1:0] conv1_src_addr,
  output logic [FM_AW-1:0]  conv1_dst_addr,
  output logic [FM_AW-1:0]  pool1_src_addr,
  output logic [FM_AW-1:0]  pool1_dst_addr,
  output logic [FM_AW-1:0]  conv2_src_addr,
  output logic [FM_AW-1:0]  conv2_dst_addr,
  output logic [FM_AW-1:0]  pool2_src_addr,
  output logic [FM_AW-1:0]  pool2_dst_addr
);

  // Kernel row / column of a 5x5 tap by range comparison.
  function automatic logic [2:0] tap_row(logic [8:0] tap);
    if      (tap < 9'd5)  return 3'd0;
    else if (tap < 9'd10) return 3'd1;
    else if (tap < 9'd15) return 3'd2;
    else if (tap < 9'd20) return 3'd3;
    else if (tap < 9'd25) return 3'd4;
    else                  return 3'd5;
  endfunction

  logic [2:0]  c1_ky, c1_kx, c2_ky, c2_kx, c2_ic;
  logic [8:0]  c2_tap;
  logic        dy, dx;

  always_comb begin
    // conv1: term_idx is the tap directly.
    c1_ky = tap_row(term_idx);
    c1_kx = 3'(term_idx - 9'(c1_ky) * 9'd5);

    // conv2: term_idx = ic*25 + tap.
    if      (term_idx < 9'd25)  c2_ic = 3'd0;
    else if (term_idx < 9'd50)  c2_ic = 3'd1;
    else if (term_idx < 9'd75)  c2_ic = 3'd2;
    else if (term_idx < 9'd100) c2_ic = 3'd3;
    else if (term_idx < 9'd125) c2_ic = 3'd4;
    else if (term_idx < 9'd150) c2_ic = 3'd5;
    else                        c2_ic = 3'd6;
    c2_tap = term_idx - 9'(c2_ic) * 9'd25;
    c2_ky  = tap_row(c2_tap);
    c2_kx  = 3'(c2_tap - 9'(c2_ky) * 9'd5);

    dy = pool_read_idx[1];
    dx = pool_read_idx[0];

    conv1_src_addr = IMG_AW'((32'(out_y) + 32'(c1_ky)) * 32 + 32'(out_x) + 32'(c1_kx));
    conv1_dst_addr = FM_AW'(32'(out_ch) * 784 + 32'(out_y) * 28 + 32'(out_x));
    pool1_src_addr = FM_AW'(32'(pool_ch) * 784 + (2 * 32'(pool_y) + 32'(dy)) * 28
                            + 2 * 32'(pool_x) + 32'(dx));
    pool1_dst_addr = FM_AW'(32'(pool_ch) * 196 + 32'(pool_y) * 14 + 32'(pool_x));
    conv2_src_addr = FM_AW'(32'(c2_ic) * 196 + (32'(out_y) + 32'(c2_ky)) * 14
                            + 32'(out_x) + 32'(c2_kx));
    conv2_dst_addr = FM_AW'(32'(out_ch) * 100 + 32'(out_y) * 10 + 32'(out_x));
    pool2_src_addr = FM_AW'(32'(pool_ch) * 100 + (2 * 32'(pool_y) + 32'(dy)) * 10
                            + 2 * 32'(pool_x) + 32'(dx));
    pool2_dst_addr = FM_AW'(32'(pool_ch) * 25 + 32'(pool_y) * 5 + 32'(pool_x));
  end

endmodule
