// lenet_int8_top: LeNet-5 int8 inference core.
//
// One start pulse runs a whole 32x32 image through conv1 (6 5x5 filters),
// 2x2 max pooling, conv2 (16 5x5x6 filters), 2x2 max pooling and the fully
// connected layers fc1 (400->120), fc2 (120->84) and fc3 (84->10), then picks
// the largest logit. All layers are executed one output at a time by a
// single controller on one shared 3-lane MAC array.
//
// Storage. The input image sits in three identical 1024x8 BRAMs, one per MAC
// lane, written together from the host side. Intermediate activations
// ping-pong between feature-map buffers A and B (8192x16 each, also three
// copies so that three lanes read in parallel): conv1 writes A, pool1 A->B,
// conv2 B->A, pool2 A->B, fc1 B->A, fc2 A->B, fc3 reads B and writes the
// logit registers. Parameters come from five packed 24-bit ROMs
// (lenet_param_rom), one word = three int8 weights.
//
// Control. The main FSM walks IDLE -> CONV1 -> POOL1 -> CONV2 -> POOL2 ->
// FC1 -> FC2 -> FC3 -> ARGMAX -> DONE -> IDLE. Convolution and FC outputs
// use the micro-sequence INIT (clear accumulator, present the bias word
// address), READ (present BRAM/ROM addresses; the bias is captured on the
// first READ), ACCUM (register the MAC partial sum), ADD (accumulate, then
// back to READ or on to WRITE once term_idx + 3 >= TERMS) and WRITE (bias,
// shift, ReLU and saturate, store). One output therefore takes
// 2 + 3*ceil(TERMS/3) clocks (29, 152, 404, 122, 86). Pooling outputs use
// POOL_INIT, four POOL_READ/POOL_ACCUM pairs and POOL_WRITE: 10 clocks. The
// memories have a fixed one-cycle read latency, so READ always moves to
// ACCUM without handshaking. The loop counters out_ch/out_y/out_x,
// pool_ch/pool_y/pool_x and neuron_idx run with x innermost.
//
// Interface. start is sampled in IDLE only. busy is high from the clock after
// start until DONE; done is high for the one DONE clock; predicted_digit,
// logits_flat (logit i in bits [32i+31:32i]) and cycle_count then hold the
// result until the next run. cycle_count counts the start clock, every layer
// clock and the ARGMAX clock: 454966 for a full inference. The host writes
// pixels through pixel_wr_*; pixel_dbg_rd_* reads the image back with one
// clock of latency through the lane-0 image copy, which the core owns only
// while conv1 runs (reads issued then return conv1 data).
//
// The layer sizes, memory organisation, lane count, state sequence and cycle
// budget follow the published design. Per-layer shift amounts, the bias
// scale (the int8 bias is added at accumulator scale), the 16-bit saturation
// bound, the unshifted signed 32-bit fc3 logits, the loop order and the
// asynchronous active-low reset are choices of this implementation.
module lenet_int8_top
  import lenet_pkg::*;
#(
  parameter int unsigned SHIFT_CONV1 = 6,
  parameter int unsigned SHIFT_CONV2 = 8,
  parameter int unsigned SHIFT_FC1   = 9,
  parameter int unsigned SHIFT_FC2   = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        pixel_wr_en,
  input  logic [IMG_AW-1:0]           pixel_wr_addr,
  input  logic [PIX_W-1:0]            pixel_wr_data,
  input  logic                        pixel_dbg_rd_en,
  input  logic [IMG_AW-1:0]           pixel_dbg_rd_addr,
  output logic                        busy,
  output logic                        done,
  output logic [3:0]                  predicted_digit,
  output logic [NUM_CLASSES*ACC_W-1:0] logits_flat,
  output logic [23:0]                 cycle_count,
  output logic [PIX_W-1:0]            pixel_dbg_rd_data
);

  localparam int unsigned L = MAC_LANES;

  typedef enum logic [3:0] {
    ST_IDLE,
    ST_INIT,
    ST_READ,
    ST_ACCUM,
    ST_ADD,
    ST_WRITE,
    ST_POOL_INIT,
    ST_POOL_READ,
    ST_POOL_ACCUM,
    ST_POOL_WRITE,
    ST_ARGMAX,
    ST_DONE
  } state_e;

  // ---------------------------------------------------------------- state
  state_e                  state;
  layer_e                  layer;
  logic [3:0]              out_ch;
  logic [4:0]              out_y, out_x;
  logic [3:0]              pool_ch, pool_y, pool_x;
  logic [6:0]              neuron_idx;
  logic [8:0]              term_idx;
  logic [7:0]              term_word_idx;
  logic [1:0]              pool_read_idx;
  logic signed [ACC_W-1:0] acc_reg, mac_partial_sum_r;
  logic signed [W_W-1:0]   bias_reg;
  logic [ACT_W-1:0]        pool_max_reg;
  logic signed [ACC_W-1:0] logits [NUM_CLASSES];

  // ------------------------------------------------------ layer constants
  logic [8:0]  term_limit;
  logic [8:0]  wpo;          // packed ROM words per output
  logic [4:0]  shift;
  logic [6:0]  out_idx;      // filter or neuron owning the current output

  always_comb begin
    unique case (layer)
      L_CONV1: begin term_limit = 9'(CONV1_TERMS); wpo = 9'(words_per_out(CONV1_TERMS)); shift = 5'(SHIFT_CONV1); end
      L_CONV2: begin term_limit = 9'(CONV2_TERMS); wpo = 9'(words_per_out(CONV2_TERMS)); shift = 5'(SHIFT_CONV2); end
      L_FC1:   begin term_limit = 9'(FC1_TERMS);   wpo = 9'(words_per_out(FC1_TERMS));   shift = 5'(SHIFT_FC1);   end
      L_FC2:   begin term_limit = 9'(FC2_TERMS);   wpo = 9'(words_per_out(FC2_TERMS));   shift = 5'(SHIFT_FC2);   end
      L_FC3:   begin term_limit = 9'(FC3_TERMS);   wpo = 9'(words_per_out(FC3_TERMS));   shift = 5'd0;            end
      default: begin term_limit = 9'd4;            wpo = 9'd1;                           shift = 5'd0;            end
    endcase
    out_idx = (layer == L_CONV1 || layer == L_CONV2) ? 7'(out_ch) : neuron_idx;
  end

  // ------------------------------------------------------------ addresses
  logic [IMG_AW-1:0] conv1_src [L];
  logic [FM_AW-1:0]  conv2_src [L];
  logic [FM_AW-1:0]  conv1_dst, pool1_src, pool1_dst, conv2_dst, pool2_src, pool2_dst;

  for (genvar l = 0; l < L; l++) begin : g_addr
    logic [FM_AW-1:0] c1d, p1s, p1d, c2d, p2s, p2d;
    lenet_addr_calc u_addr (
      .out_ch, .out_y, .out_x, .pool_ch, .pool_y, .pool_x,
      .term_idx       (term_idx + 9'(l)),
      .pool_read_idx,
      .conv1_src_addr (conv1_src[l]),
      .conv1_dst_addr (c1d),
      .pool1_src_addr (p1s),
      .pool1_dst_addr (p1d),
      .conv2_src_addr (conv2_src[l]),
      .conv2_dst_addr (c2d),
      .pool2_src_addr (p2s),
      .pool2_dst_addr (p2d)
    );
    if (l == 0) begin : g_lane0
      assign conv1_dst = c1d;
      assign pool1_src = p1s;
      assign pool1_dst = p1d;
      assign conv2_dst = c2d;
      assign pool2_src = p2s;
      assign pool2_dst = p2d;
    end
  end

  // --------------------------------------------------------- memory ports
  logic              conv_rd, pool_rd, in_conv1;
  logic              fm_rd_from_a, fm_wr_to_a, fm_wr;
  logic [FM_AW-1:0]  fm_raddr [L];
  logic [FM_AW-1:0]  fm_waddr;
  logic [ACT_W-1:0]  fm_wdata, q_value;
  logic [IMG_AW-1:0] img_raddr [L];
  logic              img_ren [L];
  logic [PIX_W-1:0]  img_rdata [L];
  logic [ACT_W-1:0]  fma_rdata [L], fmb_rdata [L], fm_rdata [L];

  always_comb begin
    conv_rd  = (state == ST_READ);
    pool_rd  = (state == ST_POOL_READ);
    in_conv1 = (state != ST_IDLE) && (layer == L_CONV1);
    // Buffer that holds the input of the current layer.
    fm_rd_from_a = (layer == L_POOL1) || (layer == L_POOL2) || (layer == L_FC2);
    fm_wr_to_a   = (layer == L_CONV1) || (layer == L_CONV2) || (layer == L_FC1);
    fm_wr        = ((state == ST_WRITE) && (layer != L_FC3)) || (state == ST_POOL_WRITE);

    for (int l = 0; l < L; l++) begin
      img_raddr[l] = conv1_src[l];
      img_ren[l]   = conv_rd && (layer == L_CONV1);
      unique case (layer)
        L_POOL1: fm_raddr[l] = pool1_src;
        L_CONV2: fm_raddr[l] = conv2_src[l];
        L_POOL2: fm_raddr[l] = pool2_src;
        default: fm_raddr[l] = FM_AW'(term_idx + 9'(l));   // fc layers
      endcase
      fm_rdata[l] = fm_rd_from_a ? fma_rdata[l] : fmb_rdata[l];
    end
    // Host read-back shares the lane-0 image copy outside conv1.
    if (!in_conv1) begin
      img_raddr[0] = pixel_dbg_rd_addr;
      img_ren[0]   = pixel_dbg_rd_en;
    end

    unique case (layer)
      L_CONV1: fm_waddr = conv1_dst;
      L_POOL1: fm_waddr = pool1_dst;
      L_CONV2: fm_waddr = conv2_dst;
      L_POOL2: fm_waddr = pool2_dst;
      default: fm_waddr = FM_AW'(neuron_idx);
    endcase
    fm_wdata = (state == ST_POOL_WRITE) ? pool_max_reg : q_value;
  end

  assign pixel_dbg_rd_data = img_rdata[0];

  for (genvar l = 0; l < L; l++) begin : g_mem
    bram #(.DATA_W(PIX_W), .DEPTH(IMG_DEPTH)) u_img (
      .clk, .w_en(pixel_wr_en), .w_addr(pixel_wr_addr), .w_data(pixel_wr_data),
      .r_en(img_ren[l]), .r_addr(img_raddr[l]), .r_data(img_rdata[l])
    );
    bram #(.DATA_W(ACT_W), .DEPTH(FM_DEPTH)) u_fm_a (
      .clk, .w_en(fm_wr && fm_wr_to_a), .w_addr(fm_waddr), .w_data(fm_wdata),
      .r_en((conv_rd || pool_rd) && fm_rd_from_a), .r_addr(fm_raddr[l]), .r_data(fma_rdata[l])
    );
    bram #(.DATA_W(ACT_W), .DEPTH(FM_DEPTH)) u_fm_b (
      .clk, .w_en(fm_wr && !fm_wr_to_a), .w_addr(fm_waddr), .w_data(fm_wdata),
      .r_en((conv_rd || pool_rd) && !fm_rd_from_a), .r_addr(fm_raddr[l]), .r_data(fmb_rdata[l])
    );
  end

  // ------------------------------------------------------- parameter ROMs
  logic [14:0]      rom_addr;
  logic             rom_ren;
  logic [ROM_W-1:0] rom_c1, rom_c2, rom_f1, rom_f2, rom_f3, rom_word;

  always_comb begin
    // INIT presents the bias word, READ the current weight word.
    rom_addr = 15'(out_idx) * 15'(wpo)
             + ((state == ST_INIT) ? 15'(wpo - 9'd1) : 15'(term_word_idx));
    rom_ren  = (state == ST_INIT) || (state == ST_READ);
    unique case (layer)
      L_CONV1: rom_word = rom_c1;
      L_CONV2: rom_word = rom_c2;
      L_FC1:   rom_word = rom_f1;
      L_FC2:   rom_word = rom_f2;
      default: rom_word = rom_f3;
    endcase
  end

  lenet_param_rom #(.LAYER(int'(L_CONV1)), .TERMS(CONV1_TERMS), .OUTS(CONV1_OUTS)) u_rom_conv1 (
    .clk, .r_en(rom_ren && layer == L_CONV1), .r_addr(rom_addr[5:0]), .r_data(rom_c1));
  lenet_param_rom #(.LAYER(int'(L_CONV2)), .TERMS(CONV2_TERMS), .OUTS(CONV2_OUTS)) u_rom_conv2 (
    .clk, .r_en(rom_ren && layer == L_CONV2), .r_addr(rom_addr[9:0]), .r_data(rom_c2));
  lenet_param_rom #(.LAYER(int'(L_FC1)), .TERMS(FC1_TERMS), .OUTS(FC1_OUTS)) u_rom_fc1 (
    .clk, .r_en(rom_ren && layer == L_FC1), .r_addr(rom_addr[13:0]), .r_data(rom_f1));
  lenet_param_rom #(.LAYER(int'(L_FC2)), .TERMS(FC2_TERMS), .OUTS(FC2_OUTS)) u_rom_fc2 (
    .clk, .r_en(rom_ren && layer == L_FC2), .r_addr(rom_addr[11:0]), .r_data(rom_f2));
  lenet_param_rom #(.LAYER(int'(L_FC3)), .TERMS(FC3_TERMS), .OUTS(FC3_OUTS)) u_rom_fc3 (
    .clk, .r_en(rom_ren && layer == L_FC3), .r_addr(rom_addr[8:0]), .r_data(rom_f3));

  // ------------------------------------------------------------- datapath
  logic [L*ACT_W-1:0]      mac_act;
  logic [L-1:0]            mac_mask;
  logic signed [ACC_W-1:0] mac_partial_sum;
  logic [NUM_CLASSES*ACC_W-1:0] logits_packed;
  logic [3:0]              argmax_digit;

  always_comb begin
    for (int l = 0; l < L; l++) begin
      mac_act[l*ACT_W +: ACT_W] = (layer == L_CONV1) ? ACT_W'(img_rdata[l]) : fm_rdata[l];
      mac_mask[l] = (10'(term_idx) + 10'(l)) < 10'(term_limit);
    end
    for (int i = 0; i < NUM_CLASSES; i++) logits_packed[i*ACC_W +: ACC_W] = logits[i];
  end

  lenet_mac_array #(.LANES(L)) u_mac (
    .activations_flat (mac_act),
    .weights_flat     (rom_word),
    .valid_mask       (mac_mask),
    .partial_sum      (mac_partial_sum)
  );

  lenet_quantize #(.IN_W(ACC_W), .OUT_W(ACT_W)) u_quant (
    .value_in    (acc_reg),
    .bias_in     (bias_reg),
    .shift_right (shift),
    .value_out   (q_value)
  );

  lenet_argmax #(.N(NUM_CLASSES)) u_argmax (
    .logits_flat (logits_packed),
    .digit       (argmax_digit)
  );

  assign logits_flat = logits_packed;
  assign busy        = (state != ST_IDLE);
  assign done        = (state == ST_DONE);

  // ---------------------------------------------------------- controller
  logic conv_last_out, pool_last_out;

  always_comb begin
    unique case (layer)
      L_CONV1: conv_last_out = (out_ch == 4'd5)  && (out_y == 5'd27) && (out_x == 5'd27);
      L_CONV2: conv_last_out = (out_ch == 4'd15) && (out_y == 5'd9)  && (out_x == 5'd9);
      L_FC1:   conv_last_out = (neuron_idx == 7'(FC1_OUTS - 1));
      L_FC2:   conv_last_out = (neuron_idx == 7'(FC2_OUTS - 1));
      default: conv_last_out = (neuron_idx == 7'(FC3_OUTS - 1));
    endcase
    if (layer == L_POOL1)
      pool_last_out = (pool_ch == 4'd5)  && (pool_y == 4'd13) && (pool_x == 4'd13);
    else
      pool_last_out = (pool_ch == 4'd15) && (pool_y == 4'd4)  && (pool_x == 4'd4);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state             <= ST_IDLE;
      layer             <= L_CONV1;
      out_ch            <= '0;
      out_y             <= '0;
      out_x             <= '0;
      pool_ch           <= '0;
      pool_y            <= '0;
      pool_x            <= '0;
      neuron_idx        <= '0;
      term_idx          <= '0;
      term_word_idx     <= '0;
      pool_read_idx     <= '0;
      acc_reg           <= '0;
      mac_partial_sum_r <= '0;
      bias_reg          <= '0;
      pool_max_reg      <= '0;
      predicted_digit   <= '0;
      cycle_count       <= '0;
      for (int i = 0; i < NUM_CLASSES; i++) logits[i] <= '0;
    end else begin
      if (state != ST_IDLE && state != ST_DONE) cycle_count <= cycle_count + 24'd1;

      unique case (state)
        ST_IDLE: if (start) begin
          state       <= ST_INIT;
          layer       <= L_CONV1;
          out_ch      <= '0;
          out_y       <= '0;
          out_x       <= '0;
          pool_ch     <= '0;
          pool_y      <= '0;
          pool_x      <= '0;
          neuron_idx  <= '0;
          cycle_count <= 24'd1;
        end

        // ---- convolution / fully connected micro-FSM
        ST_INIT: begin
          acc_reg       <= '0;
          term_idx      <= '0;
          term_word_idx <= '0;
          state         <= ST_READ;
        end
        ST_READ: begin
          if (term_idx == '0) bias_reg <= signed'(rom_word[W_W-1:0]);
          state <= ST_ACCUM;
        end
        ST_ACCUM: begin
          mac_partial_sum_r <= mac_partial_sum;
          state             <= ST_ADD;
        end
        ST_ADD: begin
          acc_reg <= acc_reg + mac_partial_sum_r;
          if (10'(term_idx) + 10'(L) >= 10'(term_limit)) begin
            state <= ST_WRITE;
          end else begin
            term_idx      <= term_idx + 9'(L);
            term_word_idx <= term_word_idx + 8'd1;
            state         <= ST_READ;
          end
        end
        ST_WRITE: begin
          if (layer == L_FC3)
            logits[neuron_idx[3:0]] <= acc_reg + ACC_W'(bias_reg);
          if (!conv_last_out) begin
            state <= ST_INIT;
            if (layer == L_CONV1 || layer == L_CONV2) begin
              if (out_x == ((layer == L_CONV1) ? 5'd27 : 5'd9)) begin
                out_x <= '0;
                if (out_y == ((layer == L_CONV1) ? 5'd27 : 5'd9)) begin
                  out_y  <= '0;
                  out_ch <= out_ch + 4'd1;
                end else begin
                  out_y <= out_y + 5'd1;
                end
              end else begin
                out_x <= out_x + 5'd1;
              end
            end else begin
              neuron_idx <= neuron_idx + 7'd1;
            end
          end else begin
            out_ch     <= '0;
            out_y      <= '0;
            out_x      <= '0;
            neuron_idx <= '0;
            unique case (layer)
              L_CONV1: begin layer <= L_POOL1; state <= ST_POOL_INIT; end
              L_CONV2: begin layer <= L_POOL2; state <= ST_POOL_INIT; end
              L_FC1:   begin layer <= L_FC2;   state <= ST_INIT;      end
              L_FC2:   begin layer <= L_FC3;   state <= ST_INIT;      end
              default: state <= ST_ARGMAX;
            endcase
          end
        end

        // ---- pooling micro-FSM
        ST_POOL_INIT: begin
          pool_read_idx <= '0;
          pool_max_reg  <= '0;
          state         <= ST_POOL_READ;
        end
        ST_POOL_READ: state <= ST_POOL_ACCUM;
        ST_POOL_ACCUM: begin
          if (fm_rdata[0] > pool_max_reg) pool_max_reg <= fm_rdata[0];
          if (pool_read_idx == 2'd3) begin
            state <= ST_POOL_WRITE;
          end else begin
            pool_read_idx <= pool_read_idx + 2'd1;
            state         <= ST_POOL_READ;
          end
        end
        ST_POOL_WRITE: begin
          if (!pool_last_out) begin
            state <= ST_POOL_INIT;
            if (pool_x == ((layer == L_POOL1) ? 4'd13 : 4'd4)) begin
              pool_x <= '0;
              if (pool_y == ((layer == L_POOL1) ? 4'd13 : 4'd4)) begin
                pool_y  <= '0;
                pool_ch <= pool_ch + 4'd1;
              end else begin
                pool_y <= pool_y + 4'd1;
              end
            end else begin
              pool_x <= pool_x + 4'd1;
            end
          end else begin
            pool_ch <= '0;
            pool_y  <= '0;
            pool_x  <= '0;
            layer   <= (layer == L_POOL1) ? L_CONV2 : L_FC1;
            state   <= ST_INIT;
          end
        end

        ST_ARGMAX: begin
          predicted_digit <= argmax_digit;
          state           <= ST_DONE;
        end
        ST_DONE: state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
