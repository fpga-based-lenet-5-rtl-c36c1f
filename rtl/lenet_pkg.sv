// lenet_pkg: shared constants, types and the parameter-value formula of the
// LeNet-5 int8 inference core.
//
// The network shape (32x32x1 input, 5x5 convolutions with 6 and 16 filters,
// 2x2 max pooling, fully connected layers of 120, 84 and 10 neurons) and the
// three-lane multiply-accumulate datapath follow the published design. The
// trained int8 weights and biases of the original are not available, so the
// parameter ROMs are filled from a fixed integer hash (param_value below);
// a real deployment replaces that formula with the exported trained values.
package lenet_pkg;

  // Number of parallel MAC lanes; every parameter ROM word packs this many
  // int8 values and every activation memory is replicated this many times.
  localparam int unsigned MAC_LANES = 3;

  localparam int unsigned PIX_W  = 8;   // uint8 input pixels
  localparam int unsigned ACT_W  = 16;  // feature-map word width
  localparam int unsigned W_W    = 8;   // int8 weights and biases
  localparam int unsigned ACC_W  = 32;  // accumulator / logit width
  localparam int unsigned ROM_W  = MAC_LANES * W_W;

  localparam int unsigned IMG_SIDE  = 32;
  localparam int unsigned IMG_DEPTH = IMG_SIDE * IMG_SIDE;
  localparam int unsigned FM_DEPTH  = 8192;
  localparam int unsigned FM_AW     = $clog2(FM_DEPTH);
  localparam int unsigned IMG_AW    = $clog2(IMG_DEPTH);
  localparam int unsigned NUM_CLASSES = 10;

  // Layer indices, also used as the ROM selector of the parameter formula.
  typedef enum logic [2:0] {
    L_CONV1 = 3'd0,
    L_POOL1 = 3'd1,
    L_CONV2 = 3'd2,
    L_POOL2 = 3'd3,
    L_FC1   = 3'd4,
    L_FC2   = 3'd5,
    L_FC3   = 3'd6
  } layer_e;

  // Multiply-accumulate terms per output and outputs per layer.
  localparam int unsigned CONV1_TERMS = 25,  CONV1_OUTS = 6;
  localparam int unsigned CONV2_TERMS = 150, CONV2_OUTS = 16;
  localparam int unsigned FC1_TERMS   = 400, FC1_OUTS   = 120;
  localparam int unsigned FC2_TERMS   = 120, FC2_OUTS   = 84;
  localparam int unsigned FC3_TERMS   = 84,  FC3_OUTS   = 10;

  // Packed ROM words for one output: the weight words plus one bias word.
  function automatic int unsigned words_per_out(int unsigned terms);
    return (terms + MAC_LANES - 1) / MAC_LANES + 1;
  endfunction

  // Parameter formula. Weights of output o, term t have logical index
  // o*terms + t; the bias of output o has index outs*terms + o. The value is
  // a multiplicative hash of (rom, index) reduced to the range -64..63.
  function automatic logic signed [W_W-1:0] param_value(int unsigned rom, int unsigned idx);
    logic [31:0] h;
    h = (idx + 32'd1) * 32'h9E37_79B1;
    h = h ^ ((rom + 32'd1) * 32'h85EB_CA77);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    return W_W'(signed'(h[7:0]) >>> 1);
  endfunction

endpackage
