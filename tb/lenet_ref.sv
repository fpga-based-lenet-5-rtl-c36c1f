// lenet_ref: behavioural golden model of the int8 LeNet-5 inference, used by
// the core and system testbenches. It is written directly from the network
// definition (convolution, max pooling and dense layers as nested loops over
// plain integer arrays) and shares no code with the RTL. Parameters are the
// same hashed values the ROMs hold: weight t of output o of layer r has
// index o*TERMS + t, the bias of output o index OUTS*TERMS + o.
// Requantization: (acc + bias) >>> shift, clamped to 0..32767; fc3 logits
// are acc + bias, unshifted. The model also counts ReLU clamps and
// saturations so that tests can prove both happened.
module lenet_ref #(
  parameter int S1 = 6,
  parameter int S2 = 8,
  parameter int S3 = 9,
  parameter int S4 = 8
) ();

  int n_relu = 0;
  int n_sat  = 0;

  function automatic int pv(int rom, int idx);
    logic [31:0] h;
    h = 32'(idx + 1) * 32'd2654435761;
    h = h ^ (32'(rom + 1) * 32'd2246822519);
    h = h ^ (h >> 15);
    h = h * 32'd739982445;
    h = h ^ (h >> 12);
    return int'($signed(h[7:0])) >>> 1;
  endfunction

  function automatic int requant(longint v, int s);
    longint r;
    r = v >>> s;
    if (r < 0) begin n_relu++; return 0; end
    if (r > 32767) begin n_sat++; return 32767; end
    return int'(r);
  endfunction

  function automatic void infer(input int img [1024], output int logits [10], output int digit);
    int a1 [6*28*28];
    int p1 [6*14*14];
    int a2 [16*10*10];
    int p2 [400];
    int f1 [120];
    int f2 [84];
    longint acc;
    for (int c = 0; c < 6; c++) for (int y = 0; y < 28; y++) for (int x = 0; x < 28; x++) begin
      acc = pv(0, 6 * 25 + c);
      for (int ky = 0; ky < 5; ky++) for (int kx = 0; kx < 5; kx++)
        acc += longint'(img[(y + ky) * 32 + x + kx]) * pv(0, c * 25 + ky * 5 + kx);
      a1[c * 784 + y * 28 + x] = requant(acc, S1);
    end
    for (int c = 0; c < 6; c++) for (int y = 0; y < 14; y++) for (int x = 0; x < 14; x++) begin
      int m = 0;
      for (int dy = 0; dy < 2; dy++) for (int dx = 0; dx < 2; dx++)
        if (a1[c * 784 + (2 * y + dy) * 28 + 2 * x + dx] > m) m = a1[c * 784 + (2 * y + dy) * 28 + 2 * x + dx];
      p1[c * 196 + y * 14 + x] = m;
    end
    for (int c = 0; c < 16; c++) for (int y = 0; y < 10; y++) for (int x = 0; x < 10; x++) begin
      acc = pv(2, 16 * 150 + c);
      for (int ic = 0; ic < 6; ic++) for (int ky = 0; ky < 5; ky++) for (int kx = 0; kx < 5; kx++)
        acc += longint'(p1[ic * 196 + (y + ky) * 14 + x + kx]) * pv(2, c * 150 + ic * 25 + ky * 5 + kx);
      a2[c * 100 + y * 10 + x] = requant(acc, S2);
    end
    for (int c = 0; c < 16; c++) for (int y = 0; y < 5; y++) for (int x = 0; x < 5; x++) begin
      int m = 0;
      for (int dy = 0; dy < 2; dy++) for (int dx = 0; dx < 2; dx++)
        if (a2[c * 100 + (2 * y + dy) * 10 + 2 * x + dx] > m) m = a2[c * 100 + (2 * y + dy) * 10 + 2 * x + dx];
      p2[c * 25 + y * 5 + x] = m;
    end
    for (int n = 0; n < 120; n++) begin
      acc = pv(4, 120 * 400 + n);
      for (int t = 0; t < 400; t++) acc += longint'(p2[t]) * pv(4, n * 400 + t);
      f1[n] = requant(acc, S3);
    end
    for (int n = 0; n < 84; n++) begin
      acc = pv(5, 84 * 120 + n);
      for (int t = 0; t < 120; t++) acc += longint'(f1[t]) * pv(5, n * 120 + t);
      f2[n] = requant(acc, S4);
    end
    digit = 0;
    for (int n = 0; n < 10; n++) begin
      acc = pv(6, 10 * 84 + n);
      for (int t = 0; t < 84; t++) acc += longint'(f2[t]) * pv(6, n * 84 + t);
      logits[n] = int'(acc);
      if (logits[n] > logits[digit]) digit = n;
    end
  endfunction

endmodule
