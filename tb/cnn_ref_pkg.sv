// cnn_ref_pkg: reference model of the cnn_forward chain at its default
// sizes (6x6 input, 3x3 filter, 4-bit data, 16-bit sums, four classes),
// written with plain integer and floating-point arithmetic for the
// testbenches. Tensors use the same packing as the design: element (0,0)
// in the most significant position.
package cnn_ref_pkg;
  localparam int IMG_N = 6, K = 3, DATA_W = 4, ACC_W = 16, CLASSES = 4;
  localparam int CN = IMG_N - K + 1, PN = CN / 2;

  typedef int conv_t  [CN*CN];
  typedef int pool_t  [PN*PN];
  typedef int class_t [CLASSES];

  typedef struct {
    conv_t  conv;     // raw convolution results, raster order
    int     scale;    // shared right shift
    conv_t  act;      // activations after ReLU and scaling
    int     nulls;    // activations approximated to zero
    int     relu_neg; // negative conv results clamped by ReLU
    pool_t  pool;     // pooled map, raster order
    class_t score;    // fully connected scores
    class_t prob;     // probabilities, 1.0 = 32768
    int     conv_zero_ops; // skipped multiplies in the conv layer
    int     fc_zero_ops;   // skipped multiplies in the fc layer
  } result_t;

  function automatic int el(logic [1023:0] v, int n, int idx);
    return int'($signed(v[(n-1-idx)*DATA_W +: DATA_W]));
  endfunction

  function automatic int wrap16(int v);
    return int'($signed(16'(v)));
  endfunction

  function automatic result_t forward(logic [IMG_N*IMG_N*DATA_W-1:0] img,
                                      logic [K*K*DATA_W-1:0] cw,
                                      logic [CLASSES*PN*PN*DATA_W-1:0] fcw);
    result_t r;
    int relu_v [CN*CN];
    real ex [CLASSES];
    real tot;
    longint e [CLASSES];
    longint esum;
    r.conv_zero_ops = 0;
    r.fc_zero_ops = 0;
    r.relu_neg = 0;
    r.nulls = 0;
    for (int o = 0; o < CN * CN; o++) begin
      int acc;
      acc = 0;
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++) begin
          int p, w;
          p = el(1024'(img), IMG_N * IMG_N, (o / CN + i) * IMG_N + (o % CN + j));
          w = el(1024'(cw), K * K, i * K + j);
          if (p == 0 || w == 0) r.conv_zero_ops++;
          acc += p * w;
        end
      r.conv[o] = wrap16(acc);
      relu_v[o] = (r.conv[o] < 0) ? 0 : r.conv[o];
      if (r.conv[o] < 0) r.relu_neg++;
    end
    // smallest shift that brings every activation into [-8, 7]
    for (int s = ACC_W - DATA_W; s >= 0; s--) begin
      bit ok;
      ok = 1;
      for (int o = 0; o < CN * CN; o++)
        if ((relu_v[o] >>> s) > 7) ok = 0;
      if (ok) r.scale = s;
    end
    for (int o = 0; o < CN * CN; o++) begin
      r.act[o] = relu_v[o] >>> r.scale;
      if (relu_v[o] != 0 && r.act[o] == 0) r.nulls++;
    end
    for (int q = 0; q < PN * PN; q++) begin
      int best;
      best = -1000;
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) begin
          int v;
          v = r.act[((q / PN) * 2 + i) * CN + (q % PN) * 2 + j];
          if (v > best) best = v;
        end
      r.pool[q] = best;
    end
    for (int c = 0; c < CLASSES; c++) begin
      int acc;
      acc = 0;
      for (int q = 0; q < PN * PN; q++) begin
        int w;
        w = el(1024'(fcw[c*PN*PN*DATA_W +: PN*PN*DATA_W]), PN * PN, q);
        if (w == 0 || r.pool[q] == 0) r.fc_zero_ops++;
        acc += r.pool[q] * w;
      end
      r.score[c] = wrap16(acc);
    end
    // softmax: scores read as fixed point with 8 fraction bits; the
    // exponentials are rounded to 16 fraction bits as the lookup table does
    esum = 0;
    for (int c = 0; c < CLASSES; c++) begin
      int s;
      s = r.score[c];
      if (s > 2047) s = 2047;
      if (s < -2048) s = -2048;
      e[c] = longint'($floor($exp(real'(s) / 256.0) * 65536.0 + 0.5));
      esum += e[c];
    end
    for (int c = 0; c < CLASSES; c++)
      r.prob[c] = int'((e[c] * 32768) / esum);
    return r;
  endfunction
endpackage
