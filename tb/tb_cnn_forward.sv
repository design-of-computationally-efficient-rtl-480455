// tb_cnn_forward: end-to-end test of the forward pass. Two copies of the
// network run the same random inputs: one with the built-in multiplier and
// one convolution node, one with the shift-and-add multiplier and two
// convolution nodes. Every layer's output (streamed conv results,
// activation map, scale, null mask, pooled map, scores and probabilities)
// is compared with cnn_ref_pkg; the two-node stream is checked by the
// position it reports. The test also counts how often each mechanism of
// the design occurred (zero-operand skips in the conv and fc layers,
// overflow rescaling, a run with no rescaling, values approximated to
// null, ReLU clamping, both multiplier versions, two convolution nodes
// busy at once) and counts a failure for any that never did.
module tb_cnn_forward;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  localparam int PROB_W = 16, SW = 5;

  logic clk = 0, rst = 1, start = 0;
  logic [IMG_N*IMG_N*DATA_W-1:0]   img = '0;
  logic [K*K*DATA_W-1:0]           conv_w = '0;
  logic [CLASSES*PN*PN*DATA_W-1:0] fc_w = '0;

  // outputs of the two copies: [0] built-in multiplier, [1] shift-and-add
  logic                           conv_valid [2];
  logic signed [ACC_W-1:0]        conv_data [2];
  logic [1:0]                     conv_row [2], conv_col [2];
  logic [CN*CN*DATA_W-1:0]        act_map [2];
  logic [SW-1:0]                  scale [2];
  logic                           overflow [2];
  logic [CN*CN-1:0]               null_mask [2];
  logic [PN*PN*DATA_W-1:0]        pool_map [2];
  logic [CLASSES*ACC_W-1:0]       scores [2];
  logic [CLASSES*PROB_W-1:0]      probs [2];
  logic                           done [2];
  logic                           skip_conv [2], skip_fc [2];

  cnn_forward dut_def (
    .clk, .rst, .start, .img, .conv_w, .fc_w,
    .conv_valid(conv_valid[0]), .conv_data(conv_data[0]),
    .conv_row(conv_row[0]), .conv_col(conv_col[0]), .act_map(act_map[0]),
    .scale(scale[0]), .overflow(overflow[0]), .null_mask(null_mask[0]),
    .pool_map(pool_map[0]), .scores(scores[0]), .probs(probs[0]), .done(done[0]),
    .skip_conv(skip_conv[0]), .skip_fc(skip_fc[0]));

  cnn_forward #(.MULT(MULT_SHIFT_ADD), .CONV_NODES(2)) dut_sa (
    .clk, .rst, .start, .img, .conv_w, .fc_w,
    .conv_valid(conv_valid[1]), .conv_data(conv_data[1]),
    .conv_row(conv_row[1]), .conv_col(conv_col[1]), .act_map(act_map[1]),
    .scale(scale[1]), .overflow(overflow[1]), .null_mask(null_mask[1]),
    .pool_map(pool_map[1]), .scores(scores[1]), .probs(probs[1]), .done(done[1]),
    .skip_conv(skip_conv[1]), .skip_fc(skip_fc[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_conv_skip = 0, n_fc_skip = 0, n_overflow = 0, n_no_overflow = 0;
  int n_null = 0, n_relu = 0, n_done [2] = '{0, 0};
  int stream_idx [2] = '{0, 0};
  result_t cur;

  always @(posedge clk) if (!rst) begin
    if (skip_conv[0]) n_conv_skip++;
    if (skip_fc[0])   n_fc_skip++;
  end

  // streamed conv results, checked at the position they report; the
  // single-node copy must also deliver them in raster order
  int n_parallel = 0;
  for (genvar d = 0; d < 2; d++) begin : g_stream
    always @(posedge clk) if (!rst && conv_valid[d]) begin
      int pos;
      pos = int'(conv_row[d]) * CN + int'(conv_col[d]);
      checks++;
      if (conv_data[d] !== ACC_W'(cur.conv[pos]) || (d == 0 && pos != stream_idx[d])) begin
        failures++;
        $display("copy %0d stream %0d at %0d: %0d", d, stream_idx[d], pos, conv_data[d]);
      end
      stream_idx[d]++;
    end
  end
  always @(posedge clk) if (!rst && dut_sa.u_conv.inflight == 2'b11) n_parallel++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_copy(int d);
    checks++;
    if (stream_idx[d] != CN * CN) begin failures++; $display("copy %0d streamed %0d", d, stream_idx[d]); end
    for (int o = 0; o < CN * CN; o++) begin
      checks++;
      if (act_map[d][(CN*CN-1-o)*DATA_W +: DATA_W] !== DATA_W'(cur.act[o])) begin
        failures++; $display("copy %0d act %0d", d, o);
      end
    end
    checks++;
    if (int'(scale[d]) != cur.scale || overflow[d] !== (cur.scale != 0) ||
        $countones(null_mask[d]) != cur.nulls) begin
      failures++; $display("copy %0d scale %0d expected %0d", d, scale[d], cur.scale);
    end
    for (int q = 0; q < PN * PN; q++) begin
      checks++;
      if (pool_map[d][(PN*PN-1-q)*DATA_W +: DATA_W] !== DATA_W'(cur.pool[q])) begin
        failures++; $display("copy %0d pool %0d", d, q);
      end
    end
    for (int c = 0; c < CLASSES; c++) begin
      checks++;
      if (scores[d][c*ACC_W +: ACC_W] !== ACC_W'(cur.score[c]) ||
          int'(probs[d][c*PROB_W +: PROB_W]) != cur.prob[c]) begin
        failures++;
        $display("copy %0d class %0d: score %0d prob %0d expected %0d %0d", d, c,
                 $signed(scores[d][c*ACC_W +: ACC_W]), probs[d][c*PROB_W +: PROB_W],
                 cur.score[c], cur.prob[c]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 40; t++) begin
      int cyc;
      @(negedge clk);
      for (int i = 0; i < IMG_N * IMG_N; i++) begin
        // alternate between small and full-range pixels
        if (t % 4 == 3) img[i*DATA_W +: DATA_W] = DATA_W'($urandom % 2);
        else            img[i*DATA_W +: DATA_W] = DATA_W'($urandom);
        if ($urandom % 6 == 0) img[i*DATA_W +: DATA_W] = '0;
      end
      for (int i = 0; i < K * K; i++) begin
        conv_w[i*DATA_W +: DATA_W] = (t % 4 == 3) ? DATA_W'($urandom % 2) : DATA_W'($urandom);
        if ($urandom % 5 == 0) conv_w[i*DATA_W +: DATA_W] = '0;
      end
      for (int i = 0; i < CLASSES * PN * PN; i++) begin
        fc_w[i*DATA_W +: DATA_W] = DATA_W'($urandom);
        if ($urandom % 5 == 0) fc_w[i*DATA_W +: DATA_W] = '0;
      end
      cur = forward(img, conv_w, fc_w);
      if (cur.scale != 0) n_overflow++; else n_no_overflow++;
      n_null += cur.nulls;
      n_relu += cur.relu_neg;
      stream_idx = '{0, 0};
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;
      while (!(done[0] && done[1]) && cyc < 5000) begin
        @(negedge clk);
        cyc++;
        if (done[0] && n_done[0] == t) n_done[0]++;
      end
      if (done[1]) n_done[1]++;
      checks++;
      if (!done[0] || !done[1]) begin failures++; $display("run %0d did not finish", t); end
      check_copy(0);
      check_copy(1);
    end
    checks++;
    if (n_conv_skip == 0 || n_fc_skip == 0 || n_overflow == 0 || n_no_overflow == 0 ||
        n_null == 0 || n_relu == 0 || n_done[0] == 0 || n_done[1] == 0 || n_parallel == 0) begin
      failures++;
      $display("mechanism never seen: conv_skip=%0d fc_skip=%0d overflow=%0d no_overflow=%0d null=%0d relu=%0d def=%0d sa=%0d",
               n_conv_skip, n_fc_skip, n_overflow, n_no_overflow, n_null, n_relu, n_done[0], n_done[1]);
    end
    $display("mechanisms: conv_skip=%0d fc_skip=%0d overflow=%0d no_overflow=%0d null=%0d relu=%0d runs_default=%0d runs_shift_add=%0d parallel_node_cycles=%0d",
             n_conv_skip, n_fc_skip, n_overflow, n_no_overflow, n_null, n_relu, n_done[0], n_done[1], n_parallel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
