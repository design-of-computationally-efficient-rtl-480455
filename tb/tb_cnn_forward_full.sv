// tb_cnn_forward_full: the forward pass at the top's default sizes (no
// parameter overrides). Runs a handful of complete inferences of random
// 6x6 images through conv, ReLU, scaling, pooling, fully connected and
// softmax and compares the pooled map, the scores and the probabilities
// with cnn_ref_pkg; also checks that each inference finishes within its
// expected cycle budget.
module tb_cnn_forward_full;
  import cnn_ref_pkg::*;
  localparam int PROB_W = 16;

  logic clk = 0, rst = 1, start = 0;
  logic [IMG_N*IMG_N*DATA_W-1:0]   img = '0;
  logic [K*K*DATA_W-1:0]           conv_w = '0;
  logic [CLASSES*PN*PN*DATA_W-1:0] fc_w = '0;
  logic                            conv_valid, overflow, done, skip_conv, skip_fc;
  logic signed [ACC_W-1:0]         conv_data;
  logic [1:0]                      conv_row, conv_col;
  logic [CN*CN*DATA_W-1:0]         act_map;
  logic [4:0]                      scale;
  logic [CN*CN-1:0]                null_mask;
  logic [PN*PN*DATA_W-1:0]         pool_map;
  logic [CLASSES*ACC_W-1:0]        scores;
  logic [CLASSES*PROB_W-1:0]       probs;
  int checks = 0, failures = 0;
  result_t cur;

  cnn_forward dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 10; t++) begin
      int cyc;
      @(negedge clk);
      img    = {$urandom, $urandom, $urandom, $urandom, $urandom};
      conv_w = {$urandom, $urandom};
      fc_w   = {$urandom, $urandom};
      cur = forward(img, conv_w, fc_w);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;
      while (!done && cyc < 5000) begin @(negedge clk); cyc++; end
      if (t == 0) $display("inference took %0d cycles", cyc);
      // conv: 16 windows of at most 9*2+1 cycles plus handover; pool 16;
      // fc: at most 4*2+1; softmax: 4*2 lookups and 4*66 division cycles
      checks++;
      if (!done || cyc > 16 * 21 + 20 + 12 + 8 + 4 * 67 + 20) begin
        failures++; $display("run %0d took %0d cycles", t, cyc);
      end
      checks++;
      if (int'(scale) != cur.scale) begin failures++; $display("scale %0d expected %0d", scale, cur.scale); end
      for (int q = 0; q < PN * PN; q++) begin
        checks++;
        if (pool_map[(PN*PN-1-q)*DATA_W +: DATA_W] !== DATA_W'(cur.pool[q])) begin
          failures++; $display("pool %0d", q);
        end
      end
      for (int c = 0; c < CLASSES; c++) begin
        checks++;
        if (scores[c*ACC_W +: ACC_W] !== ACC_W'(cur.score[c]) ||
            int'(probs[c*PROB_W +: PROB_W]) != cur.prob[c]) begin
          failures++;
          $display("class %0d: score %0d prob %0d expected %0d %0d", c,
                   $signed(scores[c*ACC_W +: ACC_W]), probs[c*PROB_W +: PROB_W], cur.score[c], cur.prob[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
