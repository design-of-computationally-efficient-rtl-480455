// tb_softmax: random score vectors; each probability is compared with
// exp(s_c) / sum_k exp(s_k) computed here in floating point, scaled to
// 2^15, allowing a small error for the table rounding. Also checks that
// the probabilities add up to about 1.0.
module tb_softmax;
  localparam int CLASSES = 4, IN_W = 12, PROB_W = 16;
  logic clk = 0, rst = 1, start = 0;
  logic [CLASSES*IN_W-1:0] scores = '0;
  logic [CLASSES*PROB_W-1:0] probs;
  logic done;
  int checks = 0, failures = 0;

  softmax dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 100; t++) begin
      real ex [CLASSES];
      real tot;
      int cyc, psum;
      @(negedge clk);
      tot = 0.0;
      for (int c = 0; c < CLASSES; c++) begin
        logic signed [IN_W-1:0] s;
        s = IN_W'($urandom);
        if (t == 0) s = 0;
        scores[c*IN_W +: IN_W] = s;
        ex[c] = $exp(real'(s) / 256.0);
        tot += ex[c];
      end
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
      psum = 0;
      for (int c = 0; c < CLASSES; c++) begin
        real want, got;
        want = ex[c] / tot * 32768.0;
        got  = real'(probs[c*PROB_W +: PROB_W]);
        psum += int'(probs[c*PROB_W +: PROB_W]);
        checks++;
        if (got - want > 3.0 || want - got > 3.0) begin
          failures++;
          $display("class %0d: %0d expected %f", c, probs[c*PROB_W +: PROB_W], want);
        end
      end
      checks++;
      if (psum > 32768 || psum < 32768 - CLASSES) begin failures++; $display("sum of probabilities %0d", psum); end
      if (t == 0) begin
        checks++;
        if (probs != {4{16'd8192}}) begin failures++; $display("equal scores give %h", probs); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
