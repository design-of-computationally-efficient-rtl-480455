// tb_maxpool: the 4x4 tensor 0123456789abcdef must pool to fd75; random
// tensors are compared with a signed 2x2 maximum per window. Also checks
// that done is visible 16 rising edges after the one that took en (one element per cycle).
module tb_maxpool;
  localparam int N = 4, P = 2, DATA_W = 4, NW = 4;
  logic clk = 0, rst = 1, en = 0;
  logic [N*N*DATA_W-1:0] in_flat = '0;
  logic [NW*DATA_W-1:0] out_flat;
  logic done;
  int checks = 0, failures = 0;

  maxpool dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 300; t++) begin
      logic [NW*DATA_W-1:0] expv;
      int cyc;
      @(negedge clk);
      in_flat = (t == 0) ? 64'h0123456789abcdef : {$urandom, $urandom};
      for (int w = 0; w < NW; w++) begin
        int best;
        best = -100;
        for (int e = 0; e < P * P; e++) begin
          int r, c, v;
          r = (w / (N / P)) * P + e / P;
          c = (w % (N / P)) * P + e % P;
          v = int'($signed(in_flat[(N*N-1-(r*N+c))*DATA_W +: DATA_W]));
          if (v > best) best = v;
        end
        expv[w*DATA_W +: DATA_W] = DATA_W'(best);
      end
      if (t == 0) begin
        checks++;
        if (expv != 16'hfd75) begin failures++; $display("reference gives %h", expv); end
      end
      en = 1;
      @(negedge clk);
      en = 0;
      cyc = 0;  // rising edges after the one that took start
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      checks++;
      if (out_flat !== expv) begin
        failures++;
        $display("in %h: out %h expected %h", in_flat, out_flat, expv);
      end
      checks++;
      if (cyc != N * N) begin failures++; $display("latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
