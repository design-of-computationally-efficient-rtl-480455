// tb_input_segmenter: loads the 4x4 tensor 0123456789abcdef and random
// tensors, takes every window with a randomly stalling consumer and
// compares each with the 3x3 slice cut from the reference tensor.
module tb_input_segmenter;
  localparam int N = 4, K = 3, DATA_W = 4, OUT_N = 2;
  logic clk = 0, rst = 1, load = 0, win_ready = 0;
  logic [N*N*DATA_W-1:0] in_flat = '0;
  logic win_valid, win_last, busy;
  logic [K*K*DATA_W-1:0] win_flat;
  logic win_row, win_col;
  int checks = 0, failures = 0, stalls = 0;

  input_segmenter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 50; t++) begin
      int got;
      logic [DATA_W-1:0] m [N][N];
      @(negedge clk);
      in_flat = (t == 0) ? 64'h0123456789abcdef : {$urandom, $urandom};
      for (int e = 0; e < N * N; e++) m[e / N][e % N] = in_flat[(N*N-1-e)*DATA_W +: DATA_W];
      if (t == 0) begin
        checks++;
        if (m[1][0] != 4 || m[3][3] != 15) begin failures++; $display("reference unpack"); end
      end
      load = 1;
      @(negedge clk);
      load = 0;
      got = 0;
      while (got < OUT_N * OUT_N) begin
        win_ready = ($urandom % 3) != 0;
        if (win_valid && !win_ready) stalls++;
        if (win_valid && win_ready) begin
          int r0, c0;
          logic [K*K*DATA_W-1:0] exp_w;
          r0 = got / OUT_N; c0 = got % OUT_N;
          for (int r = 0; r < K; r++)
            for (int c = 0; c < K; c++)
              exp_w[(K*K-1-(r*K+c))*DATA_W +: DATA_W] = m[r0 + r][c0 + c];
          checks++;
          if (win_flat !== exp_w || int'(win_row) != r0 || int'(win_col) != c0 ||
              win_last !== (got == OUT_N * OUT_N - 1)) begin
            failures++;
            $display("window %0d: got %h expected %h", got, win_flat, exp_w);
          end
          got++;
        end
        @(negedge clk);
        if (!win_valid) break;
      end
      win_ready = 0;
      checks++;
      if (got != OUT_N * OUT_N || busy) begin
        failures++;
        $display("took %0d windows, busy=%0b", got, busy);
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
