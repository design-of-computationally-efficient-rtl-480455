// tb_conv2d: direct 2D convolution of 4x4 tensors with 3x3 filters. The
// first case is the tensor 0123456789abcdef with the filter rows 1 0 1;
// the rest are random. Checks the streamed results (order and values), the
// internal output memory and that done follows the last result. A second
// copy with three nodes runs the same data; its stream may come out of
// order, so each result is checked at the position it reports, and the
// three-node copy must finish no later than the single-node one.
module tb_conv2d;
  localparam int N = 4, K = 3, DATA_W = 4, ACC_W = 16, OUT_N = 2;
  logic clk = 0, rst = 1, start = 0;
  logic [N*N*DATA_W-1:0] in_flat = '0;
  logic [K*K*DATA_W-1:0] w_flat = '0;
  logic out_valid, done, skip;
  logic signed [ACC_W-1:0] out_data;
  logic out_row, out_col;
  logic [OUT_N*OUT_N*ACC_W-1:0] out_flat;
  // three-node copy
  logic out_valid3, done3, skip3, out_row3, out_col3;
  logic signed [ACC_W-1:0] out_data3;
  logic [OUT_N*OUT_N*ACC_W-1:0] out_flat3;
  int checks = 0, failures = 0, skips = 0, overlap = 0;
  int ref_o [OUT_N*OUT_N];
  int seen3;

  conv2d dut (.*);
  conv2d #(.NODES(3)) dut3 (.clk, .rst, .start, .in_flat, .w_flat, .out_valid(out_valid3),
    .out_data(out_data3), .out_row(out_row3), .out_col(out_col3), .out_flat(out_flat3),
    .done(done3), .skip(skip3));

  // check the three-node stream by reported position
  always @(posedge clk) if (!rst && out_valid3) begin
    int pos;
    pos = int'(out_row3) * OUT_N + int'(out_col3);
    checks++;
    if (out_data3 !== ACC_W'(ref_o[pos]) || seen3[pos]) begin
      failures++;
      $display("3-node stream (%0d,%0d): %0d expected %0d", out_row3, out_col3, out_data3, ref_o[pos]);
    end
    seen3[pos] = 1;
  end
  // more than one node busy at once
  always @(posedge clk) if (!rst && dut3.inflight != 0 && (dut3.inflight & (dut3.inflight - 1)) != 0) overlap++;
  always #5 clk = ~clk;
  always @(posedge clk) if (skip) skips++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 100; t++) begin
      logic signed [DATA_W-1:0] m [N][N];
      logic signed [DATA_W-1:0] w [K][K];
      int got;
      @(negedge clk);
      if (t == 0) begin
        in_flat = 64'h0123456789abcdef;
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++)
            w_flat[(K*K-1-(r*K+c))*DATA_W +: DATA_W] = (c == 1) ? 4'd0 : 4'd1;
      end else begin
        in_flat = {$urandom, $urandom};
        w_flat  = {$urandom, $urandom};
      end
      for (int e = 0; e < N * N; e++) m[e / N][e % N] = in_flat[(N*N-1-e)*DATA_W +: DATA_W];
      for (int e = 0; e < K * K; e++) w[e / K][e % K] = w_flat[(K*K-1-e)*DATA_W +: DATA_W];
      for (int o = 0; o < OUT_N * OUT_N; o++) begin
        ref_o[o] = 0;
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++)
            ref_o[o] += int'(m[o / OUT_N + r][o % OUT_N + c]) * int'(w[r][c]);
      end
      if (t == 0) begin
        // 0,2,4,6,8,a with the signed reading of the 4-bit elements
        checks++;
        if (ref_o[0] != 0 + 2 + 4 + 6 - 8 - 6) begin failures++; $display("reference case"); end
      end
      seen3 = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      got = 0;
      forever begin
        if (out_valid) begin
          checks++;
          if (out_data !== ACC_W'(ref_o[got]) || int'(out_row) * OUT_N + int'(out_col) != got) begin
            failures++;
            $display("stream %0d: %0d expected %0d", got, out_data, ref_o[got]);
          end
          got++;
        end
        if (done) break;
        @(negedge clk);
      end
      checks++;
      if (got != OUT_N * OUT_N) begin failures++; $display("streamed %0d results", got); end
      checks++;
      if (!done3 || seen3 != 4'hf || out_flat3 !== out_flat) begin
        failures++;
        $display("3-node copy: done=%0b seen=%b memory %h", done3, seen3[3:0], out_flat3);
      end
      for (int o = 0; o < OUT_N * OUT_N; o++) begin
        checks++;
        if (out_flat[(OUT_N*OUT_N-1-o)*ACC_W +: ACC_W] !== ACC_W'(ref_o[o])) begin
          failures++;
          $display("memory %0d mismatch", o);
        end
      end
    end
    checks++;
    if (skips == 0) begin failures++; $display("no zero skip"); end
    checks++;
    if (overlap == 0) begin failures++; $display("nodes never ran in parallel"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
