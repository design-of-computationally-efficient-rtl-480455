// tb_conv2d_wide: conv2d with 16-bit signed data, 40-bit sums, a 5x5 input,
// a 3x3 filter and stride 2 (a 2x2 output), using two shift-and-add nodes.
// Random tensors; every streamed result is checked at the position it
// reports and the output memory is checked after done.
module tb_conv2d_wide;
  import cnn_pkg::*;
  localparam int N = 5, K = 3, STRIDE = 2, DATA_W = 16, ACC_W = 40, OUT_N = 2;
  logic clk = 0, rst = 1, start = 0;
  logic [N*N*DATA_W-1:0] in_flat = '0;
  logic [K*K*DATA_W-1:0] w_flat = '0;
  logic out_valid, done, skip, out_row, out_col;
  logic signed [ACC_W-1:0] out_data;
  logic [OUT_N*OUT_N*ACC_W-1:0] out_flat;
  longint ref_o [OUT_N*OUT_N];
  int checks = 0, failures = 0, got = 0;

  conv2d #(.N(N), .K(K), .STRIDE(STRIDE), .DATA_W(DATA_W), .ACC_W(ACC_W),
           .MULT(MULT_SHIFT_ADD), .NODES(2)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (!rst && out_valid) begin
    checks++;
    if (out_data !== ACC_W'(ref_o[int'(out_row) * OUT_N + int'(out_col)])) begin
      failures++;
      $display("(%0d,%0d): %0d", out_row, out_col, out_data);
    end
    got++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      for (int e = 0; e < N * N; e++) in_flat[e*DATA_W +: DATA_W] = DATA_W'($urandom);
      for (int e = 0; e < K * K; e++) w_flat[e*DATA_W +: DATA_W] = DATA_W'($urandom);
      if (t == 0) begin
        in_flat = {N*N{16'sh8000}};
        w_flat  = {K*K{16'sh8000}};
      end
      for (int o = 0; o < OUT_N * OUT_N; o++) begin
        ref_o[o] = 0;
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++) begin
            int pr, pc;
            pr = (o / OUT_N) * STRIDE + r;
            pc = (o % OUT_N) * STRIDE + c;
            ref_o[o] += longint'($signed(in_flat[(N*N-1-(pr*N+pc))*DATA_W +: DATA_W])) *
                        longint'($signed(w_flat[(K*K-1-(r*K+c))*DATA_W +: DATA_W]));
          end
      end
      got = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (got != OUT_N * OUT_N) begin failures++; $display("streamed %0d", got); end
      for (int o = 0; o < OUT_N * OUT_N; o++) begin
        checks++;
        if (out_flat[(OUT_N*OUT_N-1-o)*ACC_W +: ACC_W] !== ACC_W'(ref_o[o])) begin
          failures++;
          $display("memory %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
