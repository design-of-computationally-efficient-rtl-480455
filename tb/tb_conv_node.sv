// tb_conv_node: random 3x3 windows and weights (with many zeros) on two
// nodes, one per multiplier version. Checks the dot product, the number of
// skipped zero operations and the cycle count from start to done.
module tb_conv_node;
  import cnn_pkg::*;
  localparam int K = 3, DATA_W = 4, ACC_W = 16, NE = 9;
  logic clk = 0, rst = 1, start = 0;
  logic [NE*DATA_W-1:0] win_flat = '0, w_flat = '0;
  logic signed [ACC_W-1:0] sum_d, sum_s;
  logic done_d, done_s, busy_d, busy_s, skip_d, skip_s;
  int checks = 0, failures = 0, total_skips = 0;

  conv_node dut_d (.clk, .rst, .start, .win_flat, .w_flat, .sum(sum_d), .done(done_d), .busy(busy_d), .skip(skip_d));
  conv_node #(.MULT(MULT_SHIFT_ADD)) dut_s (.clk, .rst, .start, .win_flat, .w_flat, .sum(sum_s), .done(done_s), .busy(busy_s), .skip(skip_s));
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
    for (int t = 0; t < 200; t++) begin
      int ref_sum, nz, cyc_d, cyc_s, sk_d, sk_s;
      @(negedge clk);
      ref_sum = 0; nz = 0;
      for (int e = 0; e < NE; e++) begin
        logic signed [DATA_W-1:0] p, w;
        p = DATA_W'($urandom); w = DATA_W'($urandom);
        if ($urandom % 3 == 0) p = 0;
        if ($urandom % 4 == 0) w = 0;
        if (t == 0) begin p = -8; w = -8; end
        win_flat[(NE-1-e)*DATA_W +: DATA_W] = p;
        w_flat[(NE-1-e)*DATA_W +: DATA_W]   = w;
        ref_sum += int'(p) * int'(w);
        if (p != 0 && w != 0) nz++;
      end
      start = 1;
      @(negedge clk);
      start = 0;
      win_flat = '1; w_flat = '1;   // the node must have captured its operands
      cyc_d = 0; cyc_s = 0; sk_d = 0; sk_s = 0;
      // cyc_* become 1 once the node has signalled done
      while (cyc_s == 0 || cyc_d == 0) begin
        if (skip_d) sk_d++;
        if (skip_s) sk_s++;
        if (done_d) cyc_d = 1;
        if (done_s) cyc_s = 1;
        @(negedge clk);
      end
      checks += 2;
      if (sum_d !== ACC_W'(ref_sum) || sum_s !== ACC_W'(ref_sum)) begin
        failures++;
        $display("dot product: default=%0d shift-add=%0d expected=%0d", sum_d, sum_s, ref_sum);
      end
      if (sk_d != NE - nz || sk_s != NE - nz) begin
        failures++;
        $display("skips %0d/%0d expected %0d", sk_d, sk_s, NE - nz);
      end
      total_skips += sk_d;
    end
    checks++;
    if (total_skips == 0) begin failures++; $display("zero skip never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycle count: start cycle to done, measured independently of the loop above.
  int cnt_d = 0, cnt_s = 0, exp_d = 0, exp_s = 0;
  always @(posedge clk) if (!rst) begin
    if (start) begin
      int nz_now, z_now;
      nz_now = 0;
      for (int e = 0; e < NE; e++)
        if (win_flat[e*DATA_W +: DATA_W] != 0 && w_flat[e*DATA_W +: DATA_W] != 0) nz_now++;
      z_now = NE - nz_now;
      // ISSUE per element, +1 WAIT cycle (default) or +DATA_W+2 (shift-add)
      // per multiply, then one cycle to done.
      exp_d = z_now + 2 * nz_now + 1;
      exp_s = z_now + (DATA_W + 3) * nz_now + 1;
      cnt_d = 0; cnt_s = 0;
    end else begin
      cnt_d++; cnt_s++;
      if (done_d) begin
        checks++;
        if (cnt_d != exp_d) begin failures++; $display("default node took %0d cycles, expected %0d", cnt_d, exp_d); end
      end
      if (done_s) begin
        checks++;
        if (cnt_s != exp_s) begin failures++; $display("shift-add node took %0d cycles, expected %0d", cnt_s, exp_s); end
      end
    end
  end
endmodule
