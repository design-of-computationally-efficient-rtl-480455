// tb_fc_layer: random 2x2 inputs and four classes of weights; each score is
// compared with the plain dot product of input and class weights.
module tb_fc_layer;
  localparam int N = 2, CLASSES = 4, DATA_W = 4, ACC_W = 16;
  logic clk = 0, rst = 1, start = 0;
  logic [N*N*DATA_W-1:0] in_flat = '0;
  logic [CLASSES*N*N*DATA_W-1:0] w_flat = '0;
  logic [CLASSES*ACC_W-1:0] scores;
  logic done, skip;
  int checks = 0, failures = 0;

  fc_layer dut (.*);
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
      int cyc;
      @(negedge clk);
      in_flat = 16'($urandom);
      w_flat  = {$urandom, $urandom};
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      for (int c = 0; c < CLASSES; c++) begin
        int ref_s;
        ref_s = 0;
        for (int e = 0; e < N * N; e++)
          ref_s += int'($signed(in_flat[e*DATA_W +: DATA_W])) *
                   int'($signed(w_flat[c*N*N*DATA_W + e*DATA_W +: DATA_W]));
        checks++;
        if (scores[c*ACC_W +: ACC_W] !== ACC_W'(ref_s)) begin
          failures++;
          $display("class %0d: %0d expected %0d", c, $signed(scores[c*ACC_W +: ACC_W]), ref_s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
