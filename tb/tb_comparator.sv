// tb_comparator: random and extreme operand pairs, flags compared with the
// simulator's own signed comparison.
module tb_comparator;
  localparam int W = 16;
  logic signed [W-1:0] a, b;
  logic gt, eq, lt;
  int checks = 0, failures = 0;
  logic clk = 0;

  comparator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic signed [W-1:0] x, logic signed [W-1:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (gt !== (x > y) || eq !== (x == y) || lt !== (x < y)) begin
      failures++;
      $display("mismatch a=%0d b=%0d gt=%0b eq=%0b lt=%0b", x, y, gt, eq, lt);
    end
  endtask

  initial begin
    check(16'sh7fff, 16'sh8000);
    check(16'sh8000, 16'sh7fff);
    check(16'sh8000, 16'sh8000);
    check(-1, 0);
    check(0, -1);
    check(5, 5);
    for (int i = 0; i < 3000; i++) begin
      logic signed [W-1:0] x, y;
      x = W'($urandom);
      y = (i % 7 == 0) ? x : W'($urandom);
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
