// tb_mult_default: random signed products, checking value and the one-cycle
// latency from start to done.
module tb_mult_default;
  localparam int W = 16;
  logic clk = 0, rst = 1, start = 0;
  logic signed [W-1:0] a = '0, b = '0;
  logic signed [2*W-1:0] p;
  logic done;
  int checks = 0, failures = 0;

  mult_default dut (.*);
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
    for (int i = 0; i < 1000; i++) begin
      longint ref_p;
      @(negedge clk);
      a = W'($urandom); b = W'($urandom);
      if (i == 0) begin a = 16'sh8000; b = 16'sh8000; end
      if (i == 1) begin a = 16'sh8000; b = 16'sh7fff; end
      ref_p = longint'(a) * longint'(b);
      start = 1;
      @(negedge clk);
      start = 0;
      checks++;
      if (!done || p !== (2*W)'(ref_p)) begin
        failures++;
        $display("mismatch %0d*%0d: p=%0d done=%0b", a, b, p, done);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
