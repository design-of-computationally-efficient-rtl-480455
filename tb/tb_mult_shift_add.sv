// tb_mult_shift_add: random and extreme signed products; checks the value
// and that done arrives exactly W+1 cycles after start.
module tb_mult_shift_add;
  localparam int W = 16;
  logic clk = 0, rst = 1, start = 0;
  logic signed [W-1:0] a = '0, b = '0;
  logic signed [2*W-1:0] p;
  logic done, busy;
  int checks = 0, failures = 0;

  mult_shift_add dut (.*);
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
    for (int i = 0; i < 600; i++) begin
      longint ref_p;
      int cyc;
      @(negedge clk);
      a = W'($urandom); b = W'($urandom);
      case (i)
        0: begin a = 16'sh8000; b = 16'sh8000; end
        1: begin a = 16'sh8000; b = 16'sh7fff; end
        2: begin a = 0;         b = -5;        end
        3: begin a = -1;        b = -1;        end
        default: ;
      endcase
      ref_p = longint'(a) * longint'(b);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;  // rising edges after the one that took start
      while (!done && cyc < 100) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (p !== (2*W)'(ref_p)) begin
        failures++;
        $display("mismatch %0d*%0d: p=%0d", a, b, p);
      end
      checks++;
      if (cyc != W + 1) begin
        failures++;
        $display("latency %0d, expected %0d", cyc, W + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
