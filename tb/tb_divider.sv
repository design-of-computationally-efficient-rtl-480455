// tb_divider: random unsigned divisions (including divide by zero) checked
// against the simulator's / and %, with the W+1 cycle latency checked.
module tb_divider;
  localparam int W = 64;
  logic clk = 0, rst = 1, start = 0;
  logic [W-1:0] dividend = '0, divisor = '0, quotient, remainder;
  logic done, busy;
  int checks = 0, failures = 0;

  divider dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      int cyc;
      logic [W-1:0] eq, er;
      @(negedge clk);
      dividend = {$urandom, $urandom} >> ($urandom % 64);
      divisor  = {$urandom, $urandom} >> ($urandom % 64);
      if (i == 0) begin dividend = 100; divisor = 0; end
      if (i == 1) begin dividend = '1;  divisor = 1; end
      if (i == 2) begin dividend = 7;   divisor = 9; end
      if (divisor == 0) begin eq = '1; er = dividend; end
      else begin eq = dividend / divisor; er = dividend % divisor; end
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;  // rising edges after the one that took start
      while (!done && cyc < 200) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (quotient !== eq || remainder !== er) begin
        failures++;
        $display("mismatch %0d/%0d: q=%0d r=%0d", dividend, divisor, quotient, remainder);
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
