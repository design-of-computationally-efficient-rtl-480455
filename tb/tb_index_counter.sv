// tb_index_counter: steps the counter with random enables and clears and
// compares count and last with a reference modulo counter.
module tb_index_counter;
  localparam int MAX = 16;
  logic clk = 0, rst = 1, clr = 0, en = 0;
  logic [3:0] count;
  logic last;
  int model = 0, wraps = 0;
  int checks = 0, failures = 0;

  index_counter #(.MAX(MAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      en  = ($urandom % 5) != 0;
      clr = ($urandom % 97) == 0;
      @(posedge clk);
      if (clr) model = 0;
      else if (en) begin
        if (model == MAX - 1) wraps++;
        model = (model + 1) % MAX;
      end
      #1;
      checks++;
      if (count !== 4'(model) || last !== (model == MAX - 1)) begin
        failures++;
        $display("mismatch: count=%0d last=%0b model=%0d", count, last, model);
      end
    end
    checks++;
    if (wraps < 5) begin
      failures++;
      $display("counter wrapped only %0d times", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
