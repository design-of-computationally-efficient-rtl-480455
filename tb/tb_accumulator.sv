// tb_accumulator: random add/subtract/clear sequence against a reference
// running sum kept in a 64-bit integer and wrapped to ACC_W bits.
module tb_accumulator;
  localparam int IN_W = 16, ACC_W = 32;
  logic clk = 0, rst = 1, clr = 0, en = 0, sub = 0;
  logic signed [IN_W-1:0] in_data = '0;
  logic signed [ACC_W-1:0] acc;
  longint model = 0;
  int checks = 0, failures = 0;

  accumulator dut (.*);
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
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en      = ($urandom % 4) != 0;
      sub     = $urandom % 2;
      clr     = ($urandom % 50) == 0;
      in_data = IN_W'($urandom);
      if (i < 40) in_data = 16'sh7fff; // push the sum towards large values
      @(posedge clk);
      if (clr) model = 0;
      else if (en) model = sub ? model - longint'(in_data) : model + longint'(in_data);
      #1;
      checks++;
      if (acc !== ACC_W'(model)) begin
        failures++;
        $display("mismatch step %0d: acc=%0d model=%0d", i, acc, ACC_W'(model));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
