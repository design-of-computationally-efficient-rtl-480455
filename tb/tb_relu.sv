// tb_relu: random and boundary inputs, output compared with max(x,0).
module tb_relu;
  localparam int W = 16;
  logic signed [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic clk = 0;

  relu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic signed [W-1:0] x;
      x = W'($urandom);
      if (i == 0) x = 16'sh8000;
      if (i == 1) x = 16'sh7fff;
      if (i == 2) x = 0;
      if (i == 3) x = -1;
      in_data = x;
      #1;
      checks++;
      if (out_data !== ((x > 0) ? x : 16'sd0)) begin
        failures++;
        $display("mismatch relu(%0d)=%0d", x, out_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
