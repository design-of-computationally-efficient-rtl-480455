// tb_softmax_lookup: random inputs over the whole table range; ret is
// compared with exp(x)*2^16 computed here in floating point (within one
// LSB or 1e-9 relative), and sum with the running total of the returned
// values. fin must follow en by one cycle.
module tb_softmax_lookup;
  localparam int IN_W = 12, IN_FRAC = 8, OUT_FRAC = 16, OUT_W = 64;
  logic clk = 0, rst = 1, clr = 0, en = 0;
  logic signed [IN_W-1:0] I = '0;
  logic [OUT_W-1:0] ret, sum;
  logic fin;
  longint model_sum = 0;
  int checks = 0, failures = 0;

  softmax_lookup dut (.*);
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
    for (int t = 0; t < 3000; t++) begin
      real r;
      longint e;
      @(negedge clk);
      clr = ($urandom % 200) == 0;
      I = IN_W'($urandom);
      if (t == 0) I = 0;
      if (t == 1) I = 12'sh7ff;
      if (t == 2) I = 12'sh800;
      r = $exp(real'(I) / 256.0) * 65536.0;
      e = longint'(r);
      en = 1;
      @(negedge clk);
      en = 0;
      if (clr) model_sum = 0;
      checks++;
      if (!clr) begin
        model_sum += longint'(ret);
        if (!fin || (longint'(ret) - e > 1) || (e - longint'(ret) > 1)) begin
          failures++;
          $display("exp(%0d/256): ret=%0d expected about %0d fin=%0b", I, ret, e, fin);
        end
        if (t == 0 && ret != 65536) begin failures++; $display("exp(0) = %0d", ret); end
        checks++;
        if (sum !== OUT_W'(model_sum)) begin failures++; $display("sum %0d expected %0d", sum, model_sum); end
      end else if (sum != 0) begin
        failures++;
        $display("clr did not clear sum");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
