// tb_scale_approx: random maps of various magnitudes; the reference finds
// the smallest shift by brute force on integers and recomputes the
// approximated values and the null mask.
module tb_scale_approx;
  localparam int COUNT = 16, IN_W = 16, OUT_W = 4;
  logic [COUNT*IN_W-1:0]  in_flat;
  logic [COUNT*OUT_W-1:0] out_flat;
  logic [4:0]             scale;
  logic                   overflow;
  logic [COUNT-1:0]       null_mask;
  int checks = 0, failures = 0, n_ovf = 0, n_null = 0;
  logic clk = 0;

  scale_approx dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int v [COUNT];
      int s, mag;
      mag = $urandom % 16;
      for (int i = 0; i < COUNT; i++) begin
        v[i] = int'($signed(IN_W'($urandom))) >>> (15 - mag);
        if ($urandom % 5 == 0) v[i] = 0;
        in_flat[i*IN_W +: IN_W] = IN_W'(v[i]);
      end
      // reference: smallest s with all (v >>> s) in [-8, 7]
      for (s = 0; s < IN_W - OUT_W; s++) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < COUNT; i++)
          if ((v[i] >>> s) > 7 || (v[i] >>> s) < -8) ok = 0;
        if (ok) break;
      end
      #1;
      checks++;
      if (int'(scale) != s || overflow !== (s != 0)) begin
        failures++;
        $display("scale %0d expected %0d", scale, s);
      end
      if (s != 0) n_ovf++;
      for (int i = 0; i < COUNT; i++) begin
        int e;
        e = v[i] >>> s;
        checks++;
        if (out_flat[i*OUT_W +: OUT_W] !== OUT_W'(e) || null_mask[i] !== (v[i] != 0 && e == 0)) begin
          failures++;
          $display("element %0d: got %0h/%0b expected %0h", i, out_flat[i*OUT_W +: OUT_W], null_mask[i], OUT_W'(e));
        end
        if (v[i] != 0 && e == 0) n_null++;
      end
    end
    checks++;
    if (n_ovf == 0 || n_null == 0) begin
      failures++;
      $display("overflow (%0d) or null (%0d) never exercised", n_ovf, n_null);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
