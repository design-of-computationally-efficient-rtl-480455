// scale_approx: fits a map of wide results back into the preset data width.
//
// All COUNT signed IN_W-bit elements share one scale: the smallest right
// shift s (0 .. IN_W-OUT_W) after which every element fits in OUT_W signed
// bits. Each element is shifted arithmetically by s (truncating) and cut to
// OUT_W bits; scale reports s, overflow is high when s > 0, and null_mask
// marks elements that were non-zero but became zero, i.e. small values
// approximated to null. Purely combinational.
// The source design describes keeping a scale record for results that
// overflow the preset size and dropping small values to zero; one shared
// shift per map (block floating point) is this design's reading of it.
module scale_approx #(
  parameter int COUNT = 16,
  parameter int IN_W  = 16,
  parameter int OUT_W = 4,
  localparam int SW   = $clog2(IN_W + 1)
) (
  input  logic [COUNT*IN_W-1:0]  in_flat,
  output logic [COUNT*OUT_W-1:0] out_flat,
  output logic [SW-1:0]          scale,
  output logic                   overflow,
  output logic [COUNT-1:0]       null_mask
);
  // True when v >>> s fits in OUT_W signed bits: bits IN_W-1 .. OUT_W-1+s
  // all equal.
  function automatic logic fits(logic signed [IN_W-1:0] v, int s);
    logic signed [IN_W-1:0] t;
    t = v >>> (OUT_W - 1 + s);
    return (t == '0) || (t == '1);
  endfunction

  always_comb begin
    logic all_fit;
    scale = SW'(IN_W - OUT_W);
    for (int s = IN_W - OUT_W; s >= 0; s--) begin
      all_fit = 1'b1;
      for (int i = 0; i < COUNT; i++)
        if (!fits(in_flat[i*IN_W +: IN_W], s)) all_fit = 1'b0;
      if (all_fit) scale = SW'(s);
    end
  end

  assign overflow = (scale != '0);

  always_comb begin
    logic signed [IN_W-1:0] v, sh;
    for (int i = 0; i < COUNT; i++) begin
      v  = in_flat[i*IN_W +: IN_W];
      sh = v >>> scale;
      out_flat[i*OUT_W +: OUT_W] = sh[OUT_W-1:0];
      null_mask[i] = (v != '0) && (sh[OUT_W-1:0] == '0);
    end
  end
endmodule
