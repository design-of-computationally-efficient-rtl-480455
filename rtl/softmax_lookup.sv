// softmax_lookup: exponential lookup table with a running sum, the first
// half of the softmax function.
//
// I is a signed fixed-point number with IN_FRAC fraction bits. On a cycle
// with en=1 the table entry for I is registered on ret and added to sum;
// fin pulses one cycle later with both valid. clr clears sum (and has
// priority over en). The table holds round(exp(x) * 2^OUT_FRAC) for every
// IN_W-bit input x = I / 2^IN_FRAC, saturated to OUT_W bits; it is computed
// at elaboration, so changing the formats only needs new parameters.
// The port names and widths (I[11:0], ret[63:0], sum[63:0], Fin) follow the
// source design's lookup simulation; the number formats are this design's.
module softmax_lookup #(
  parameter int IN_W     = 12,
  parameter int IN_FRAC  = 8,
  parameter int OUT_FRAC = 16,
  parameter int OUT_W    = 64,
  localparam int DEPTH   = 2 ** IN_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    clr,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  I,
  output logic [OUT_W-1:0]        ret,
  output logic [OUT_W-1:0]        sum,
  output logic                    fin
);
  // Table entry for address a (the two's-complement bit pattern of x).
  function automatic logic [OUT_W-1:0] exp_entry(int a);
    logic signed [IN_W-1:0] xi;
    real x, v, vmax;
    xi   = IN_W'(a);
    x    = real'(int'(xi)) / real'(2.0 ** IN_FRAC);
    v    = $exp(x) * (2.0 ** OUT_FRAC) + 0.5;
    vmax = 2.0 ** (OUT_W > 62 ? 62 : OUT_W) - 1.0;
    if (v > vmax) v = vmax;
    return OUT_W'(longint'($floor(v)));
  endfunction

  logic [OUT_W-1:0] rom [DEPTH];
  for (genvar a = 0; a < DEPTH; a++) begin : g_rom
    localparam logic [OUT_W-1:0] VAL = exp_entry(a);
    assign rom[a] = VAL;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ret <= '0;
      sum <= '0;
      fin <= 1'b0;
    end else begin
      fin <= en && !clr;
      if (clr) begin
        sum <= '0;
      end else if (en) begin
        ret <= rom[unsigned'(I)];
        sum <= sum + rom[unsigned'(I)];
      end
    end
  end
endmodule
