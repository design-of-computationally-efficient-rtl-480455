// accumulator: running signed sum, the base element of the library.
//
// Each cycle with en=1 the signed input is added to (sub=0) or subtracted
// from (sub=1) the stored sum. clr has priority over en and loads zero.
// The sum is available on acc the cycle after the update. The add/subtract
// control and the widths are this design's own; the source design only
// names the accumulator as the key element of its arithmetic.
module accumulator #(
  parameter int IN_W  = 16,
  parameter int ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst,      // synchronous, active high
  input  logic                    clr,
  input  logic                    en,
  input  logic                    sub,
  input  logic signed [IN_W-1:0]  in_data,
  output logic signed [ACC_W-1:0] acc
);
  logic signed [ACC_W-1:0] addend;
  assign addend = sub ? -ACC_W'(in_data) : ACC_W'(in_data);

  always_ff @(posedge clk) begin
    if (rst || clr) acc <= '0;
    else if (en)    acc <= acc + addend;
  end
endmodule
