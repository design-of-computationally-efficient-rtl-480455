// relu: rectified linear unit, max(x, 0).
//
// A multiplexer selected by the sign bit of the input passes either the
// input or zero, as in the source design. Purely combinational, no clock.
module relu #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] in_data,
  output logic signed [W-1:0] out_data
);
  assign out_data = in_data[W-1] ? '0 : in_data;
endmodule
