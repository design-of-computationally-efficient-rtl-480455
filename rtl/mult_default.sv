// mult_default: signed multiplier using the tool's built-in multiply.
//
// The product of a and b is registered on the cycle start is high and
// done rises one cycle later together with the valid product p. On an
// FPGA this maps to a DSP multiplier block, trading that block for very
// little other logic. The start/done handshake is shared with
// mult_shift_add so a node can use either version.
module mult_default #(
  parameter int W = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p,
  output logic                  done
);
  always_ff @(posedge clk) begin
    if (rst) begin
      p    <= '0;
      done <= 1'b0;
    end else begin
      done <= start;
      if (start) p <= a * b;
    end
  end
endmodule
