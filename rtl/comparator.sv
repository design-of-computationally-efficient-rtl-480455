// comparator: signed magnitude comparison from a subtractor and gates.
//
// Forms a - b as a + ~b + 1 one bit wider than the operands, so the sign of
// the difference never overflows, then derives gt/eq/lt from its sign bit
// and a zero test. Purely combinational. The source design says only that
// its comparators are built from accumulator-style adders and logic gates.
module comparator #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic                gt,
  output logic                eq,
  output logic                lt
);
  logic [W:0] diff;
  assign diff = {a[W-1], a} + ~{b[W-1], b} + (W+1)'(1);

  assign eq = (diff == '0);
  assign lt = diff[W];
  assign gt = !diff[W] && !eq;
endmodule
