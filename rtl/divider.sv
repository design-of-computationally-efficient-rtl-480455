// divider: unsigned radix-2 restoring divider.
//
// start captures dividend and divisor. In each of the next W cycles the
// partial remainder is shifted left by one bit, taking in the next dividend
// bit, and the divisor is subtracted when it fits, which sets that quotient
// bit. done pulses in the (W+2)th cycle after the start cycle (W+1 edges after
// the edge that takes start) with quotient and remainder
// valid (held until the next start). Division by zero gives an all-ones
// quotient and the dividend as remainder. start is ignored while busy.
// The source design only names its divider; the restoring algorithm is
// this design's choice.
module divider #(
  parameter int W = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder,
  output logic         done,
  output logic         busy
);
  localparam int CW = $clog2(W + 1);

  logic [W-1:0]  dvs;
  logic [CW-1:0] steps;
  logic [W:0]    trial;

  // Remainder shifted left with the next dividend bit, before subtraction.
  logic [W:0] shifted;
  assign shifted = {remainder, quotient[W-1]};
  assign trial   = shifted - {1'b0, dvs};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
      dvs       <= '0;
      steps     <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          quotient  <= dividend;
          remainder <= '0;
          dvs       <= divisor;
          steps     <= '0;
          busy      <= 1'b1;
        end
      end else if (steps == CW'(W)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        steps <= steps + CW'(1);
        if (!trial[W]) begin
          remainder <= trial[W-1:0];
          quotient  <= {quotient[W-2:0], 1'b1};
        end else begin
          remainder <= shifted[W-1:0];
          quotient  <= {quotient[W-2:0], 1'b0};
        end
      end
    end
  end
endmodule
