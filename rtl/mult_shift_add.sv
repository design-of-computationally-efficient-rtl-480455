// mult_shift_add: signed sequential multiplier from a shift register and
// an accumulator, using no DSP block.
//
// On start the magnitudes of a and b are captured and the sign of the
// product is remembered. Each of the next W cycles examines the lowest bit
// of the shifting multiplier register; if it is one the shifted multiplicand
// is added into the accumulator. After W cycles the sign is applied, p is
// valid and done pulses for one cycle. start is ignored while busy.
// Latency: done is high in the (W+2)th cycle after the cycle in which
// start is high (W+1 rising edges after the edge that takes start).
module mult_shift_add #(
  parameter int W = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p,
  output logic                  done,
  output logic                  busy
);
  localparam int CW = $clog2(W + 1);

  logic [2*W-1:0] mcand;    // multiplicand, shifted left each step
  logic [W-1:0]   mplier;   // multiplier, shifted right each step
  logic [2*W-1:0] acc;
  logic           neg;
  logic [CW-1:0]  steps;

  logic [W-1:0] mag_a, mag_b;
  assign mag_a = a[W-1] ? W'(-a) : W'(a);
  assign mag_b = b[W-1] ? W'(-b) : W'(b);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      p     <= '0;
      acc   <= '0;
      steps <= '0;
      mcand <= '0;
      mplier <= '0;
      neg   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          mcand  <= (2*W)'(mag_a);
          mplier <= mag_b;
          neg    <= a[W-1] ^ b[W-1];
          acc    <= '0;
          steps  <= '0;
          busy   <= 1'b1;
        end
      end else begin
        if (steps == CW'(W)) begin
          p    <= neg ? -acc : acc;
          done <= 1'b1;
          busy <= 1'b0;
        end else begin
          if (mplier[0]) acc <= acc + mcand;
          mcand  <= mcand << 1;
          mplier <= mplier >> 1;
          steps  <= steps + CW'(1);
        end
      end
    end
  end
endmodule
