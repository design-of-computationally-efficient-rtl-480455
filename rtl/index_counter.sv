// index_counter: modulo-MAX counter used to address tensor elements.
//
// Counts 0..MAX-1 on each enabled cycle and wraps to 0; last is high while
// the count is MAX-1. The count register is updated by adding one, the
// "accumulation" form the source design uses for its counters. clr restarts
// at zero and has priority over en.
module index_counter #(
  parameter int MAX = 16,
  localparam int CW = (MAX > 1) ? $clog2(MAX) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clr,
  input  logic          en,
  output logic [CW-1:0] count,
  output logic          last
);
  assign last = (count == CW'(MAX - 1));

  always_ff @(posedge clk) begin
    if (rst || clr)  count <= '0;
    else if (en)     count <= last ? '0 : count + CW'(1);
  end
endmodule
