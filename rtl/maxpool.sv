// maxpool: direct P x P max pooling (stride P) of an N x N tensor.
//
// en captures in_flat (element (0,0) most significant, as input_segmenter)
// into the tensor memory T. The block then visits one element per cycle:
// a counter walks the P*P elements of the current window and a second one
// the windows in raster order. The running maximum is kept in a register
// and replaced whenever the comparator finds a larger element. At the end
// of each window its maximum is shifted into the top of the output shift
// register, which moves the earlier results down, so window (0,0) ends in
// the lowest DATA_W bits of out_flat. With N=4, P=2 and
// in_flat = 0x0123456789abcdef the result is 0xfd75, as in the source
// design's simulation. done rises after (N/P)^2 * P*P cycles and stays high
// until the next en. Elements are compared as signed numbers.
// Storing the input and pooling with register-and-compare elements follows
// the source design; the one-element-per-cycle schedule is this design's own.
module maxpool #(
  parameter int N      = 4,
  parameter int P      = 2,
  parameter int DATA_W = 4,
  localparam int ON    = N / P,
  localparam int NW    = ON * ON,
  localparam int NE    = P * P
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic [N*N*DATA_W-1:0]    in_flat,
  output logic [NW*DATA_W-1:0]     out_flat,
  output logic                     done
);
  localparam int WW = (NW > 1) ? $clog2(NW) : 1;
  localparam int EW = (NE > 1) ? $clog2(NE) : 1;

  logic [DATA_W-1:0] T [N][N];
  logic              running;
  logic [WW-1:0]     widx;
  logic [EW-1:0]     eidx;
  logic              w_last, e_last;
  logic signed [DATA_W-1:0] cur, best, best_next;
  logic              gt;

  index_counter #(.MAX(NE)) u_eidx (
    .clk, .rst, .clr(en), .en(running), .count(eidx), .last(e_last));
  index_counter #(.MAX(NW)) u_widx (
    .clk, .rst, .clr(en), .en(running && e_last), .count(widx), .last(w_last));

  always_comb begin
    int wr, wc, er, ec;
    wr  = int'(widx) / ON;
    wc  = int'(widx) % ON;
    er  = int'(eidx) / P;
    ec  = int'(eidx) % P;
    cur = T[wr*P + er][wc*P + ec];
  end

  comparator #(.W(DATA_W)) u_cmp (.a(cur), .b(best), .gt, .eq(), .lt());

  assign best_next = (eidx == '0 || gt) ? cur : best;

  always_ff @(posedge clk) begin
    if (rst) begin
      running  <= 1'b0;
      done     <= 1'b0;
      best     <= '0;
      out_flat <= '0;
    end else if (en) begin
      running  <= 1'b1;
      done     <= 1'b0;
      out_flat <= '0;
    end else if (running) begin
      best <= best_next;
      if (e_last) begin
        out_flat <= {best_next, out_flat[NW*DATA_W-1:DATA_W]};
        if (w_last) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          T[r][c] <= in_flat[(N*N-1-(r*N+c))*DATA_W +: DATA_W];
    end
  end
endmodule
