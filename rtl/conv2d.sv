// conv2d: direct 2D convolution of an N x N tensor with a K x K filter.
//
// An input_segmenter holds the input and offers its windows in raster
// order; NODES conv_node instances (the sub-module count) take them as they
// become free, lowest-numbered free node first. With NODES = 1 one node
// computes every window in turn, the smallest configuration; more nodes
// trade area for speed. Every result is written to the internal output
// memory (out_flat, element (0,0) in the most significant position) and is
// also streamed out: out_valid pulses with out_data and its position
// out_row/out_col, one result per cycle. With one node the stream is in
// raster order; with several, results appear in completion order. A
// finished node holds its result until it has been streamed. done rises
// the cycle after the last result is streamed and stays high until the
// next start; skip pulses when any node skips a zero operation. start
// loads in_flat and w_flat.
// Output size OUT_N = (N-K)/STRIDE+1 (no padding), or 1 when STRIDE = 0.
// Results are truncated to ACC_W bits.
// The split into segmenter and node modules, the sub-module count, the
// internal memory and the stream output follow the source design;
// handshakes, scheduling and widths are this design's own.
module conv2d
  import cnn_pkg::*;
#(
  parameter int         N      = 4,
  parameter int         K      = 3,
  parameter int         STRIDE = 1,
  parameter int         DATA_W = 4,
  parameter int         ACC_W  = 16,
  parameter mult_kind_e MULT   = MULT_DEFAULT,
  parameter int         NODES  = 1,
  localparam int        OUT_N  = (STRIDE == 0) ? 1 : (N - K) / STRIDE + 1,
  localparam int        PW     = (OUT_N > 1) ? $clog2(OUT_N) : 1
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            start,
  input  logic [N*N*DATA_W-1:0]           in_flat,
  input  logic [K*K*DATA_W-1:0]           w_flat,
  output logic                            out_valid,
  output logic signed [ACC_W-1:0]         out_data,
  output logic [PW-1:0]                   out_row,
  output logic [PW-1:0]                   out_col,
  output logic [OUT_N*OUT_N*ACC_W-1:0]    out_flat,
  output logic                            done,
  output logic                            skip
);
  logic                  win_valid, win_ready, win_last;
  logic [K*K*DATA_W-1:0] win_flat, w_r;
  logic [PW-1:0]         win_row, win_col;
  logic                  issued_last;

  // per-node bookkeeping
  logic [NODES-1:0]        n_start, n_done, n_skip, inflight, pending;
  logic [PW-1:0]           n_row [NODES];
  logic [PW-1:0]           n_col [NODES];
  logic signed [ACC_W-1:0] n_sum [NODES];
  logic signed [ACC_W-1:0] omem  [OUT_N][OUT_N];

  // stream selection: lowest-numbered node holding an unstreamed result
  logic                    sel_any;
  logic [$clog2(NODES+1)-1:0] sel;

  input_segmenter #(.N(N), .K(K), .STRIDE(STRIDE), .DATA_W(DATA_W)) u_seg (
    .clk, .rst, .load(start), .in_flat, .win_valid, .win_ready, .win_flat,
    .win_row, .win_col, .win_last, .busy());

  // Hand the current window to the lowest-numbered free node.
  always_comb begin
    logic taken;
    taken   = 1'b0;
    n_start = '0;
    for (int i = 0; i < NODES; i++) begin
      if (!taken && win_valid && !start && !inflight[i] && !pending[i]) begin
        n_start[i] = 1'b1;
        taken      = 1'b1;
      end
    end
  end
  assign win_ready = |n_start;

  for (genvar i = 0; i < NODES; i++) begin : g_node
    conv_node #(.K(K), .DATA_W(DATA_W), .ACC_W(ACC_W), .MULT(MULT)) u_node (
      .clk, .rst, .start(n_start[i]), .win_flat, .w_flat(w_r), .sum(n_sum[i]),
      .done(n_done[i]), .busy(), .skip(n_skip[i]));
  end
  assign skip = |n_skip;

  always_comb begin
    sel_any = 1'b0;
    sel     = '0;
    for (int i = NODES - 1; i >= 0; i--) begin
      if (pending[i]) begin
        sel_any = 1'b1;
        sel     = ($clog2(NODES+1))'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      inflight    <= '0;
      pending     <= '0;
      issued_last <= 1'b0;
      done        <= 1'b0;
      out_valid   <= 1'b0;
      out_data    <= '0;
      out_row     <= '0;
      out_col     <= '0;
      for (int i = 0; i < NODES; i++) begin
        n_row[i] <= '0;
        n_col[i] <= '0;
      end
    end else if (start) begin
      inflight    <= '0;
      pending     <= '0;
      issued_last <= 1'b0;
      done        <= 1'b0;
      out_valid   <= 1'b0;
    end else begin
      out_valid <= sel_any;
      if (sel_any) begin
        out_data <= n_sum[sel];
        out_row  <= n_row[sel];
        out_col  <= n_col[sel];
      end
      for (int i = 0; i < NODES; i++) begin
        if (n_start[i]) begin
          inflight[i] <= 1'b1;
          n_row[i]    <= win_row;
          n_col[i]    <= win_col;
        end else if (n_done[i] && inflight[i]) begin
          inflight[i] <= 1'b0;
          pending[i]  <= 1'b1;
        end
        if (sel_any && int'(sel) == i) pending[i] <= 1'b0;
      end
      if (win_ready && win_last) issued_last <= 1'b1;
      if (issued_last && inflight == '0 && pending == '0 && !done) done <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (start) w_r <= w_flat;
    if (rst) begin
      for (int r = 0; r < OUT_N; r++)
        for (int c = 0; c < OUT_N; c++)
          omem[r][c] <= '0;
    end else begin
      for (int i = 0; i < NODES; i++)
        if (n_done[i] && inflight[i]) omem[n_row[i]][n_col[i]] <= n_sum[i];
    end
  end

  always_comb begin
    for (int r = 0; r < OUT_N; r++)
      for (int c = 0; c < OUT_N; c++)
        out_flat[(OUT_N*OUT_N-1-(r*OUT_N+c))*ACC_W +: ACC_W] = omem[r][c];
  end
endmodule
