// input_segmenter: stores an N x N input tensor and cuts it into K x K
// filter-sized windows for a convolution node.
//
// load captures in_flat into the tensor memory T and starts a scan of the
// window positions in raster order, STRIDE elements apart; STRIDE = 0 means
// a single window at (0,0), which is how a fully connected layer is formed
// from a convolution. The current window is presented on win_flat with
// win_valid; a cycle with win_valid && win_ready moves to the next position,
// and after the last window (win_last) the segmenter goes idle.
//
// Packing: element (r,c) of an M x M tensor sits at bit offset
// (M*M-1-(r*M+c))*DATA_W, i.e. element (0,0) in the most significant
// position, as in the source design's input-segmenting simulation
// (In = 0123456789abcdef gives T = [[0,1,2,3],[4,5,6,7],...]).
// An assertion checks that an offered window is held until it is taken.
// Storing the whole input and stepping a window over it follows the source
// design; the valid/ready handshake is this design's own.
module input_segmenter #(
  parameter int N      = 4,
  parameter int K      = 3,
  parameter int STRIDE = 1,
  parameter int DATA_W = 4,
  localparam int OUT_N = (STRIDE == 0) ? 1 : (N - K) / STRIDE + 1,
  localparam int PW    = (OUT_N > 1) ? $clog2(OUT_N) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    load,
  input  logic [N*N*DATA_W-1:0]   in_flat,
  output logic                    win_valid,
  input  logic                    win_ready,
  output logic [K*K*DATA_W-1:0]   win_flat,
  output logic [PW-1:0]           win_row,
  output logic [PW-1:0]           win_col,
  output logic                    win_last,
  output logic                    busy
);
  logic [DATA_W-1:0] T [N][N];
  logic col_last, row_last, advance;

  assign advance   = busy && win_ready;
  assign win_valid = busy;
  assign win_last  = col_last && row_last;

  index_counter #(.MAX(OUT_N)) u_col (
    .clk, .rst, .clr(load), .en(advance), .count(win_col), .last(col_last));
  index_counter #(.MAX(OUT_N)) u_row (
    .clk, .rst, .clr(load), .en(advance && col_last), .count(win_row), .last(row_last));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
    end else if (load) begin
      busy <= 1'b1;
    end else if (advance && win_last) begin
      busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (load) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          T[r][c] <= in_flat[(N*N-1-(r*N+c))*DATA_W +: DATA_W];
    end
  end

  always_comb begin
    int base_r, base_c;
    base_r = int'(win_row) * STRIDE;
    base_c = int'(win_col) * STRIDE;
    win_flat = '0;
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++)
        win_flat[(K*K-1-(r*K+c))*DATA_W +: DATA_W] = T[base_r + r][base_c + c];
  end

  // Handshake rule: a window that is offered and not taken stays offered,
  // unchanged, in the next cycle (unless a new load restarts the scan).
  a_hold: assert property (@(posedge clk) disable iff (rst)
    win_valid && !win_ready && !load |=> load || (win_valid && $stable(win_row) && $stable(win_col)));
endmodule
