// conv_node: one convolution node, the repeating unit of a convolutional
// layer. It forms the dot product of a K x K window and K x K weights.
//
// A single multiplier and a single accumulator are reused K*K times in a
// scheduled fashion (the low-hardware option of the source design). start
// captures win_flat and w_flat (same packing as input_segmenter) and clears
// the sum. Then, for each element in turn: if the pixel or the weight is
// zero the multiply is skipped (skip pulses, one cycle spent), otherwise the
// multiplier is started and its product is added into the accumulator when
// it is done. After the last element done pulses for one cycle with the
// signed result on sum (held until the next start).
// Cycles per window: 1 + (1 per skipped element) + (latency+1 per multiply),
// where the multiply latency is 1 for MULT_DEFAULT and DATA_W+2 for
// MULT_SHIFT_ADD. The zero-skipping and the multiplier choice follow the
// source design; the exact schedule is this design's own.
// An assertion checks that start only arrives while the node is idle.
module conv_node
  import cnn_pkg::*;
#(
  parameter int         K      = 3,
  parameter int         DATA_W = 4,
  parameter int         ACC_W  = 16,
  parameter mult_kind_e MULT   = MULT_DEFAULT,
  localparam int        NE     = K * K,
  localparam int        IW     = (NE > 1) ? $clog2(NE) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic [NE*DATA_W-1:0]     win_flat,
  input  logic [NE*DATA_W-1:0]     w_flat,
  output logic signed [ACC_W-1:0]  sum,
  output logic                     done,
  output logic                     busy,
  output logic                     skip
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_FINISH} state_e;
  state_e state;

  logic [NE*DATA_W-1:0] pix_r, w_r;
  logic [IW-1:0]        idx;
  logic                 idx_last, step;
  logic signed [DATA_W-1:0] pix_e, w_e;
  logic                 m_start, m_done;
  logic signed [2*DATA_W-1:0] m_p;

  assign pix_e = pix_r[(NE-1-int'(idx))*DATA_W +: DATA_W];
  assign w_e   = w_r  [(NE-1-int'(idx))*DATA_W +: DATA_W];

  assign skip    = (state == S_ISSUE) && (pix_e == '0 || w_e == '0);
  assign m_start = (state == S_ISSUE) && !skip;
  assign step    = skip || (state == S_WAIT && m_done);
  assign busy    = (state != S_IDLE);
  assign done    = (state == S_FINISH);

  index_counter #(.MAX(NE)) u_idx (
    .clk, .rst, .clr(start && !busy), .en(step), .count(idx), .last(idx_last));

  accumulator #(.IN_W(2*DATA_W), .ACC_W(ACC_W)) u_acc (
    .clk, .rst, .clr(start && !busy), .en(state == S_WAIT && m_done), .sub(1'b0),
    .in_data(m_p), .acc(sum));

  if (MULT == MULT_SHIFT_ADD) begin : g_sa
    logic m_busy;
    mult_shift_add #(.W(DATA_W)) u_mul (
      .clk, .rst, .start(m_start), .a(pix_e), .b(w_e), .p(m_p), .done(m_done), .busy(m_busy));
  end else begin : g_def
    mult_default #(.W(DATA_W)) u_mul (
      .clk, .rst, .start(m_start), .a(pix_e), .b(w_e), .p(m_p), .done(m_done));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE:   if (start) state <= S_ISSUE;
        S_ISSUE:  if (skip) state <= idx_last ? S_FINISH : S_ISSUE;
                  else      state <= S_WAIT;
        S_WAIT:   if (m_done) state <= idx_last ? S_FINISH : S_ISSUE;
        S_FINISH: state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (start && !busy) begin
      pix_r <= win_flat;
      w_r   <= w_flat;
    end
  end

  // Interface rule: a new window may only be started while the node is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> !busy);
endmodule
