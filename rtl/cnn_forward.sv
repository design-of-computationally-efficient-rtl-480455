// cnn_forward: forward pass of a small convolutional neural network built
// from the module library: convolution -> ReLU -> scale approximation ->
// max pooling -> fully connected -> softmax.
//
// start captures nothing itself; it starts the conv2d, which loads img and
// conv_w. The layers then run one after another under a small sequencer:
//   1. conv2d      IMG_N x IMG_N input, K x K filter, stride 1 -> CN x CN
//                  ACC_W-bit sums (CN = IMG_N-K+1), computed by
//                  CONV_NODES nodes, streamed on conv_valid/conv_data with
//                  their position conv_row/conv_col and kept in its output
//                  memory;
//   2. relu        on every conv result (combinational);
//   3. scale_approx one shared right shift brings the map back to DATA_W
//                  bits; the shift is reported on scale, overflow flags a
//                  non-zero shift and null_mask the values lost to zero;
//   4. maxpool     2 x 2, stride 2 -> PN x PN (PN = CN/2) DATA_W-bit map;
//   5. fc_layer    one score per class (filter size = PN, stride 0);
//   6. softmax     scores saturated to SM_IN_W bits and read as fixed point
//                  with SM_FRAC fraction bits -> probabilities, 1.0 =
//                  2^(PROB_W-1).
// done is high from the end of the softmax until the next start. The
// skip_* outputs pulse when a convolution node skips a multiply because an
// operand is zero. All tensors are packed with element (0,0) in the most
// significant position; fc_w holds class c at [c*PN*PN*DATA_W +: PN*PN*DATA_W].
// The layer set is the one the source design builds its library for; this
// particular chain and its sizes are this design's own, sized so the
// pooling layer works on the 4 x 4 tensor of the source design's example.
module cnn_forward
  import cnn_pkg::*;
#(
  parameter int         IMG_N   = 6,
  parameter int         K       = 3,
  parameter int         DATA_W  = 4,
  parameter int         ACC_W   = 16,
  parameter int         CLASSES = 4,
  parameter int         SM_IN_W = 12,
  parameter int         SM_FRAC = 8,
  parameter int         PROB_W  = 16,
  parameter mult_kind_e MULT    = MULT_DEFAULT,
  parameter int         CONV_NODES = 1,
  localparam int        CN      = IMG_N - K + 1,
  localparam int        PN      = CN / 2,
  localparam int        SW      = $clog2(ACC_W + 1)
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              start,
  input  logic [IMG_N*IMG_N*DATA_W-1:0]     img,
  input  logic [K*K*DATA_W-1:0]             conv_w,
  input  logic [CLASSES*PN*PN*DATA_W-1:0]   fc_w,
  output logic                              conv_valid,
  output logic signed [ACC_W-1:0]           conv_data,
  output logic [$clog2(CN)-1:0]             conv_row,
  output logic [$clog2(CN)-1:0]             conv_col,
  output logic [CN*CN*DATA_W-1:0]           act_map,
  output logic [SW-1:0]                     scale,
  output logic                              overflow,
  output logic [CN*CN-1:0]                  null_mask,
  output logic [PN*PN*DATA_W-1:0]           pool_map,
  output logic [CLASSES*ACC_W-1:0]          scores,
  output logic [CLASSES*PROB_W-1:0]         probs,
  output logic                              done,
  output logic                              skip_conv,
  output logic                              skip_fc
);
  typedef enum logic [2:0] {S_IDLE, S_CONV, S_POOL, S_FC, S_SM, S_DONE} state_e;
  state_e state;

  logic                       conv_done, pool_done, fc_done, sm_done;
  logic                       pool_en, fc_start, sm_start;
  logic [CN*CN*ACC_W-1:0]     conv_map, relu_map;
  logic [PN*PN*DATA_W-1:0]    pool_raw;
  logic [CLASSES*SM_IN_W-1:0] sm_scores;

  conv2d #(.N(IMG_N), .K(K), .STRIDE(1), .DATA_W(DATA_W), .ACC_W(ACC_W), .MULT(MULT),
           .NODES(CONV_NODES)) u_conv (
    .clk, .rst, .start(start && (state == S_IDLE || state == S_DONE)), .in_flat(img), .w_flat(conv_w),
    .out_valid(conv_valid), .out_data(conv_data), .out_row(conv_row), .out_col(conv_col),
    .out_flat(conv_map),
    .done(conv_done), .skip(skip_conv));

  for (genvar i = 0; i < CN * CN; i++) begin : g_relu
    relu #(.W(ACC_W)) u_relu (
      .in_data(conv_map[i*ACC_W +: ACC_W]), .out_data(relu_map[i*ACC_W +: ACC_W]));
  end

  scale_approx #(.COUNT(CN * CN), .IN_W(ACC_W), .OUT_W(DATA_W)) u_scale (
    .in_flat(relu_map), .out_flat(act_map), .scale, .overflow, .null_mask);

  maxpool #(.N(CN), .P(2), .DATA_W(DATA_W)) u_pool (
    .clk, .rst, .en(pool_en), .in_flat(act_map), .out_flat(pool_raw), .done(pool_done));

  // maxpool delivers window (0,0) in its lowest element; reorder so that
  // (0,0) is most significant like every other tensor.
  for (genvar i = 0; i < PN * PN; i++) begin : g_reorder
    assign pool_map[(PN*PN-1-i)*DATA_W +: DATA_W] = pool_raw[i*DATA_W +: DATA_W];
  end

  fc_layer #(.N(PN), .CLASSES(CLASSES), .DATA_W(DATA_W), .ACC_W(ACC_W), .MULT(MULT)) u_fc (
    .clk, .rst, .start(fc_start), .in_flat(pool_map), .w_flat(fc_w), .scores,
    .done(fc_done), .skip(skip_fc));

  // Saturate each score to the softmax input width.
  always_comb begin
    logic signed [ACC_W-1:0] s;
    for (int c = 0; c < CLASSES; c++) begin
      s = scores[c*ACC_W +: ACC_W];
      if (s > ACC_W'(2**(SM_IN_W-1) - 1))
        sm_scores[c*SM_IN_W +: SM_IN_W] = {1'b0, {(SM_IN_W-1){1'b1}}};
      else if (s < -ACC_W'(2**(SM_IN_W-1)))
        sm_scores[c*SM_IN_W +: SM_IN_W] = {1'b1, {(SM_IN_W-1){1'b0}}};
      else
        sm_scores[c*SM_IN_W +: SM_IN_W] = s[SM_IN_W-1:0];
    end
  end

  softmax #(.CLASSES(CLASSES), .IN_W(SM_IN_W), .IN_FRAC(SM_FRAC), .PROB_W(PROB_W)) u_sm (
    .clk, .rst, .start(sm_start), .scores(sm_scores), .probs, .done(sm_done));

  assign pool_en  = (state == S_CONV) && conv_done;
  assign fc_start = (state == S_POOL) && pool_done;
  assign sm_start = (state == S_FC)   && fc_done;
  assign done     = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE: if (start) state <= S_CONV;
        S_CONV: if (conv_done) state <= S_POOL;
        S_POOL: if (pool_done) state <= S_FC;
        S_FC:   if (fc_done) state <= S_SM;
        S_SM:   if (sm_done) state <= S_DONE;
        S_DONE: if (start) state <= S_CONV;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
