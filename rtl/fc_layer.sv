// fc_layer: fully connected layer built from convolution layers.
//
// Each output class is one conv2d whose filter is as large as the input
// (K = N) with the window shift (stride) set to zero, so it produces a
// single dot product of the whole N x N input with that class's weights.
// This construction is the source design's; running the classes in
// parallel, one conv2d each, is this design's own choice.
// w_flat holds the weights of class c at bits [c*N*N*DATA_W +: N*N*DATA_W],
// each class packed like in_flat (element (0,0) most significant). scores
// holds class c at [c*ACC_W +: ACC_W]. start loads inputs and weights;
// done is high from the cycle all classes have finished until the next start.
module fc_layer
  import cnn_pkg::*;
#(
  parameter int         N       = 2,
  parameter int         CLASSES = 4,
  parameter int         DATA_W  = 4,
  parameter int         ACC_W   = 16,
  parameter mult_kind_e MULT    = MULT_DEFAULT
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           start,
  input  logic [N*N*DATA_W-1:0]          in_flat,
  input  logic [CLASSES*N*N*DATA_W-1:0]  w_flat,
  output logic [CLASSES*ACC_W-1:0]       scores,
  output logic                           done,
  output logic                           skip
);
  logic [CLASSES-1:0] cls_done, cls_skip;

  for (genvar c = 0; c < CLASSES; c++) begin : g_cls
    conv2d #(.N(N), .K(N), .STRIDE(0), .DATA_W(DATA_W), .ACC_W(ACC_W), .MULT(MULT)) u_conv (
      .clk, .rst, .start, .in_flat,
      .w_flat(w_flat[c*N*N*DATA_W +: N*N*DATA_W]),
      .out_valid(), .out_data(), .out_row(), .out_col(),
      .out_flat(scores[c*ACC_W +: ACC_W]),
      .done(cls_done[c]), .skip(cls_skip[c]));
  end

  assign done = &cls_done;
  assign skip = |cls_skip;
endmodule
