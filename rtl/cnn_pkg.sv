// cnn_pkg: types shared by the CNN forward-pass module library.
//
// mult_kind_e selects which of the two multiplier versions a convolution
// node instantiates: the tool's built-in multiplier (one cycle, maps to a
// DSP block) or the shift-and-add multiplier (W cycles, no DSP block).
// Offering both versions follows the source design; the enum is this
// library's way of choosing between them.
package cnn_pkg;
  typedef enum logic [0:0] {
    MULT_DEFAULT   = 1'b0,
    MULT_SHIFT_ADD = 1'b1
  } mult_kind_e;
endpackage
