// relu: the activation function, max(0, x), applied to finished OFMAP values.
//
// Combinational. When `en` is low the value passes unchanged: the cores route
// partial channel sums through the same path and only the last channel's sum
// is rectified (applying ReLU to a partial sum would change the result). The
// ReLU choice follows the published design; the bypass for partial sums is this
// design's own.
module relu
  import conv_pkg::*;
(
  input  logic en,
  input  acc_t din,
  output acc_t dout
);
  always_comb dout = (en && din < 0) ? '0 : din;
endmodule
