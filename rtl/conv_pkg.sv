// conv_pkg: types and constants shared by the convolutional cores.
//
// Every input value (IFMAP pixel, weight, bias) is an 8-bit signed integer and
// every output or partial sum is a 20-bit signed integer, the quantisation the
// cores are evaluated with. The filter window is fixed at 3x3 because the
// arithmetic core is a 3x3 multiply-accumulate matrix. The encoding of signed
// values and the source selector of the input-memory address mux are this
// design's choices.
package conv_pkg;

  localparam int unsigned DATA_W = 8;    // input quantisation
  localparam int unsigned ACC_W  = 20;   // output / partial-sum quantisation
  localparam int unsigned K      = 3;    // filter window is K x K
  localparam int unsigned KK     = K * K;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // which address generator drives the input-memory address
  typedef enum logic [1:0] {
    SRC_BIAS    = 2'd0,
    SRC_WEIGHT  = 2'd1,
    SRC_FEATURE = 2'd2
  } src_e;

  // extend an 8-bit value to the accumulator width
  function automatic acc_t ext(input data_t v);
    return acc_t'(v);
  endfunction

endpackage
