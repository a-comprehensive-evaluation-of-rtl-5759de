// in_addr_gen: bias, weight and feature address generators and the mux that
// selects which of them drives the input-memory address.
//
// Combinational. The input memory holds, one 8-bit value per address:
//   bias[f]                at BIAS_BASE   + f
//   weight[f][c][r][col]   at WEIGHT_BASE + ((f*CH + c)*3 + r)*3 + col
//   ifmap[c][y][x]         at IFMAP_BASE  + (c*IN_H + y)*IN_W + x
// with the three regions packed in that order from address 0. A feature
// address is formed from the window origin (y0, x0) plus the offset (r, col)
// inside the 3x3 window. The three generators and the mux follow the published
// design's block diagram; the memory layout is this design's own choice.
module in_addr_gen
  import conv_pkg::*;
#(
  parameter int unsigned IN_W    = 32,
  parameter int unsigned IN_H    = 32,
  parameter int unsigned CH      = 3,
  parameter int unsigned NF      = 16,
  parameter int unsigned IADDR_W = 12,
  parameter int unsigned IDX_W   = 8
)(
  input  src_e               src,
  input  logic [IDX_W-1:0]   f,
  input  logic [IDX_W-1:0]   c,
  input  logic [1:0]         r,
  input  logic [1:0]         col,
  input  logic [IDX_W-1:0]   y0,
  input  logic [IDX_W-1:0]   x0,
  output logic [IADDR_W-1:0] addr
);

  localparam int unsigned BIAS_BASE   = 0;
  localparam int unsigned WEIGHT_BASE = NF;
  localparam int unsigned IFMAP_BASE  = NF + NF * CH * KK;

  logic [31:0] bias_a, weight_a, feat_a;

  always_comb begin
    bias_a   = BIAS_BASE + 32'(f);
    weight_a = WEIGHT_BASE + ((32'(f) * CH + 32'(c)) * K + 32'(r)) * K + 32'(col);
    feat_a   = IFMAP_BASE + (32'(c) * IN_H + 32'(y0) + 32'(r)) * IN_W + 32'(x0) + 32'(col);
    unique case (src)
      SRC_BIAS:    addr = IADDR_W'(bias_a);
      SRC_WEIGHT:  addr = IADDR_W'(weight_a);
      default:     addr = IADDR_W'(feat_a);
    endcase
  end

endmodule
