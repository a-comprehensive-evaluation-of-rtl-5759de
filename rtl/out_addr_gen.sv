// out_addr_gen: OFMAP memory address generation.
//
// Combinational. Output value O[f][y][x] lives at f*OUT_H*OUT_W + y*OUT_W + x,
// one 20-bit value per address. The generator is named in the published design's
// block diagram; the layout is this design's own choice.
module out_addr_gen
  #(
  parameter int unsigned OUT_W   = 15,
  parameter int unsigned OUT_H   = 15,
  parameter int unsigned OADDR_W = 12,
  parameter int unsigned IDX_W   = 8
)(
  input  logic [IDX_W-1:0]   f,
  input  logic [IDX_W-1:0]   y,
  input  logic [IDX_W-1:0]   x,
  output logic [OADDR_W-1:0] addr
);
  assign addr = OADDR_W'((32'(f) * OUT_H + 32'(y)) * OUT_W + 32'(x));
endmodule
