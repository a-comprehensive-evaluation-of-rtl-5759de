// output_buffer: on-chip store of partial OFMAP sums.
//
// DEPTH words of 20 bits with one combinational read port and one write port
// written at the clock edge, so a read-modify-write of one entry completes in a
// single cycle. Used by the buffered weight-stationary core (one output
// channel, x*y entries) and the buffered input-stationary core (one output row
// of every channel, x*F entries). Partial sums are kept here instead of being
// read back from and written to the OFMAP memory between channels.
module output_buffer
  import conv_pkg::*;
#(
  parameter int unsigned DEPTH = 225,
  localparam int unsigned A_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
)(
  input  logic           clk,
  input  logic           we,
  input  logic [A_W-1:0] waddr,
  input  acc_t           wdata,
  input  logic [A_W-1:0] raddr,
  output acc_t           rdata
);

  acc_t mem [DEPTH];

  always_ff @(posedge clk)
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
