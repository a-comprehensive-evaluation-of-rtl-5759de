// input_buffer: the bias and weight partitions of a core's input buffer.
//
// Holds NBIAS bias values and NSETS filter sets of 3x3 weights, written one
// value per cycle as they arrive from the input memory and read a whole filter
// set (nine weights) at a time to feed the arithmetic core. The weight-
// stationary core keeps one set and one bias (NSETS = NBIAS = 1); the input-
// stationary core keeps every filter of the layer (NSETS = filters x channels,
// NBIAS = filters). Weight index within the buffer is set*9 + r*3 + c.
// Writes take effect at the clock edge; reads are combinational.
module input_buffer
  import conv_pkg::*;
#(
  parameter int unsigned NSETS = 1,
  parameter int unsigned NBIAS = 1,
  localparam int unsigned WI_W = $clog2(NSETS*KK),
  localparam int unsigned SI_W = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int unsigned BI_W = (NBIAS > 1) ? $clog2(NBIAS) : 1
)(
  input  logic            clk,
  input  logic            wr_en,
  input  logic            wr_bias,    // 1: write bias[wr_idx], 0: weight[wr_idx]
  input  logic [WI_W-1:0] wr_idx,
  input  data_t           wr_data,
  input  logic [SI_W-1:0] rd_set,
  input  logic [BI_W-1:0] rd_bias,
  output data_t           w [KK],
  output data_t           bias
);

  data_t wmem [NSETS*KK];
  data_t bmem [NBIAS];

  always_ff @(posedge clk) begin
    if (wr_en && !wr_bias && 32'(wr_idx) < NSETS*KK) wmem[wr_idx] <= wr_data;
    if (wr_en &&  wr_bias && 32'(wr_idx) < NBIAS)    bmem[BI_W'(wr_idx)] <= wr_data;
  end

  always_comb begin
    for (int i = 0; i < KK; i++) w[i] = wmem[32'(rd_set)*KK + i];
    bias = bmem[rd_bias];
  end

endmodule
