// mac_array: the arithmetic core, a 3x3 multiply-accumulate matrix.
//
// Computes  sum = bias + sum_{r,c} w[r][c] * x[r][c]  for one 3x3 window and
// one 3x3 filter. Each of the three rows is a chain MULT -> MAC -> MAC, each
// stage followed by a register (column c of the row is added in stage c+1).
// The three row sums then pass a small adder tree: row 0 is registered, row 1
// is added and registered, and row 2 plus the bias is added into the output
// register. These are the 3 multipliers, 6 MACs and 12 result registers of the
// arithmetic core. The row-chain / adder-tree structure follows the published design's
// block diagram.
//
// This design's own choice: the operands of later columns and rows, and the
// bias, travel down the pipeline with the partial sums, so a new window/filter
// pair can be presented every cycle (the input-stationary core issues one
// filter per cycle). Latency is LAT = 6 cycles from in_valid to out_valid,
// throughput one result per cycle. No overflow handling: with 8-bit inputs a
// window sum always fits in 20 bits.
module mac_array
  import conv_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t w [KK],        // filter, row-major: w[r*K + c]
  input  data_t x [KK],        // IFMAP window, same order
  input  acc_t  bias,          // added once; 0 for a partial channel sum
  output logic  out_valid,
  output acc_t  sum
);

  localparam int unsigned LAT = 6;

  // operand pipelines
  data_t w1 [KK], x1 [KK];     // after stage 1
  data_t w2 [KK], x2 [KK];     // after stage 2
  acc_t  bias_d [5];

  acc_t mul_r  [K];            // MULT REG
  acc_t mac1_r [K];            // first MAC REG
  acc_t mac2_r [K];            // second MAC REG
  acc_t row0_r, row1_r, row2_r;  // stage-4 registers of the three row sums
  acc_t add1_r;                // REG after first adder (row 0 + row 1)
  acc_t row2_rr;               // row 2 waits for the first adder
  acc_t out_r;                 // REG after second adder

  logic [LAT-1:0] vpipe;

  function automatic acc_t prod(input data_t a, input data_t b);
    return acc_t'(a * b);
  endfunction

  always_ff @(posedge clk) begin
    for (int r = 0; r < K; r++) begin
      mul_r[r]  <= prod(w[r*K], x[r*K]);
      mac1_r[r] <= mul_r[r]  + prod(w1[r*K+1], x1[r*K+1]);
      mac2_r[r] <= mac1_r[r] + prod(w2[r*K+2], x2[r*K+2]);
    end
    w1 <= w;  x1 <= x;
    w2 <= w1; x2 <= x1;
    bias_d[0] <= bias;
    for (int i = 1; i < 5; i++) bias_d[i] <= bias_d[i-1];
    row0_r  <= mac2_r[0];
    row1_r  <= mac2_r[1];
    row2_r  <= mac2_r[2];
    add1_r  <= row0_r + row1_r;
    row2_rr <= row2_r;
    out_r   <= add1_r + row2_rr + bias_d[4];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LAT-2:0], in_valid};
  end

  assign out_valid = vpipe[LAT-1];
  assign sum       = out_r;

endmodule
