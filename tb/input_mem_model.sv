// input_mem_model: behavioural model of the external input memory (bias,
// weights, IFMAP) for simulation only.
//
// A request is the core holding ifmap_ce high with a stable address. LAT clock
// cycles after the request starts, ifmap_valid is raised (combinationally, so
// LAT = 0 answers in the request's own cycle) together with the data, for one
// cycle; the next cycle a new request may start. Contents are loaded by the
// testbench through the `mem` array. `reads` counts completed accesses.
module input_mem_model
  import conv_pkg::*;
#(
  parameter int unsigned DEPTH   = 4096,
  parameter int unsigned IADDR_W = 12,
  parameter int unsigned LAT     = 2
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [IADDR_W-1:0] ifmap_add,
  input  logic               ifmap_ce,
  output logic               ifmap_valid,
  output data_t              ifmap_value
);
  data_t       mem [DEPTH];
  int unsigned cnt;
  longint unsigned reads;

  assign ifmap_valid = ifmap_ce && (cnt == LAT);
  assign ifmap_value = ifmap_valid ? mem[ifmap_add] : data_t'(8'hA5);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= 0; reads <= 0;
    end else if (ifmap_valid) begin
      cnt <= 0; reads <= reads + 1;
    end else if (ifmap_ce) begin
      cnt <= cnt + 1;
    end else begin
      cnt <= 0;
    end
  end
endmodule
