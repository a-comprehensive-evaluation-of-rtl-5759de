// ofmap_mem_model: behavioural model of the external OFMAP memory for
// simulation only.
//
// Same request/valid timing as input_mem_model: ofmap_valid rises LAT cycles
// after ofmap_ce; with ofmap_we high the edge that sees ofmap_valid stores
// pixel_out, otherwise pixel_in carries the stored word in that cycle. Counts
// reads and writes separately.
module ofmap_mem_model
  import conv_pkg::*;
#(
  parameter int unsigned DEPTH   = 4096,
  parameter int unsigned OADDR_W = 12,
  parameter int unsigned LAT     = 2
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [OADDR_W-1:0] ofmap_add,
  input  logic               ofmap_ce,
  input  logic               ofmap_we,
  input  acc_t               pixel_out,
  output acc_t               pixel_in,
  output logic               ofmap_valid
);
  acc_t        mem [DEPTH];
  int unsigned cnt;
  longint unsigned reads, writes;

  assign ofmap_valid = ofmap_ce && (cnt == LAT);
  assign pixel_in    = (ofmap_valid && !ofmap_we) ? mem[ofmap_add] : acc_t'(20'h5A5A5);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= 0; reads <= 0; writes <= 0;
    end else if (ofmap_valid) begin
      cnt <= 0;
      if (ofmap_we) begin
        mem[ofmap_add] <= pixel_out;
        writes <= writes + 1;
      end else reads <= reads + 1;
    end else if (ofmap_ce) begin
      cnt <= cnt + 1;
    end else begin
      cnt <= 0;
    end
  end
endmodule
