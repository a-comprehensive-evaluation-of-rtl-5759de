// conv_accel_top: the five evaluated convolutional cores side by side.
//
// Core index  0: WS (weight stationary, no output buffer)
//             1: WS-buffer (weight stationary with an OUT_H*OUT_W output buffer)
//             2: IS (input stationary, no output buffer)
//             3: IS-buffer (input stationary with an OUT_W*NF output buffer)
//             4: OS (output stationary)
// All five compute the same layer (default: 32x32x3 IFMAP, sixteen 3x3
// filters, stride 2, giving a 15x15x16 OFMAP, 8-bit inputs and 20-bit
// outputs) and have the same memory interface, so each is given its own
// input-memory port and OFMAP-memory port, indexed by core. The memories
// themselves are external. Each core starts on its own start bit and pulses
// its own done bit; see ws_core for the request/valid handshake.
//
// Offering the five cores together, with identical interfaces and sizes, is
// how the published evaluation compares them; putting them in one module is this
// design's own arrangement (a product would keep only the one it needs).
module conv_accel_top
  import conv_pkg::*;
#(
  parameter int unsigned IN_W    = 32,
  parameter int unsigned IN_H    = 32,
  parameter int unsigned CH      = 3,
  parameter int unsigned NF      = 16,
  parameter int unsigned STRIDE  = 2,
  parameter int unsigned IADDR_W = 12,
  parameter int unsigned OADDR_W = 12,
  localparam int unsigned NCORE  = 5
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start       [NCORE],
  output logic               busy        [NCORE],
  output logic               done        [NCORE],
  output logic [IADDR_W-1:0] ifmap_add   [NCORE],
  output logic               ifmap_ce    [NCORE],
  input  logic               ifmap_valid [NCORE],
  input  data_t              ifmap_value [NCORE],
  output logic [OADDR_W-1:0] ofmap_add   [NCORE],
  output logic               ofmap_ce    [NCORE],
  output logic               ofmap_we    [NCORE],
  output acc_t               pixel_out   [NCORE],
  input  acc_t               pixel_in    [NCORE],
  input  logic               ofmap_valid [NCORE]
);

  ws_core #(.IN_W(IN_W), .IN_H(IN_H), .CH(CH), .NF(NF), .STRIDE(STRIDE),
            .OUT_BUF(1'b0), .IADDR_W(IADDR_W), .OADDR_W(OADDR_W)) u_ws (
    .clk, .rst_n, .start(start[0]), .busy(busy[0]), .done(done[0]),
    .ifmap_add(ifmap_add[0]), .ifmap_ce(ifmap_ce[0]),
    .ifmap_valid(ifmap_valid[0]), .ifmap_value(ifmap_value[0]),
    .ofmap_add(ofmap_add[0]), .ofmap_ce(ofmap_ce[0]), .ofmap_we(ofmap_we[0]),
    .pixel_out(pixel_out[0]), .pixel_in(pixel_in[0]), .ofmap_valid(ofmap_valid[0])
  );

  ws_core #(.IN_W(IN_W), .IN_H(IN_H), .CH(CH), .NF(NF), .STRIDE(STRIDE),
            .OUT_BUF(1'b1), .IADDR_W(IADDR_W), .OADDR_W(OADDR_W)) u_ws_buf (
    .clk, .rst_n, .start(start[1]), .busy(busy[1]), .done(done[1]),
    .ifmap_add(ifmap_add[1]), .ifmap_ce(ifmap_ce[1]),
    .ifmap_valid(ifmap_valid[1]), .ifmap_value(ifmap_value[1]),
    .ofmap_add(ofmap_add[1]), .ofmap_ce(ofmap_ce[1]), .ofmap_we(ofmap_we[1]),
    .pixel_out(pixel_out[1]), .pixel_in(pixel_in[1]), .ofmap_valid(ofmap_valid[1])
  );

  is_core #(.IN_W(IN_W), .IN_H(IN_H), .CH(CH), .NF(NF), .STRIDE(STRIDE),
            .OUT_BUF(1'b0), .IADDR_W(IADDR_W), .OADDR_W(OADDR_W)) u_is (
    .clk, .rst_n, .start(start[2]), .busy(busy[2]), .done(done[2]),
    .ifmap_add(ifmap_add[2]), .ifmap_ce(ifmap_ce[2]),
    .ifmap_valid(ifmap_valid[2]), .ifmap_value(ifmap_value[2]),
    .ofmap_add(ofmap_add[2]), .ofmap_ce(ofmap_ce[2]), .ofmap_we(ofmap_we[2]),
    .pixel_out(pixel_out[2]), .pixel_in(pixel_in[2]), .ofmap_valid(ofmap_valid[2])
  );

  is_core #(.IN_W(IN_W), .IN_H(IN_H), .CH(CH), .NF(NF), .STRIDE(STRIDE),
            .OUT_BUF(1'b1), .IADDR_W(IADDR_W), .OADDR_W(OADDR_W)) u_is_buf (
    .clk, .rst_n, .start(start[3]), .busy(busy[3]), .done(done[3]),
    .ifmap_add(ifmap_add[3]), .ifmap_ce(ifmap_ce[3]),
    .ifmap_valid(ifmap_valid[3]), .ifmap_value(ifmap_value[3]),
    .ofmap_add(ofmap_add[3]), .ofmap_ce(ofmap_ce[3]), .ofmap_we(ofmap_we[3]),
    .pixel_out(pixel_out[3]), .pixel_in(pixel_in[3]), .ofmap_valid(ofmap_valid[3])
  );

  os_core #(.IN_W(IN_W), .IN_H(IN_H), .CH(CH), .NF(NF), .STRIDE(STRIDE),
            .IADDR_W(IADDR_W), .OADDR_W(OADDR_W)) u_os (
    .clk, .rst_n, .start(start[4]), .busy(busy[4]), .done(done[4]),
    .ifmap_add(ifmap_add[4]), .ifmap_ce(ifmap_ce[4]),
    .ifmap_valid(ifmap_valid[4]), .ifmap_value(ifmap_value[4]),
    .ofmap_add(ofmap_add[4]), .ofmap_ce(ofmap_ce[4]), .ofmap_we(ofmap_we[4]),
    .pixel_out(pixel_out[4]), .pixel_in(pixel_in[4]), .ofmap_valid(ofmap_valid[4])
  );

endmodule
