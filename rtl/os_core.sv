// os_core: output-stationary (OS) convolutional core.
//
// Computes the same layer as ws_core. For each output O[f][y][x] (loop order
// f, y, x) the core keeps one running sum, internal_p, in a register. For each
// input channel it fetches the 3x3 IFMAP window and the nine weights of
// filter (f, c) from the input memory, runs them through the arithmetic core
// and adds the result to internal_p; the bias of filter f is fetched with the
// first channel. After the last channel it writes ReLU(internal_p) to the
// OFMAP memory, one write per output and no read-back. Nothing is kept between
// outputs: every window and every weight is fetched again each time, so each
// output costs 1 + 18*CH input-memory reads.
//
// Memory interfaces, start/busy/done: identical to ws_core.
//
// Follows the published design: no input buffering, one accumulator register as the
// output buffer, one write per finished output. This design's own: the
// operands sit in the arithmetic core's operand registers (the same window and
// weight registers the other cores use) while the core computes, the bias is
// re-read for each output, handshake timing and memory layout.
module os_core
  import conv_pkg::*;
#(
  parameter int unsigned IN_W    = 32,
  parameter int unsigned IN_H    = 32,
  parameter int unsigned CH      = 3,
  parameter int unsigned NF      = 16,
  parameter int unsigned STRIDE  = 2,
  parameter int unsigned IADDR_W = 12,
  parameter int unsigned OADDR_W = 12,
  localparam int unsigned OUT_W  = (IN_W - K) / STRIDE + 1,
  localparam int unsigned OUT_H  = (IN_H - K) / STRIDE + 1,
  localparam int unsigned IDX_W  = 8
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output logic [IADDR_W-1:0] ifmap_add,
  output logic               ifmap_ce,
  input  logic               ifmap_valid,
  input  data_t              ifmap_value,
  output logic [OADDR_W-1:0] ofmap_add,
  output logic               ofmap_ce,
  output logic               ofmap_we,
  output acc_t               pixel_out,
  input  acc_t               pixel_in,
  input  logic               ofmap_valid
);

  typedef enum logic [3:0] {
    S_IDLE, S_RD_BIAS, S_RD_FEAT, S_RD_W, S_ISSUE, S_WAIT, S_WR_OFM,
    S_ADV, S_DONE
  } state_e;

  state_e state;

  logic [IDX_W-1:0] f, c, oy, ox;
  logic [1:0]       lr, lc;
  acc_t             internal_p;
  logic             first_c, last_c;

  assign first_c = (c == '0);
  assign last_c  = (32'(c) == CH - 1);

  // ---------------- operand registers ----------------
  data_t wv [KK];
  data_t xv [KK];
  data_t bias_v;

  input_buffer #(.NSETS(1), .NBIAS(1)) u_wreg (
    .clk, .wr_en((state == S_RD_BIAS || state == S_RD_W) && ifmap_valid),
    .wr_bias(state == S_RD_BIAS),
    .wr_idx(4'(32'(lr) * K + 32'(lc))), .wr_data(ifmap_value),
    .rd_set(1'b0), .rd_bias(1'b0), .w(wv), .bias(bias_v)
  );

  feature_buffer #(.STRIDE(STRIDE)) u_xreg (
    .clk, .wr_en(state == S_RD_FEAT && ifmap_valid), .wr_row(lr), .wr_col(lc),
    .wr_data(ifmap_value), .shift(1'b0), .x(xv)
  );

  // ---------------- address generation ----------------
  src_e src;
  always_comb begin
    unique case (state)
      S_RD_BIAS: src = SRC_BIAS;
      S_RD_W:    src = SRC_WEIGHT;
      default:   src = SRC_FEATURE;
    endcase
  end

  in_addr_gen #(.IN_W(IN_W), .IN_H(IN_H), .CH(CH), .NF(NF),
                .IADDR_W(IADDR_W), .IDX_W(IDX_W)) u_iag (
    .src, .f, .c, .r(lr), .col(lc),
    .y0(IDX_W'(32'(oy) * STRIDE)), .x0(IDX_W'(32'(ox) * STRIDE)),
    .addr(ifmap_add)
  );

  out_addr_gen #(.OUT_W(OUT_W), .OUT_H(OUT_H), .OADDR_W(OADDR_W),
                 .IDX_W(IDX_W)) u_oag (
    .f, .y(oy), .x(ox), .addr(ofmap_add)
  );

  assign ifmap_ce = (state == S_RD_BIAS || state == S_RD_FEAT || state == S_RD_W);
  assign ofmap_ce = (state == S_WR_OFM);
  assign ofmap_we = (state == S_WR_OFM);

  // ---------------- arithmetic core and activation ----------------
  logic mac_valid;
  acc_t mac_sum;

  mac_array u_mac (
    .clk, .rst_n, .in_valid(state == S_ISSUE), .w(wv), .x(xv),
    .bias(first_c ? ext(bias_v) : acc_t'(0)),
    .out_valid(mac_valid), .sum(mac_sum)
  );

  relu u_relu (.en(1'b1), .din(internal_p), .dout(pixel_out));

  // ---------------- control FSM ----------------
  logic last_win_col;
  assign last_win_col = (lr == 2'(K - 1)) && (lc == 2'(K - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      f <= '0; c <= '0; oy <= '0; ox <= '0; lr <= '0; lc <= '0;
      internal_p <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          f <= '0; c <= '0; oy <= '0; ox <= '0; lr <= '0; lc <= '0;
          state <= S_RD_BIAS;
        end
        S_RD_BIAS: if (ifmap_valid) state <= S_RD_FEAT;
        S_RD_FEAT: if (ifmap_valid) begin     // whole window, column by column
          if (last_win_col) begin
            lr <= '0; lc <= '0; state <= S_RD_W;
          end else if (lr == 2'(K - 1)) begin
            lr <= '0; lc <= lc + 2'd1;
          end else lr <= lr + 2'd1;
        end
        S_RD_W: if (ifmap_valid) begin        // filter set w(f, c)
          if (last_win_col) begin
            lr <= '0; lc <= '0; state <= S_ISSUE;
          end else if (lc == 2'(K - 1)) begin
            lc <= '0; lr <= lr + 2'd1;
          end else lc <= lc + 2'd1;
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (mac_valid) begin
          internal_p <= (first_c ? acc_t'(0) : internal_p) + mac_sum;
          if (last_c) state <= S_WR_OFM;
          else begin
            c <= c + 1'b1; state <= S_RD_FEAT;
          end
        end
        S_WR_OFM: if (ofmap_valid) state <= S_ADV;
        S_ADV: begin
          c <= '0;
          state <= S_RD_BIAS;
          if (32'(ox) != OUT_W - 1) ox <= ox + 1'b1;
          else begin
            ox <= '0;
            if (32'(oy) != OUT_H - 1) oy <= oy + 1'b1;
            else begin
              oy <= '0;
              if (32'(f) != NF - 1) f <= f + 1'b1;
              else state <= S_DONE;
            end
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_ofmap_we_ce: assert property (@(posedge clk) disable iff (!rst_n) ofmap_we |-> ofmap_ce);

  // handshake rules: a request, once raised, is held with a stable address
  // (and write data) until the memory answers with valid
  a_ifmap_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ifmap_ce && !ifmap_valid |=> ifmap_ce && $stable(ifmap_add));
  a_ofmap_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ofmap_ce && !ofmap_valid |=> ofmap_ce && $stable(ofmap_add) && $stable(ofmap_we)
                                 && (!ofmap_we || $stable(pixel_out)));

endmodule
