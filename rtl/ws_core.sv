// ws_core: weight-stationary (WS) convolutional core, with or without an
// output buffer (OUT_BUF = 1 gives the "WS-buffer" variant).
//
// Computes one convolutional layer, O[f][y][x] = ReLU(B[f] + sum over channels
// c and the 3x3 window of I[c][S*y+r][S*x+col] * W[f][c][r][col]), reading
// bias, weights and IFMAP from the input memory and writing O to the OFMAP
// memory. Loop order (f outer, c, then every window of channel c): for each
// (f, c) the nine weights are read once and stay in the weight buffer while
// every IFMAP window of channel c streams past them. Moving along a row, the
// K-STRIDE columns shared with the previous window are kept in the feature
// buffer and only the new columns are read. Each window gives one partial sum
// p (bias included for channel 0):
//   OUT_BUF = 0: the running sum lives in the OFMAP memory; for c > 0 it is
//                read back, p is added and it is written again, so every output
//                costs CH writes and CH-1 reads.
//   OUT_BUF = 1: the running sum of the current output channel lives in an
//                OUT_H*OUT_W-entry output buffer; only the final value is
//                written, once per output.
// ReLU is applied to the value of the last channel only.
//
// Memory interfaces (both the same request/valid form): the core raises *_ce
// with the address (and for a write ofmap_we and pixel_out) and holds them
// until it samples *_valid high at a rising edge; that edge completes the
// access and read data is taken from ifmap_value / pixel_in in that cycle. One
// access is outstanding per memory. `start` (one cycle, while idle) begins a
// layer; `done` pulses for one cycle when the last output has been written.
//
// Follows the published design: the dataflow and its loop order, the bias/weight/
// feature buffers, the column reuse at stride 2, the 3x3 arithmetic core, the
// output-buffer size and the memory signal names. This design's own: the
// handshake timing, the memory layout, and the form of the double buffer:
// the loader reads the next window (or filter set) while the previous
// window's result is computed and written back, with one window in flight.
// The core is therefore limited by the input-memory reads: with a memory
// latency of L cycles a layer takes about (L+1) cycles per input read.
module ws_core
  import conv_pkg::*;
#(
  parameter int unsigned IN_W    = 32,
  parameter int unsigned IN_H    = 32,
  parameter int unsigned CH      = 3,
  parameter int unsigned NF      = 16,
  parameter int unsigned STRIDE  = 2,
  parameter bit          OUT_BUF = 1'b0,
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
  // input memory (bias, weights, IFMAP)
  output logic [IADDR_W-1:0] ifmap_add,
  output logic               ifmap_ce,
  input  logic               ifmap_valid,
  input  data_t              ifmap_value,
  // OFMAP memory
  output logic [OADDR_W-1:0] ofmap_add,
  output logic               ofmap_ce,
  output logic               ofmap_we,
  output acc_t               pixel_out,
  input  acc_t               pixel_in,
  input  logic               ofmap_valid
);

  typedef enum logic [2:0] {
    S_IDLE, S_RD_BIAS, S_RD_W, S_RD_FEAT, S_ISSUE, S_ADV, S_DONE
  } state_e;
  typedef enum logic [2:0] {
    W_IDLE, W_WAIT, W_RD_OFM, W_WR_OFM, W_BUF_WR
  } wstate_e;

  state_e  state;                  // loader
  wstate_e wstate;                 // write-back

  logic [IDX_W-1:0] f, c, oy, ox;  // window being loaded
  logic [IDX_W-1:0] wf, wc, wy, wx;// window being written back
  logic [1:0]       lr, lc;        // position inside the window being read
  acc_t             res;           // value to write back
  logic             first_c, last_c, wfirst_c, wlast_c;
  logic             wb_idle, issue;  // write-back free; window issued this cycle

  assign first_c  = (c == '0);
  assign last_c   = (32'(c) == CH - 1);
  assign wfirst_c = (wc == '0);
  assign wlast_c  = (32'(wc) == CH - 1);

  // ---------------- input buffer: bias, weights, features ----------------
  data_t wv [KK];
  data_t xv [KK];
  data_t bias_v;
  logic  ib_we, ib_bias, fb_we, fb_shift;

  assign ib_we   = (state == S_RD_BIAS || state == S_RD_W) && ifmap_valid;
  assign ib_bias = (state == S_RD_BIAS);
  assign fb_we   = (state == S_RD_FEAT) && ifmap_valid;

  input_buffer #(.NSETS(1), .NBIAS(1)) u_ibuf (
    .clk, .wr_en(ib_we), .wr_bias(ib_bias),
    .wr_idx(4'(32'(lr) * K + 32'(lc))), .wr_data(ifmap_value),
    .rd_set(1'b0), .rd_bias(1'b0), .w(wv), .bias(bias_v)
  );

  feature_buffer #(.STRIDE(STRIDE)) u_fbuf (
    .clk, .wr_en(fb_we), .wr_row(lr), .wr_col(lc), .wr_data(ifmap_value),
    .shift(fb_shift), .x(xv)
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
    .f(wf), .y(wy), .x(wx), .addr(ofmap_add)
  );

  assign ifmap_ce = (state == S_RD_BIAS || state == S_RD_W || state == S_RD_FEAT);
  assign ofmap_ce = (wstate == W_RD_OFM || wstate == W_WR_OFM);
  assign ofmap_we = (wstate == W_WR_OFM);

  // ---------------- arithmetic core ----------------
  logic mac_valid;
  acc_t mac_sum;

  mac_array u_mac (
    .clk, .rst_n, .in_valid(issue), .w(wv), .x(xv),
    .bias(first_c ? ext(bias_v) : acc_t'(0)),
    .out_valid(mac_valid), .sum(mac_sum)
  );

  // ---------------- activation ----------------
  relu u_relu (.en(wlast_c), .din(res), .dout(pixel_out));

  // ---------------- output buffer (WS-buffer only) ----------------
  localparam int unsigned OB_DEPTH = OUT_W * OUT_H;
  localparam int unsigned OB_AW    = (OB_DEPTH > 1) ? $clog2(OB_DEPTH) : 1;
  logic [OB_AW-1:0] ob_idx;
  acc_t             ob_rdata;
  assign ob_idx = OB_AW'(32'(wy) * OUT_W + 32'(wx));

  if (OUT_BUF) begin : g_obuf
    output_buffer #(.DEPTH(OB_DEPTH)) u_obuf (
      .clk, .we(wstate == W_BUF_WR), .waddr(ob_idx), .wdata(res),
      .raddr(ob_idx), .rdata(ob_rdata)
    );
  end else begin : g_no_obuf
    assign ob_rdata = '0;
  end

  // ---------------- control: loader and write-back ----------------
  // The loader reads bias, weights and windows and issues each window to the
  // arithmetic core; the write-back side then owns that window's result. The
  // arithmetic core copies its operands at issue, so the loader goes straight
  // on to the next window (and to the next filter set) while the previous
  // result is computed and written: the double buffer. One window is in flight.
  logic last_win_col, last_win;
  assign last_win_col = (lr == 2'(K - 1)) && (lc == 2'(K - 1));
  assign last_win     = (32'(ox) == OUT_W - 1) && (32'(oy) == OUT_H - 1);
  assign wb_idle      = (wstate == W_IDLE);
  assign issue        = (state == S_ISSUE) && wb_idle;

  // first column to read for the window at ox
  function automatic logic [1:0] first_col(input logic [IDX_W-1:0] x_idx);
    return (x_idx == '0 || STRIDE >= K) ? 2'd0 : 2'(K - STRIDE);
  endfunction

  // shift the window when stepping to the next window in the same row
  assign fb_shift = (state == S_ADV) && !last_win && (32'(ox) != OUT_W - 1) && (STRIDE < K);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      f <= '0; c <= '0; oy <= '0; ox <= '0; lr <= '0; lc <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          f <= '0; c <= '0; oy <= '0; ox <= '0; lr <= '0; lc <= '0;
          state <= S_RD_BIAS;
        end
        S_RD_BIAS: if (ifmap_valid) state <= S_RD_W;
        S_RD_W: if (ifmap_valid) begin
          if (last_win_col) begin
            lr <= '0; lc <= first_col(ox);
            state <= S_RD_FEAT;
          end else if (lc == 2'(K - 1)) begin
            lc <= '0; lr <= lr + 2'd1;
          end else lc <= lc + 2'd1;
        end
        S_RD_FEAT: if (ifmap_valid) begin
          if (last_win_col) state <= S_ISSUE;
          else if (lr == 2'(K - 1)) begin
            lr <= '0; lc <= lc + 2'd1;
          end else lr <= lr + 2'd1;
        end
        S_ISSUE: if (wb_idle) state <= S_ADV;   // wait until the previous result is written
        S_ADV: begin
          lr <= '0;
          if (!last_win) begin
            if (32'(ox) == OUT_W - 1) begin
              ox <= '0; oy <= oy + 1'b1; lc <= '0;
            end else begin
              ox <= ox + 1'b1; lc <= first_col(ox + 1'b1);
            end
            state <= S_RD_FEAT;
          end else begin
            ox <= '0; oy <= '0; lc <= '0;
            if (!last_c) begin
              c <= c + 1'b1; state <= S_RD_W;
            end else if (32'(f) != NF - 1) begin
              c <= '0; f <= f + 1'b1; state <= S_RD_BIAS;
            end else begin
              state <= S_DONE;
            end
          end
        end
        S_DONE: if (wb_idle) begin              // last result written
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // write-back of the issued window's result
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate <= W_IDLE;
      wf <= '0; wc <= '0; wy <= '0; wx <= '0;
      res <= '0;
    end else begin
      unique case (wstate)
        W_IDLE: if (issue) begin
          wf <= f; wc <= c; wy <= oy; wx <= ox;
          wstate <= W_WAIT;
        end
        W_WAIT: if (mac_valid) begin
          if (OUT_BUF) begin
            res    <= (wfirst_c ? acc_t'(0) : ob_rdata) + mac_sum;
            wstate <= wlast_c ? W_WR_OFM : W_BUF_WR;
          end else begin
            res    <= mac_sum;
            wstate <= wfirst_c ? W_WR_OFM : W_RD_OFM;
          end
        end
        W_RD_OFM: if (ofmap_valid) begin
          res    <= res + pixel_in;
          wstate <= W_WR_OFM;
        end
        W_WR_OFM: if (ofmap_valid) wstate <= W_IDLE;
        W_BUF_WR: wstate <= W_IDLE;
        default:  wstate <= W_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // a write is never requested while a read of the same memory is pending
  a_ofmap_we_ce: assert property (@(posedge clk) disable iff (!rst_n) ofmap_we |-> ofmap_ce);

  // handshake rules: a request, once raised, is held with a stable address
  // (and write data) until the memory answers with valid
  a_ifmap_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ifmap_ce && !ifmap_valid |=> ifmap_ce && $stable(ifmap_add));
  a_ofmap_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ofmap_ce && !ofmap_valid |=> ofmap_ce && $stable(ofmap_add) && $stable(ofmap_we)
                                 && (!ofmap_we || $stable(pixel_out)));

endmodule
