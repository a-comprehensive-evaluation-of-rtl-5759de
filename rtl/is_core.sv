// is_core: input-stationary (IS) convolutional core, with or without an output
// buffer (OUT_BUF = 1 gives the "IS-buffer" variant).
//
// Computes the same layer as ws_core, O[f][y][x] = ReLU(B[f] + sum over c and
// the 3x3 window of I[c][S*y+r][S*x+col] * W[f][c][r][col]). First every bias
// and every filter of the layer is read into the input buffer (NF biases,
// NF*CH sets of nine weights). Then each IFMAP window is read once into the
// feature buffer and stays there while all NF filters of its channel are
// applied to it, one filter per cycle into the pipelined arithmetic core; the
// NF partial sums are collected in NF result registers. Column reuse between
// neighbouring windows of a row works as in ws_core.
//   OUT_BUF = 0: loop order c, y, x (channel outermost). After each window
//                the NF partial sums are added into the OFMAP memory: for c>0
//                each is read back, added and written (CH writes and CH-1 reads
//                per output).
//   OUT_BUF = 1: loop order y, c, x, so one output row of every channel is
//                finished before the next row starts. Partial sums of that row
//                (OUT_W*NF entries) accumulate in the output buffer; only
//                the last channel's values are written out, once per output.
// ReLU is applied only to values of the last channel.
//
// Memory interfaces, start/busy/done: identical to ws_core (request held with
// *_ce until *_valid is sampled high; one access outstanding per memory).
//
// Follows the published design: buffering all weights and biases up front, one read
// per IFMAP window, the x*F output-buffer size. This design's own: the loop
// order that makes an x*F buffer sufficient, the per-filter result registers,
// handshake timing, memory layout, and no overlap of reads with arithmetic.
module is_core
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
    S_IDLE, S_LD_BIAS, S_LD_W, S_RD_FEAT, S_ISSUE, S_WAIT,
    S_WB, S_RD_OFM, S_WR_OFM, S_ADV, S_DONE
  } state_e;

  state_e state;

  localparam int unsigned NSETS = NF * CH;
  localparam int unsigned WI_W  = $clog2(NSETS * KK);
  localparam int unsigned SI_W  = (NSETS > 1) ? $clog2(NSETS) : 1;
  localparam int unsigned BI_W  = (NF > 1) ? $clog2(NF) : 1;

  logic [IDX_W-1:0] f, c, oy, ox;   // f: filter while loading weights
  logic [IDX_W-1:0] fi, ri, wf;     // issue, result and write-back filter
  logic [1:0]       lr, lc;
  logic [WI_W-1:0]  widx;           // flat weight-buffer index while loading
  acc_t             res;
  acc_t             psum [NF];
  logic             first_c, last_c, last_res;

  assign first_c = (c == '0);
  assign last_c  = (32'(c) == CH - 1);

  // ---------------- input buffer ----------------
  data_t wv [KK];
  data_t xv [KK];
  data_t bias_v;
  logic  ib_we, fb_we, fb_shift;

  assign ib_we = (state == S_LD_BIAS || state == S_LD_W) && ifmap_valid;
  assign fb_we = (state == S_RD_FEAT) && ifmap_valid;

  input_buffer #(.NSETS(NSETS), .NBIAS(NF)) u_ibuf (
    .clk, .wr_en(ib_we), .wr_bias(state == S_LD_BIAS),
    .wr_idx((state == S_LD_BIAS) ? WI_W'(f) : widx), .wr_data(ifmap_value),
    .rd_set(SI_W'(32'(fi) * CH + 32'(c))), .rd_bias(BI_W'(fi)),
    .w(wv), .bias(bias_v)
  );

  feature_buffer #(.STRIDE(STRIDE)) u_fbuf (
    .clk, .wr_en(fb_we), .wr_row(lr), .wr_col(lc), .wr_data(ifmap_value),
    .shift(fb_shift), .x(xv)
  );

  // ---------------- address generation ----------------
  src_e src;
  always_comb begin
    unique case (state)
      S_LD_BIAS: src = SRC_BIAS;
      S_LD_W:    src = SRC_WEIGHT;
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
    .f(wf), .y(oy), .x(ox), .addr(ofmap_add)
  );

  assign ifmap_ce = (state == S_LD_BIAS || state == S_LD_W || state == S_RD_FEAT);
  assign ofmap_ce = (state == S_RD_OFM || state == S_WR_OFM);
  assign ofmap_we = (state == S_WR_OFM);

  // ---------------- arithmetic core ----------------
  logic mac_valid;
  acc_t mac_sum;

  mac_array u_mac (
    .clk, .rst_n, .in_valid(state == S_ISSUE), .w(wv), .x(xv),
    .bias(first_c ? ext(bias_v) : acc_t'(0)),
    .out_valid(mac_valid), .sum(mac_sum)
  );

  relu u_relu (.en(last_c), .din(res), .dout(pixel_out));

  // ---------------- output buffer (IS-buffer only) ----------------
  localparam int unsigned OB_DEPTH = OUT_W * NF;
  localparam int unsigned OB_AW    = (OB_DEPTH > 1) ? $clog2(OB_DEPTH) : 1;
  logic [OB_AW-1:0] ob_idx;
  acc_t             ob_rdata, captured;
  assign ob_idx = OB_AW'(32'(ox) * NF + 32'(ri));

  if (OUT_BUF) begin : g_obuf
    output_buffer #(.DEPTH(OB_DEPTH)) u_obuf (
      .clk, .we(mac_valid && !last_c), .waddr(ob_idx), .wdata(captured),
      .raddr(ob_idx), .rdata(ob_rdata)
    );
    assign captured = (first_c ? acc_t'(0) : ob_rdata) + mac_sum;
  end else begin : g_no_obuf
    assign ob_rdata = '0;
    assign captured = mac_sum;
  end

  // ---------------- control FSM ----------------
  logic last_win_col, row_end;
  assign last_win_col = (lr == 2'(K - 1)) && (lc == 2'(K - 1));
  assign last_res     = (32'(ri) == NF - 1);
  assign row_end      = (32'(ox) == OUT_W - 1);

  function automatic logic [1:0] first_col(input logic [IDX_W-1:0] x_idx);
    return (x_idx == '0 || STRIDE >= K) ? 2'd0 : 2'(K - STRIDE);
  endfunction

  assign fb_shift = (state == S_ADV) && !row_end && (STRIDE < K);

  // partial sums of the current window, one per filter, in arrival order
  always_ff @(posedge clk)
    if (mac_valid) psum[BI_W'(ri)] <= captured;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      f <= '0; c <= '0; oy <= '0; ox <= '0; lr <= '0; lc <= '0;
      fi <= '0; ri <= '0; wf <= '0; widx <= '0; res <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (mac_valid) ri <= ri + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          f <= '0; c <= '0; oy <= '0; ox <= '0; lr <= '0; lc <= '0; widx <= '0;
          state <= S_LD_BIAS;
        end
        // line 1 of the IS loop: every bias and weight into the input buffer
        S_LD_BIAS: if (ifmap_valid) begin
          if (32'(f) == NF - 1) begin
            f <= '0; state <= S_LD_W;
          end else f <= f + 1'b1;
        end
        S_LD_W: if (ifmap_valid) begin
          widx <= widx + 1'b1;
          if (lc != 2'(K - 1)) lc <= lc + 2'd1;
          else begin
            lc <= '0;
            if (lr != 2'(K - 1)) lr <= lr + 2'd1;
            else begin
              lr <= '0;
              if (32'(c) != CH - 1) c <= c + 1'b1;
              else begin
                c <= '0;
                if (32'(f) != NF - 1) f <= f + 1'b1;
                else state <= S_RD_FEAT;
              end
            end
          end
        end
        S_RD_FEAT: if (ifmap_valid) begin
          if (last_win_col) begin
            fi <= '0; ri <= '0; state <= S_ISSUE;
          end else if (lr == 2'(K - 1)) begin
            lr <= '0; lc <= lc + 2'd1;
          end else lr <= lr + 2'd1;
        end
        S_ISSUE: begin
          if (32'(fi) == NF - 1) state <= S_WAIT;
          else fi <= fi + 1'b1;
        end
        S_WAIT: if (mac_valid && last_res) begin
          wf    <= '0;
          state <= (OUT_BUF && !last_c) ? S_ADV : S_WB;
        end
        S_WB: begin
          res   <= psum[BI_W'(wf)];
          state <= (!OUT_BUF && !first_c) ? S_RD_OFM : S_WR_OFM;
        end
        S_RD_OFM: if (ofmap_valid) begin
          res   <= res + pixel_in;
          state <= S_WR_OFM;
        end
        S_WR_OFM: if (ofmap_valid) begin
          if (32'(wf) == NF - 1) state <= S_ADV;
          else begin
            wf <= wf + 1'b1; state <= S_WB;
          end
        end
        S_ADV: begin
          lr <= '0;
          state <= S_RD_FEAT;
          if (!row_end) begin
            ox <= ox + 1'b1; lc <= first_col(ox + 1'b1);
          end else begin
            ox <= '0; lc <= '0;
            if (OUT_BUF) begin           // y, c, x
              if (!last_c) c <= c + 1'b1;
              else begin
                c <= '0;
                if (32'(oy) != OUT_H - 1) oy <= oy + 1'b1;
                else state <= S_DONE;
              end
            end else begin               // c, y, x
              if (32'(oy) != OUT_H - 1) oy <= oy + 1'b1;
              else begin
                oy <= '0;
                if (!last_c) c <= c + 1'b1;
                else state <= S_DONE;
              end
            end
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          oy <= '0; c <= '0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_ofmap_we_ce: assert property (@(posedge clk) disable iff (!rst_n) ofmap_we |-> ofmap_ce);
  // results never outnumber the filters issued for a window
  a_res_count: assert property (@(posedge clk) disable iff (!rst_n) mac_valid |-> 32'(ri) < NF);

  // handshake rules: a request, once raised, is held with a stable address
  // (and write data) until the memory answers with valid
  a_ifmap_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ifmap_ce && !ifmap_valid |=> ifmap_ce && $stable(ifmap_add));
  a_ofmap_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ofmap_ce && !ofmap_valid |=> ofmap_ce && $stable(ofmap_add) && $stable(ofmap_we)
                                 && (!ofmap_we || $stable(pixel_out)));

endmodule
