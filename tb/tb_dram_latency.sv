// tb_dram_latency: end-to-end run of all five cores at the default layer
// with 5-cycle memories (the DRAM case; otherwise as tb_conv_accel_top)
// size (32x32x3 IFMAP, sixteen 3x3 filters, stride 2, 15x15x16 OFMAP).
//
// Each core gets its own pair of memory models with the same access latency
// (LAT = 5 cycles) and the same random contents. All five are
// started together. The test checks every OFMAP word of every core against a
// reference convolution with ReLU; the input-memory reads, OFMAP reads and
// writes and busy cycles of each core against closed-form counts; the OFMAP
// write totals 10,800 (unbuffered WS and IS, three writes per output) and
// 3,600 (buffered cores and OS, one per output); and the speed ranking
// IS < WS < OS in cycles. It also counts how often each mechanism occurred and
// fails if one never did: window column reuse, output-buffer accumulation,
// WS reads overlapping write-back (double buffer), OFMAP read-back of
// partial sums, back-to-back filter issue in the IS cores,
// memory wait cycles, ReLU clamping of a negative result, and the done pulse.
module tb_dram_latency;
  import conv_pkg::*;
  localparam int NCORE = 5;
  localparam int LAT   = 5;
  localparam int IN_W = 32, IN_H = 32, CH = 3, NF = 16, STRIDE = 2;
  localparam int OUT_W = (IN_W - K) / STRIDE + 1, OUT_H = (IN_H - K) / STRIDE + 1;
  localparam int N_OUT = NF * OUT_W * OUT_H;
  localparam int IN_SIZE = NF + NF * CH * KK + CH * IN_W * IN_H;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start [NCORE], busy [NCORE], done [NCORE];
  logic [11:0] ifmap_add [NCORE], ofmap_add [NCORE];
  logic        ifmap_ce [NCORE], ifmap_valid [NCORE];
  data_t       ifmap_value [NCORE];
  logic        ofmap_ce [NCORE], ofmap_we [NCORE], ofmap_valid [NCORE];
  acc_t        pixel_out [NCORE], pixel_in [NCORE];

  conv_accel_top dut (.*);

  for (genvar i = 0; i < NCORE; i++) begin : g_mem
    input_mem_model #(.DEPTH(IN_SIZE), .IADDR_W(12), .LAT(LAT)) u_imem (
      .clk, .rst_n, .ifmap_add(ifmap_add[i]), .ifmap_ce(ifmap_ce[i]),
      .ifmap_valid(ifmap_valid[i]), .ifmap_value(ifmap_value[i]));
    ofmap_mem_model #(.DEPTH(N_OUT), .OADDR_W(12), .LAT(LAT)) u_omem (
      .clk, .rst_n, .ofmap_add(ofmap_add[i]), .ofmap_ce(ofmap_ce[i]),
      .ofmap_we(ofmap_we[i]), .pixel_out(pixel_out[i]), .pixel_in(pixel_in[i]),
      .ofmap_valid(ofmap_valid[i]));
  end

  int checks = 0, failures = 0;
  longint unsigned cycles [NCORE];
  longint unsigned n_wait [NCORE], n_clamp [NCORE], n_readback [NCORE], n_done [NCORE];
  longint unsigned n_overlap_ws, n_shift_ws, n_shift_is, n_obuf_ws, n_obuf_is, n_b2b_is;
  logic            is_prev_issue;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NCORE; i++) begin
        cycles[i] <= 0; n_wait[i] <= 0; n_clamp[i] <= 0; n_readback[i] <= 0; n_done[i] <= 0;
      end
      n_overlap_ws <= 0; n_shift_ws <= 0; n_shift_is <= 0; n_obuf_ws <= 0; n_obuf_is <= 0; n_b2b_is <= 0;
      is_prev_issue <= 1'b0;
    end else begin
      for (int i = 0; i < NCORE; i++) begin
        if (busy[i]) cycles[i] <= cycles[i] + 1;
        if (ifmap_ce[i] && !ifmap_valid[i]) n_wait[i] <= n_wait[i] + 1;
        if (ofmap_valid[i] && !ofmap_we[i]) n_readback[i] <= n_readback[i] + 1;
        if (done[i]) n_done[i] <= n_done[i] + 1;
      end
      if (ofmap_valid[0] && ofmap_we[0] && dut.u_ws.u_relu.en && dut.u_ws.u_relu.din < 0) n_clamp[0] <= n_clamp[0] + 1;
      if (ofmap_valid[1] && ofmap_we[1] && dut.u_ws_buf.u_relu.en && dut.u_ws_buf.u_relu.din < 0) n_clamp[1] <= n_clamp[1] + 1;
      if (ofmap_valid[2] && ofmap_we[2] && dut.u_is.u_relu.en && dut.u_is.u_relu.din < 0) n_clamp[2] <= n_clamp[2] + 1;
      if (ofmap_valid[3] && ofmap_we[3] && dut.u_is_buf.u_relu.en && dut.u_is_buf.u_relu.din < 0) n_clamp[3] <= n_clamp[3] + 1;
      if (ofmap_valid[4] && ofmap_we[4] && dut.u_os.u_relu.din < 0) n_clamp[4] <= n_clamp[4] + 1;
      if (ifmap_ce[0] && dut.u_ws.wstate != 0) n_overlap_ws <= n_overlap_ws + 1;
      if (dut.u_ws.fb_shift) n_shift_ws <= n_shift_ws + 1;
      if (dut.u_is.fb_shift) n_shift_is <= n_shift_is + 1;
      if (dut.u_ws_buf.g_obuf.u_obuf.we) n_obuf_ws <= n_obuf_ws + 1;
      if (dut.u_is_buf.g_obuf.u_obuf.we) n_obuf_is <= n_obuf_is + 1;
      is_prev_issue <= dut.u_is.u_mac.in_valid;
      if (is_prev_issue && dut.u_is.u_mac.in_valid) n_b2b_is <= n_b2b_is + 1;
    end
  end

  int exp_o [N_OUT];

  task automatic check(input string what, input longint got, input longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  task automatic mech(input string what, input longint n);
    $display("  %-36s %0d", what, n);
    checks++;
    if (n == 0) begin failures++; $display("  mechanism never occurred: %s", what); end
  endtask

  function automatic int rd(int a);
    return int'(g_mem[0].u_imem.mem[a]);
  endfunction

  initial begin
    data_t v;
    longint acc, a, ncol, win_reads, n_win;
    longint e_in [NCORE], e_wr [NCORE], e_rd [NCORE], e_cyc [NCORE];
    for (int i = 0; i < NCORE; i++) start[i] = 1'b0;
    for (int j = 0; j < IN_SIZE; j++) begin
      v = data_t'($urandom);
      g_mem[0].u_imem.mem[j] = v; g_mem[1].u_imem.mem[j] = v; g_mem[2].u_imem.mem[j] = v;
      g_mem[3].u_imem.mem[j] = v; g_mem[4].u_imem.mem[j] = v;
    end
    for (int j = 0; j < N_OUT; j++) begin
      g_mem[0].u_omem.mem[j] = '0; g_mem[1].u_omem.mem[j] = '0; g_mem[2].u_omem.mem[j] = '0;
      g_mem[3].u_omem.mem[j] = '0; g_mem[4].u_omem.mem[j] = '0;
    end
    for (int f = 0; f < NF; f++)
      for (int y = 0; y < OUT_H; y++)
        for (int x = 0; x < OUT_W; x++) begin
          acc = rd(f);
          for (int c = 0; c < CH; c++)
            for (int r = 0; r < K; r++)
              for (int q = 0; q < K; q++)
                acc += rd(NF + ((f * CH + c) * K + r) * K + q) *
                       rd(NF + NF * CH * KK + (c * IN_H + y * STRIDE + r) * IN_W + x * STRIDE + q);
          exp_o[(f * OUT_H + y) * OUT_W + x] = (acc < 0) ? 0 : int'(acc);
        end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < NCORE; i++) start[i] <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < NCORE; i++) start[i] <= 1'b0;
    wait (n_done[0] != 0 && n_done[1] != 0 && n_done[2] != 0 && n_done[3] != 0 && n_done[4] != 0);
    @(posedge clk);

    for (int j = 0; j < N_OUT; j++) begin
      check($sformatf("WS O[%0d]", j),     longint'(g_mem[0].u_omem.mem[j]), exp_o[j]);
      check($sformatf("WS-buf O[%0d]", j), longint'(g_mem[1].u_omem.mem[j]), exp_o[j]);
      check($sformatf("IS O[%0d]", j),     longint'(g_mem[2].u_omem.mem[j]), exp_o[j]);
      check($sformatf("IS-buf O[%0d]", j), longint'(g_mem[3].u_omem.mem[j]), exp_o[j]);
      check($sformatf("OS O[%0d]", j),     longint'(g_mem[4].u_omem.mem[j]), exp_o[j]);
    end

    a = LAT + 1;
    ncol = (STRIDE < K) ? STRIDE : K;
    win_reads = OUT_H * (KK + (OUT_W - 1) * K * ncol);
    n_win = OUT_H * OUT_W;
    for (int i = 0; i < 2; i++) begin
      e_in[i] = NF + NF * CH * KK + NF * CH * win_reads;
      e_wr[i] = (i == 1) ? N_OUT : CH * N_OUT;
      e_rd[i] = (i == 1) ? 0 : (CH - 1) * N_OUT;
      e_cyc[i] = (e_in[i] + e_wr[i] + e_rd[i]) * a + NF * CH * n_win * 8
               + ((i == 1) ? (CH - 1) * N_OUT : 0) + 1;
    end
    for (int i = 2; i < 4; i++) begin
      e_in[i] = NF + NF * CH * KK + CH * win_reads;
      e_wr[i] = (i == 3) ? N_OUT : CH * N_OUT;
      e_rd[i] = (i == 3) ? 0 : (CH - 1) * N_OUT;
      e_cyc[i] = (e_in[i] + e_wr[i] + e_rd[i]) * a + CH * n_win * (NF + 7)
               + ((i == 3) ? N_OUT : CH * N_OUT) + 1;
    end
    e_in[4] = N_OUT * (1 + 2 * KK * CH);
    e_wr[4] = N_OUT;
    e_rd[4] = 0;
    e_cyc[4] = (e_in[4] + e_wr[4]) * a + N_OUT * (CH * 7 + 1) + 1;

    for (int i = 0; i < NCORE; i++) begin
      $display("core %0d: cycles=%0d input reads=%0d OFMAP reads=%0d OFMAP writes=%0d",
               i, cycles[i], (i == 0) ? g_mem[0].u_imem.reads : (i == 1) ? g_mem[1].u_imem.reads :
               (i == 2) ? g_mem[2].u_imem.reads : (i == 3) ? g_mem[3].u_imem.reads : g_mem[4].u_imem.reads,
               n_readback[i], e_wr[i]);
      if (i < 2) begin
        // WS overlaps write-back with reading: between read-bound and serial time
        checks++;
        if (!(longint'(cycles[i]) >= e_in[i] * a && longint'(cycles[i]) < e_cyc[i])) begin
          failures++;
          $display("core %0d busy cycles %0d outside [%0d, %0d)", i, cycles[i], e_in[i] * a, e_cyc[i]);
        end
      end else check($sformatf("core %0d busy cycles", i), longint'(cycles[i]), e_cyc[i]);
      check($sformatf("core %0d OFMAP reads", i), longint'(n_readback[i]), e_rd[i]);
    end
    check("WS input reads",     longint'(g_mem[0].u_imem.reads), e_in[0]);
    check("WS-buf input reads", longint'(g_mem[1].u_imem.reads), e_in[1]);
    check("IS input reads",     longint'(g_mem[2].u_imem.reads), e_in[2]);
    check("IS-buf input reads", longint'(g_mem[3].u_imem.reads), e_in[3]);
    check("OS input reads",     longint'(g_mem[4].u_imem.reads), e_in[4]);
    // write totals named in the evaluation: 10,800 without and 3,600 with output buffer
    check("WS OFMAP writes",     longint'(g_mem[0].u_omem.writes), 10800);
    check("WS-buf OFMAP writes", longint'(g_mem[1].u_omem.writes), 3600);
    check("IS OFMAP writes",     longint'(g_mem[2].u_omem.writes), 10800);
    check("IS-buf OFMAP writes", longint'(g_mem[3].u_omem.writes), 3600);
    check("OS OFMAP writes",     longint'(g_mem[4].u_omem.writes), 3600);
    // ranking: IS fastest, OS slowest
    checks++; if (!(cycles[2] < cycles[0] && cycles[3] < cycles[1] && cycles[0] < cycles[4])) failures++;

    $display("mechanisms:");
    mech("WS read overlapping write-back", n_overlap_ws);
    mech("WS window column reuse (shift)", n_shift_ws);
    mech("IS window column reuse (shift)", n_shift_is);
    mech("WS-buf output-buffer accumulate", n_obuf_ws);
    mech("IS-buf output-buffer accumulate", n_obuf_is);
    mech("WS OFMAP partial-sum read-back", n_readback[0]);
    mech("IS OFMAP partial-sum read-back", n_readback[2]);
    mech("IS back-to-back filter issue", n_b2b_is);
    for (int i = 0; i < NCORE; i++) begin
      mech($sformatf("core %0d memory wait cycles", i), n_wait[i]);
      mech($sformatf("core %0d ReLU clamp", i), n_clamp[i]);
      mech($sformatf("core %0d done", i), n_done[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
