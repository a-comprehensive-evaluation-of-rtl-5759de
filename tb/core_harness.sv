// core_harness: runs one convolutional core through one layer and checks it.
//
// Instantiates the core selected by KIND (0 = WS, 1 = IS, 2 = OS) between
// latency-configurable models of the input and OFMAP memories, fills the
// input memory with random signed 8-bit biases, weights and pixels, pulses
// start and waits for done. It then compares every OFMAP word with a
// reference convolution computed here from the same data, and compares the
// number of input-memory reads, OFMAP reads and writes, and busy cycles with
// closed-form counts for the core's dataflow (for the WS core, whose reads and
// write-back overlap, the cycles must lie between the input-read time and the
// fully serial time). Results are reported on the
// output ports once `fin` is high.
module core_harness
  import conv_pkg::*;
#(
  parameter int unsigned KIND    = 0,
  parameter bit          OUT_BUF = 1'b0,
  parameter int unsigned IN_W    = 9,
  parameter int unsigned IN_H    = 7,
  parameter int unsigned CH      = 2,
  parameter int unsigned NF      = 3,
  parameter int unsigned STRIDE  = 2,
  parameter int unsigned LAT     = 2,
  parameter int unsigned SEED    = 1,
  parameter bit          VERBOSE = 1'b1
)(
  input  logic clk,
  input  logic rst_n,
  output logic fin,
  output int   checks,
  output int   failures,
  output longint unsigned cycles,
  output longint unsigned in_reads,
  output longint unsigned ofm_reads,
  output longint unsigned ofm_writes
);
  localparam int unsigned OUT_W   = (IN_W - K) / STRIDE + 1;
  localparam int unsigned OUT_H   = (IN_H - K) / STRIDE + 1;
  localparam int unsigned N_OUT   = NF * OUT_W * OUT_H;
  localparam int unsigned IN_SIZE = NF + NF * CH * KK + CH * IN_W * IN_H;
  localparam int unsigned IADDR_W = $clog2(IN_SIZE + 1);
  localparam int unsigned OADDR_W = $clog2(N_OUT + 1);

  logic               start, busy, done;
  logic [IADDR_W-1:0] ifmap_add;
  logic               ifmap_ce, ifmap_valid;
  data_t              ifmap_value;
  logic [OADDR_W-1:0] ofmap_add;
  logic               ofmap_ce, ofmap_we, ofmap_valid;
  acc_t               pixel_out, pixel_in;

  input_mem_model #(.DEPTH(IN_SIZE), .IADDR_W(IADDR_W), .LAT(LAT)) u_imem (
    .clk, .rst_n, .ifmap_add, .ifmap_ce, .ifmap_valid, .ifmap_value);
  ofmap_mem_model #(.DEPTH(N_OUT), .OADDR_W(OADDR_W), .LAT(LAT)) u_omem (
    .clk, .rst_n, .ofmap_add, .ofmap_ce, .ofmap_we, .pixel_out, .pixel_in, .ofmap_valid);

  if (KIND == 0) begin : g_dut
    ws_core #(.IN_W(IN_W), .IN_H(IN_H), .CH(CH), .NF(NF), .STRIDE(STRIDE),
              .OUT_BUF(OUT_BUF), .IADDR_W(IADDR_W), .OADDR_W(OADDR_W)) u_dut (.*);
  end else if (KIND == 1) begin : g_dut
    is_core #(.IN_W(IN_W), .IN_H(IN_H), .CH(CH), .NF(NF), .STRIDE(STRIDE),
              .OUT_BUF(OUT_BUF), .IADDR_W(IADDR_W), .OADDR_W(OADDR_W)) u_dut (.*);
  end else begin : g_dut
    os_core #(.IN_W(IN_W), .IN_H(IN_H), .CH(CH), .NF(NF), .STRIDE(STRIDE),
              .IADDR_W(IADDR_W), .OADDR_W(OADDR_W)) u_dut (.*);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cycles <= 0;
    else if (busy) cycles <= cycles + 1;

  assign in_reads   = u_imem.reads;
  assign ofm_reads  = u_omem.reads;
  assign ofm_writes = u_omem.writes;

  int exp_o [N_OUT];

  function automatic int rd(int unsigned a);
    return int'(u_imem.mem[a]);
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (VERBOSE) $display("[%m] %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int unsigned s;
    int unsigned wbase, ibase, ncol, win_reads, a;
    longint e_in, e_ord, e_owr, e_cyc, acc;
    s = $urandom(SEED);
    fin = 0; checks = 0; failures = 0; start = 0;
    for (int i = 0; i < int'(IN_SIZE); i++) u_imem.mem[i] = data_t'($urandom);
    for (int i = 0; i < int'(N_OUT); i++)   u_omem.mem[i] = acc_t'($urandom);
    // reference convolution, equation for O[f][y][x] with ReLU
    wbase = NF; ibase = NF + NF * CH * KK;
    for (int f = 0; f < int'(NF); f++)
      for (int y = 0; y < int'(OUT_H); y++)
        for (int x = 0; x < int'(OUT_W); x++) begin
          acc = rd(f);
          for (int c = 0; c < int'(CH); c++)
            for (int r = 0; r < int'(K); r++)
              for (int q = 0; q < int'(K); q++)
                acc += rd(wbase + ((f * CH + c) * K + r) * K + q) *
                       rd(ibase + (c * IN_H + y * STRIDE + r) * IN_W + x * STRIDE + q);
          exp_o[(f * OUT_H + y) * OUT_W + x] = (acc < 0) ? 0 : int'(acc);
        end
    wait (rst_n === 1'b1);
    repeat (3) @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk iff done);
    @(posedge clk);
    for (int i = 0; i < int'(N_OUT); i++)
      check($sformatf("O[%0d]", i), longint'(u_omem.mem[i]), exp_o[i]);
    // access and cycle counts of the dataflow
    a         = LAT + 1;
    ncol      = (STRIDE < K) ? STRIDE : K;
    win_reads = OUT_H * (KK + (OUT_W - 1) * K * ncol);   // one channel's windows
    case (KIND)
      0: begin
        e_in  = NF + NF * CH * KK + NF * CH * win_reads;
        e_owr = OUT_BUF ? N_OUT : CH * N_OUT;
        e_ord = OUT_BUF ? 0 : (CH - 1) * N_OUT;
        e_cyc = (e_in + e_owr + e_ord) * a + NF * CH * OUT_H * OUT_W * 8
              + (OUT_BUF ? (CH - 1) * N_OUT : 0) + 1;
      end
      1: begin
        e_in  = NF + NF * CH * KK + CH * win_reads;
        e_owr = OUT_BUF ? N_OUT : CH * N_OUT;
        e_ord = OUT_BUF ? 0 : (CH - 1) * N_OUT;
        e_cyc = (e_in + e_owr + e_ord) * a + CH * OUT_H * OUT_W * (NF + 7)
              + (OUT_BUF ? N_OUT : CH * N_OUT) + 1;
      end
      default: begin
        e_in  = N_OUT * (1 + 2 * KK * CH);
        e_owr = N_OUT;
        e_ord = 0;
        e_cyc = (e_in + e_owr) * a + N_OUT * (CH * 7 + 1) + 1;
      end
    endcase
    check("input memory reads", longint'(in_reads), e_in);
    check("OFMAP writes", longint'(ofm_writes), e_owr);
    check("OFMAP reads", longint'(ofm_reads), e_ord);
    if (KIND == 0) begin
      // the double buffer overlaps write-back with the next window's reads:
      // no faster than the input reads alone, and faster than fully serial
      checks++;
      if (!(longint'(cycles) >= e_in * a && longint'(cycles) < e_cyc)) begin
        failures++;
        if (VERBOSE) $display("[%m] busy cycles %0d outside [%0d, %0d)", cycles, e_in * a, e_cyc);
      end
    end else check("busy cycles", longint'(cycles), e_cyc);
    if (VERBOSE)
      $display("[%m] kind=%0d buf=%0d lat=%0d: cycles=%0d in_reads=%0d ofm_reads=%0d ofm_writes=%0d",
               KIND, OUT_BUF, LAT, cycles, in_reads, ofm_reads, ofm_writes);
    fin = 1;
  end
endmodule
