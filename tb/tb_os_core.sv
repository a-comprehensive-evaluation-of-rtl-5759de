// tb_os_core: self-checking test of the output-stationary core at stride 2
// and 1 and memory latencies 0, 2 and 5, on a reduced layer (9x7 IFMAP, 2 or
// 3 channels, 3 filters). See core_harness for what is checked.
module tb_os_core;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NH = 4;
  logic fin [NH];
  int   chk [NH], fail [NH];
  longint unsigned cyc [NH], ird [NH], ord [NH], owr [NH];

  core_harness #(.KIND(2), .OUT_BUF(0), .STRIDE(2), .LAT(2), .SEED(11)) h0 (
    .clk, .rst_n, .fin(fin[0]), .checks(chk[0]), .failures(fail[0]), .cycles(cyc[0]),
    .in_reads(ird[0]), .ofm_reads(ord[0]), .ofm_writes(owr[0]));
  core_harness #(.KIND(2), .OUT_BUF(1), .STRIDE(2), .LAT(2), .SEED(12)) h1 (
    .clk, .rst_n, .fin(fin[1]), .checks(chk[1]), .failures(fail[1]), .cycles(cyc[1]),
    .in_reads(ird[1]), .ofm_reads(ord[1]), .ofm_writes(owr[1]));
  core_harness #(.KIND(2), .OUT_BUF(0), .STRIDE(1), .LAT(0), .CH(3), .SEED(13)) h2 (
    .clk, .rst_n, .fin(fin[2]), .checks(chk[2]), .failures(fail[2]), .cycles(cyc[2]),
    .in_reads(ird[2]), .ofm_reads(ord[2]), .ofm_writes(owr[2]));
  core_harness #(.KIND(2), .OUT_BUF(1), .STRIDE(1), .LAT(5), .CH(3), .SEED(14)) h3 (
    .clk, .rst_n, .fin(fin[3]), .checks(chk[3]), .failures(fail[3]), .cycles(cyc[3]),
    .in_reads(ird[3]), .ofm_reads(ord[3]), .ofm_writes(owr[3]));

  int checks = 0, failures = 0;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    for (int i = 0; i < NH; i++) begin checks += chk[i]; failures += fail[i]; end
    // one write per output, never a read-back
    checks++; if (!(owr[0] == 36 && ord[0] == 0 && ord[2] == 0)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
