// tb_output_buffer: accumulates random values into random entries of a
// 225-entry buffer with single-cycle read-modify-write, comparing with a
// reference array.
module tb_output_buffer;
  import conv_pkg::*;
  localparam int DEPTH = 225;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       we;
  logic [7:0] waddr, raddr;
  acc_t       wdata, rdata;

  output_buffer #(.DEPTH(DEPTH)) dut (.*);

  acc_t ref_m [DEPTH];
  int checks = 0, failures = 0;

  initial begin
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = acc_t'($urandom % 1000); ref_m[i] = wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      int a;
      acc_t d;
      @(negedge clk);
      a = $urandom % DEPTH;
      d = acc_t'($urandom % 200) - 100;
      raddr = 8'(a);
      #1;
      checks++;
      if (rdata !== ref_m[a]) begin failures++; $display("entry %0d", a); end
      we = 1; waddr = 8'(a); wdata = rdata + d;
      ref_m[a] = ref_m[a] + d;
    end
    @(negedge clk) we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
