// tb_in_addr_gen: checks bias, weight and feature addresses of the default
// layer (32x32x3 IFMAP, 16 filters) against the packed memory layout, for
// every bias and weight and random window positions.
module tb_in_addr_gen;
  import conv_pkg::*;
  src_e        src;
  logic [7:0]  f, c, y0, x0;
  logic [1:0]  r, col;
  logic [11:0] addr;
  int checks = 0, failures = 0;

  in_addr_gen dut (.*);

  task automatic t(input int exp_a);
    #1;
    checks++;
    if (int'(addr) != exp_a) begin
      failures++;
      $display("src=%0d f=%0d c=%0d r=%0d col=%0d y0=%0d x0=%0d: %0d expected %0d",
               src, f, c, r, col, y0, x0, addr, exp_a);
    end
  endtask

  initial begin
    c = 0; r = 0; col = 0; y0 = 0; x0 = 0;
    src = SRC_BIAS;
    for (int i = 0; i < 16; i++) begin f = 8'(i); t(i); end
    src = SRC_WEIGHT;
    for (int i = 0; i < 16; i++)
      for (int k = 0; k < 3; k++)
        for (int a = 0; a < 3; a++)
          for (int b = 0; b < 3; b++) begin
            f = 8'(i); c = 8'(k); r = 2'(a); col = 2'(b);
            t(16 + i * 27 + k * 9 + a * 3 + b);
          end
    src = SRC_FEATURE;
    for (int n = 0; n < 300; n++) begin
      c = 8'($urandom % 3); y0 = 8'(2 * ($urandom % 15)); x0 = 8'(2 * ($urandom % 15));
      r = 2'($urandom % 3); col = 2'($urandom % 3); f = 8'($urandom % 16);
      t(448 + int'(c) * 1024 + (int'(y0) + int'(r)) * 32 + int'(x0) + int'(col));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
