// tb_out_addr_gen: checks that the 15x15x16 OFMAP is mapped one-to-one onto
// addresses 0..3599 in channel, row, column order.
module tb_out_addr_gen;
  logic [7:0]  f, y, x;
  logic [11:0] addr;
  int checks = 0, failures = 0;

  out_addr_gen dut (.*);

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 15; j++)
        for (int k = 0; k < 15; k++) begin
          f = 8'(i); y = 8'(j); x = 8'(k);
          #1;
          checks++;
          if (int'(addr) != (i * 15 + j) * 15 + k) failures++;
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
