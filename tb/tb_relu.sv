// tb_relu: checks max(0, x) on boundary and random 20-bit values with the
// rectifier enabled, and pass-through with it disabled.
module tb_relu;
  import conv_pkg::*;
  logic en;
  acc_t din, dout;
  int checks = 0, failures = 0;

  relu dut (.*);

  task automatic t(input logic e, input acc_t v);
    acc_t exp_v;
    en = e; din = v;
    #1;
    exp_v = (e && v[ACC_W-1]) ? acc_t'(0) : v;
    checks++;
    if (dout !== exp_v) begin
      failures++;
      $display("en=%0b din=%0d dout=%0d expected %0d", e, v, dout, exp_v);
    end
  endtask

  initial begin
    t(1, 0); t(1, 1); t(1, -1); t(1, 20'sh7FFFF); t(1, 20'sh80000);
    t(0, -1); t(0, 20'sh80000); t(0, 5);
    for (int i = 0; i < 200; i++) t(1'($urandom), acc_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
