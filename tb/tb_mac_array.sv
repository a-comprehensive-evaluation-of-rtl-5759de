// tb_mac_array: feeds the 3x3 arithmetic core one random window/filter/bias
// per cycle (with random idle cycles) and checks every sum against a reference
// dot product, and that each result appears exactly 6 cycles after its input.
module tb_mac_array;
  import conv_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid, out_valid;
  data_t w [KK], x [KK];
  acc_t  bias, sum;

  mac_array dut (.*);

  int   checks = 0, failures = 0;
  acc_t exp_q [$];
  longint unsigned t_q [$];
  longint unsigned cyc = 0;
  int   n_out = 0;

  always_ff @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (in_valid) begin
      acc_t e;
      e = bias;
      for (int i = 0; i < KK; i++) e += acc_t'(w[i]) * acc_t'(x[i]);
      exp_q.push_back(e);
      t_q.push_back(cyc);
    end
    if (out_valid) begin
      acc_t e;
      longint unsigned t;
      checks += 2;
      if (exp_q.size() == 0) begin failures += 2; end
      else begin
        e = exp_q.pop_front();
        t = t_q.pop_front();
        if (sum !== e) begin failures++; $display("sum %0d expected %0d", sum, e); end
        if (cyc - t != 6) begin failures++; $display("latency %0d", cyc - t); end
      end
      n_out++;
    end
  end

  initial begin
    in_valid = 0; bias = '0;
    foreach (w[i]) begin w[i] = '0; x[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      foreach (w[i]) begin
        w[i] = data_t'($urandom);
        x[i] = data_t'($urandom);
      end
      if (n < 4) foreach (w[i]) begin w[i] = -128; x[i] = (n % 2) ? 127 : -128; end
      bias = acc_t'(data_t'($urandom));
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++; if (exp_q.size() != 0 || n_out < 250) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
