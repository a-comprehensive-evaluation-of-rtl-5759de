// tb_feature_buffer: slides a 3x3 window along a random 3-row strip at
// stride 2 (and a second instance at stride 1), loading the whole first window
// and then, after each shift, only the new columns, and checks every window
// against the strip.
module tb_feature_buffer;
  import conv_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int STRIP_W = 15;
  data_t strip [K][STRIP_W];
  int checks = 0, failures = 0;

  logic       wr_en, shift;
  logic [1:0] wr_row, wr_col;
  data_t      wr_data;
  data_t      x2 [KK], x1 [KK];

  feature_buffer #(.STRIDE(2)) dut2 (.clk, .wr_en, .wr_row, .wr_col, .wr_data, .shift, .x(x2));

  // a stride-1 buffer fed the same values; checked on its own pass
  logic       wr_en1, shift1;
  logic [1:0] wr_row1, wr_col1;
  data_t      wr_data1;
  feature_buffer #(.STRIDE(1)) dut1 (.clk, .wr_en(wr_en1), .wr_row(wr_row1), .wr_col(wr_col1),
                                     .wr_data(wr_data1), .shift(shift1), .x(x1));

  task automatic run(input int s);
    for (int ox = 0; (ox * s + K) <= STRIP_W; ox++) begin
      int c0;
      if (ox != 0) begin
        @(negedge clk);
        if (s == 2) shift = 1; else shift1 = 1;
        @(negedge clk);
        shift = 0; shift1 = 0;
      end
      c0 = (ox == 0) ? 0 : K - s;
      for (int c = c0; c < K; c++)
        for (int r = 0; r < K; r++) begin
          @(negedge clk);
          if (s == 2) begin
            wr_en = 1; wr_row = 2'(r); wr_col = 2'(c); wr_data = strip[r][ox*s+c];
          end else begin
            wr_en1 = 1; wr_row1 = 2'(r); wr_col1 = 2'(c); wr_data1 = strip[r][ox*s+c];
          end
        end
      @(negedge clk);
      wr_en = 0; wr_en1 = 0;
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++) begin
          checks++;
          if (((s == 2) ? x2[r*K+c] : x1[r*K+c]) !== strip[r][ox*s+c]) begin
            failures++;
            $display("stride %0d window %0d r%0d c%0d wrong", s, ox, r, c);
          end
        end
    end
  endtask

  initial begin
    wr_en = 0; shift = 0; wr_row = '0; wr_col = '0; wr_data = '0;
    wr_en1 = 0; shift1 = 0; wr_row1 = '0; wr_col1 = '0; wr_data1 = '0;
    foreach (strip[r, c]) strip[r][c] = data_t'($urandom);
    run(2);
    run(1);
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
