// tb_input_buffer: writes every bias and weight of a 4-filter, 3-channel
// buffer in random order, then reads back every filter set and bias.
module tb_input_buffer;
  import conv_pkg::*;
  localparam int NSETS = 12, NBIAS = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        wr_en, wr_bias;
  logic [6:0]  wr_idx;
  data_t       wr_data;
  logic [3:0]  rd_set;
  logic [1:0]  rd_bias;
  data_t       w [KK];
  data_t       bias;

  input_buffer #(.NSETS(NSETS), .NBIAS(NBIAS)) dut (.*);

  data_t wref [NSETS*KK];
  data_t bref [NBIAS];
  int checks = 0, failures = 0;

  initial begin
    wr_en = 0; wr_bias = 0; wr_idx = '0; wr_data = '0; rd_set = '0; rd_bias = '0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = NSETS*KK - 1; i >= 0; i--) begin
        @(negedge clk);
        wr_en = 1; wr_bias = 0; wr_idx = 7'(i); wr_data = data_t'($urandom);
        wref[i] = wr_data;
      end
      for (int i = 0; i < NBIAS; i++) begin
        @(negedge clk);
        wr_en = 1; wr_bias = 1; wr_idx = 7'(i); wr_data = data_t'($urandom);
        bref[i] = wr_data;
      end
      @(negedge clk) wr_en = 0;
      for (int s = 0; s < NSETS; s++) begin
        rd_set = 4'(s); rd_bias = 2'(s % NBIAS);
        #1;
        for (int i = 0; i < KK; i++) begin
          checks++;
          if (w[i] !== wref[s*KK+i]) begin failures++; $display("set %0d w%0d", s, i); end
        end
        checks++;
        if (bias !== bref[s % NBIAS]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
