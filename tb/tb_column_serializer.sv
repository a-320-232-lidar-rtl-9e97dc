// tb_column_serializer: a small word array stands in for the line buffer.
// The testbench starts a line, collects the bit stream, rebuilds the words
// and compares them (12 bits per column in mode 1, the upper 8 bits in
// mode 2). It also checks the sync strobe and the line length in cycles.
module tb_column_serializer;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int COLS = 10;
  logic clk = 0, rst_n = 0, start = 0;
  lidar_pkg::tdc_mode_e mode;
  logic [3:0] rd_idx;
  logic [11:0] rd_data;
  logic sdo, sval, sync, busy;
  logic [11:0] words [COLS];
  int checks = 0, failures = 0;

  column_serializer #(.COLS(COLS)) dut (.clk, .rst_n, .start, .mode, .rd_idx, .rd_data,
                                        .sdo, .sval, .sync, .busy);

  assign rd_data = words[rd_idx];
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bits, nbits, cycles, syncs;
    logic [11:0] w;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      mode = (n % 2) ? lidar_pkg::MODE_DATA_COMPRESSIVE : lidar_pkg::MODE_LINEARITY_BOOST;
      bits = (n % 2) ? 8 : 12;
      for (int c = 0; c < COLS; c++) words[c] = 12'($urandom);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cycles = 0; syncs = 0;
      for (int c = 0; c < COLS; c++) begin
        w = '0;
        for (int b = 0; b < bits; b++) begin
          if (!sval) begin failures++; $display("FAIL sval low"); end
          if (sync) syncs++;
          checks++;
          if (sync !== (c == 0 && b == 0)) begin failures++; $display("FAIL sync at %0d/%0d", c, b); end
          w = {w[10:0], sdo};
          cycles++;
          @(negedge clk);
        end
        checks++;
        if (w !== (words[c] >> (12 - bits))) begin
          failures++;
          $display("FAIL mode %0d col %0d got %h expected %h", n % 2, c, w, words[c] >> (12 - bits));
        end
      end
      checks++;
      if (busy || cycles != COLS * bits || syncs != 1) begin
        failures++;
        $display("FAIL length: busy=%b cycles=%0d syncs=%0d", busy, cycles, syncs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
