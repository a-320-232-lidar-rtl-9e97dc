// tb_line_buffer: loads random lines (with some columns marked as having no
// event) and reads every column back, checking stored codes, the all-ones
// no-event code, and that data hold when load is low.
module tb_line_buffer;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int COLS = 20;
  logic clk = 0, rst_n = 0, load = 0;
  logic [COLS-1:0][11:0] din;
  logic [COLS-1:0] din_valid;
  logic [4:0] rd_idx;
  logic [11:0] rd_data;
  logic [11:0] ref_line [COLS];
  int checks = 0, failures = 0;

  line_buffer #(.COLS(COLS)) dut (.clk, .rst_n, .load, .din, .din_valid, .rd_idx, .rd_data);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0; din_valid = '0; rd_idx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 10; n++) begin
      @(negedge clk);
      for (int c = 0; c < COLS; c++) begin
        din[c] = 12'($urandom);
        din_valid[c] = ($urandom_range(0, 4) != 0);
        ref_line[c] = din_valid[c] ? din[c] : 12'hfff;
      end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int c = 0; c < COLS; c++) din[c] = 12'($urandom);  // must not be taken
      for (int c = 0; c < COLS; c++) begin
        rd_idx = 5'(c);
        @(negedge clk);
        checks++;
        if (rd_data !== ref_line[c]) begin
          failures++;
          $display("FAIL line %0d col %0d: %h expected %h", n, c, rd_data, ref_line[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
