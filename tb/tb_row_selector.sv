// tb_row_selector: scans all 232 rows twice and checks the one-hot select
// and the index after every advance, the wrap at the last row, the return
// to row 0 on first, and that en gates the outputs.
module tb_row_selector;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int ROWS = 232;
  logic clk = 0, rst_n = 0, first = 0, advance = 0, en = 0;
  logic [ROWS-1:0] row_sel;
  logic [7:0] row_idx;
  int checks = 0, failures = 0;

  row_selector dut (.clk, .rst_n, .first, .advance, .en, .row_sel, .row_idx);

  always #5 clk = ~clk;

  task automatic check_row(input int r);
    logic [ROWS-1:0] exp_sel;
    exp_sel = '0;
    exp_sel[r] = 1'b1;
    en = 1; #1;
    checks++;
    if (row_sel !== exp_sel || row_idx !== 8'(r)) begin
      failures++;
      $display("FAIL row %0d: idx=%0d onehot=%b", r, row_idx, row_sel[r]);
    end
    en = 0; #1;
    checks++;
    if (row_sel !== '0) begin failures++; $display("FAIL en low row %0d", r); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_row(0);
    for (int n = 1; n < 2 * ROWS + 5; n++) begin
      advance = 1; @(negedge clk); advance = 0;
      check_row(n % ROWS);
    end
    first = 1; @(negedge clk); first = 0;
    check_row(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
