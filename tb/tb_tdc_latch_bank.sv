// tb_tdc_latch_bank: drives phase words and event edges; checks that the
// first edge after a clear captures d & en, that later edges are ignored,
// that the clear empties the cells, and that disabled cells stay 0.
module tb_tdc_latch_bank;
  timeunit 1ns;
  timeprecision 1ps;

  logic [15:0] d, en, q;
  logic evt, clr, hit;
  int checks = 0, failures = 0;

  tdc_latch_bank dut (.d, .evt, .clr, .en, .q, .hit);

  task automatic check(input logic [15:0] exp_q, input logic exp_hit, input string what);
    checks++;
    if (q !== exp_q || hit !== exp_hit) begin
      failures++;
      $display("FAIL %s: q=%h hit=%b expected %h %b", what, q, hit, exp_q, exp_hit);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] first;
    evt = 0; clr = 0; d = '0; en = '1;
    #1 clr = 1;
    #5;
    check('0, 1'b0, "after clear");
    for (int n = 0; n < 50; n++) begin
      en  = (n % 3 == 2) ? 16'h0001 : 16'hffff;
      clr = 1; #2; clr = 0; #2;
      first = 16'($urandom);
      d = first; #1;
      evt = 1; #1;
      check(first & en, 1'b1, "first event");
      evt = 0; #1;
      d = ~first; #1;
      evt = 1; #1;
      check(first & en, 1'b1, "second event ignored");
      evt = 0; #1;
      clr = 1; #1;
      check('0, 1'b0, "clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
