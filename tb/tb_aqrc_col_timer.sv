// tb_aqrc_col_timer: raises the asynchronous SPAD column line at random
// times and checks that the hold lasts hold_cycles cycles, that recharge
// follows for 2 cycles, that the delay from the SPAD edge is within the
// synchronizer's 2-3 cycles, and that nothing happens without an edge.
module tb_aqrc_col_timer;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst_n = 0, spad = 0;
  logic [7:0] hold_cycles;
  logic recharge, holding;
  int checks = 0, failures = 0;

  aqrc_col_timer dut (.clk, .rst_n, .spad, .hold_cycles, .recharge, .holding);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int to_hold, nhold, nrech;
    hold_cycles = 8'd10;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) begin
      @(negedge clk);
      checks++;
      if (recharge || holding) begin failures++; $display("FAIL activity without event"); end
    end
    for (int n = 0; n < 20; n++) begin
      hold_cycles = 8'($urandom_range(1, 60));
      #($urandom_range(1, 9));
      spad = 1;
      to_hold = 0;
      while (!holding) begin @(posedge clk); #1; to_hold++; end
      checks++;
      if (to_hold < 2 || to_hold > 3) begin failures++; $display("FAIL sync delay %0d", to_hold); end
      nhold = 0;
      while (holding) begin @(posedge clk); #1; nhold++; end
      nrech = 0;
      while (recharge) begin @(posedge clk); #1; nrech++; end
      spad = 0;
      checks++;
      if (nhold != int'(hold_cycles) || nrech != 2) begin
        failures++;
        $display("FAIL hold %0d (exp %0d) recharge %0d", nhold, hold_cycles, nrech);
      end
      repeat (5) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
