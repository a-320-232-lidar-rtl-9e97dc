// tb_aqrc_pixel: fires photons at the pixel model and checks that the
// column line follows the avalanche only when the row is selected, that the
// pixel ignores photons while held, and that it re-arms after the internal
// hold time (tsel = 0) or after the column timer's recharge (tsel = 1).
module tb_aqrc_pixel;
  timeunit 1ns;
  timeprecision 1ps;

  logic photon = 0, rsel = 0, tsel = 0, col_timer = 0;
  logic col_out, vfd;
  int checks = 0, failures = 0;

  aqrc_pixel #(.HOLD_INT_NS(50.0), .RECHARGE_NS(2.0)) dut (
    .photon, .rsel, .tsel, .col_timer, .col_out, .vfd);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic flash();
    photon = 1; #0.5; photon = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5;
    chk(vfd && !col_out, "armed at start");
    // internal hold, row selected
    rsel = 1; flash(); #1;
    chk(!vfd && col_out, "avalanche seen on column");
    #20; flash(); #1;
    chk(!vfd, "held during hold time");
    #40;
    chk(vfd && !col_out, "re-armed after internal hold");
    // row not selected: node falls, column stays low
    rsel = 0; flash(); #1;
    chk(!vfd && !col_out, "unselected row does not drive column");
    #60;
    // column-timer hold
    tsel = 1; rsel = 1; flash(); #1;
    chk(col_out, "avalanche with column timer hold");
    #200;
    chk(!vfd, "held until column timer");
    col_timer = 1; #1; col_timer = 0; #3;
    chk(vfd && !col_out, "re-armed by column timer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
