// tb_apr_sequencer: runs the sequencer over two frames of a 5-line array
// with a serializer stand-in that stays busy for a chosen time after each
// start. Checks per line: the arm / laser / window cycle counts, that store
// comes only when the serializer is idle (with stalls counted when it is
// slow), the row pointer pulses, and the frame index increment.
module tb_apr_sequencer;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int ROWS = 5, ARM = 4, WIN = 12;
  logic clk = 0, rst_n = 0, run = 0;
  logic ser_busy;
  logic tdc_arm, laser_fire, row_first, row_advance, row_en, lb_load, ser_start;
  logic stall, frame_done;
  logic [15:0] frame_idx;
  logic [2:0]  line_idx;
  int checks = 0, failures = 0;
  int busy_left = 0, busy_len = 0, stalls = 0;

  apr_sequencer #(.ROWS(ROWS), .ARM_CYCLES(ARM), .WINDOW_CYCLES(WIN)) dut (
    .clk, .rst_n, .run, .ser_busy, .tdc_arm, .laser_fire, .row_first, .row_advance,
    .row_en, .lb_load, .ser_start, .frame_idx, .line_idx, .stall, .frame_done);

  always #5 clk = ~clk;

  // serializer stand-in
  always_ff @(posedge clk) begin
    if (ser_start) busy_left <= busy_len;
    else if (busy_left > 0) busy_left <= busy_left - 1;
    if (stall) stalls <= stalls + 1;
  end
  assign ser_busy = (busy_left > 0);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int arm_n, conv_n, wait_n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!tdc_arm && row_first, "idle points at row 0");
    run = 1;
    for (int f = 0; f < 2; f++) begin
      for (int l = 0; l < ROWS; l++) begin
        busy_len = (l == 2) ? 40 : 5;        // one slow line forces a stall
        arm_n = 0;
        @(negedge clk);
        while (tdc_arm) begin chk(row_en, "row enabled in arm"); arm_n++; @(negedge clk); end
        chk(arm_n == ARM, $sformatf("arm length %0d", arm_n));
        chk(laser_fire && row_en, "laser pulse after arm");
        @(negedge clk);
        chk(!laser_fire, "laser one cycle");
        conv_n = 0;
        while (row_en) begin chk(!tdc_arm, "released in window"); conv_n++; @(negedge clk); end
        chk(conv_n == WIN, $sformatf("window length %0d", conv_n));
        wait_n = 0;
        while (!lb_load) begin chk(stall == ser_busy, "stall flags a busy serializer"); wait_n++; @(negedge clk); end
        chk(wait_n >= 1 && (wait_n == 1 || busy_len > WIN), $sformatf("wait length %0d", wait_n));
        chk(!ser_busy && ser_start, "store when serializer idle");
        chk(int'(line_idx) == l && int'(frame_idx) == f, "line/frame index");
        chk(row_advance == (l != ROWS - 1) && row_first == (l == ROWS - 1)
            && frame_done == (l == ROWS - 1), "row pointer pulses");
      end
    end
    @(negedge clk);
    chk(frame_idx == 16'd2, "frame index after two frames");
    chk(stalls > 0, "stall happened");
    run = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
