// tb_lidar_top: end-to-end test of the sensor periphery at reduced size
// (8 columns, 3 rows, 4 frames), driven and checked by lidar_env.
module tb_lidar_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int COLS = 8, ROWS = 3;

  logic clk, rst_n, run, ck_inp, ck_inn, ref_start;
  lidar_pkg::tdc_mode_e mode;
  lidar_pkg::ta_gain_e  ta_gain;
  logic [7:0] hold_cycles;
  logic [COLS-1:0] col_out, col_timer;
  logic [ROWS-1:0] row_sel;
  logic laser_fire, sdo, sval, sync, stall, frame_done;
  logic [15:0] frame_idx;
  logic [1:0]  line_idx;

  lidar_top #(.COLS(COLS), .ROWS(ROWS)) dut (
    .clk, .rst_n, .run, .mode, .ta_gain, .hold_cycles, .ck_inp, .ck_inn,
    .ref_start, .col_out, .row_sel, .col_timer, .laser_fire, .sdo, .sval,
    .sync, .frame_idx, .line_idx, .stall, .frame_done);

  lidar_env #(.COLS(COLS), .ROWS(ROWS), .FRAMES(4), .WATCHDOG_US(200)) env (
    .clk, .rst_n, .run, .mode, .ta_gain, .hold_cycles, .ck_inp, .ck_inn,
    .ref_start, .col_out, .row_sel, .col_timer, .laser_fire, .sdo, .sval,
    .sync, .frame_idx, .line_idx, .stall, .frame_done);
endmodule
