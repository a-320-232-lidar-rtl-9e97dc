// lidar_top: periphery of a 320 x 232 direct time-of-flight SPAD sensor with
// a column-parallel, time-amplified, phase-revolved TDC.
//
// The pixel array (SPADs with their AQRC circuits) sits outside this module:
// it receives the one-hot row select and the per-column recharge commands and
// returns one column line per column, high once the selected pixel has
// avalanched. For every line the sequencer clears the converters, fires the
// laser and opens a conversion window. In each column a time amplifier
// stretches the interval between the reference start (ref_start, common to
// all columns) and the SPAD's column line by 1x/4x/8x/16x; two TDCs convert
// the two amplified edges against 16 DLL phases and an 8-bit counter, and
// their difference (digital correlated double sampling) is the 12-bit
// result. The DLL phase order at the TDC latches is rotated by the frame
// index, one step per frame, which spreads the DLL's fixed skew over all
// codes (mode 1, all 16 latches) or dithers the coarse 1 ns grid (mode 2,
// one latch, 4 LSBs dropped). Results go to a line buffer and leave on one
// serial lane while the next line converts.
//
// Clocks: clk runs the sequencer, timers, line buffer and serializer;
// ck_inp/ck_inn (1 GHz, from the PLL) feed the DLL and the TDCs. TDC results
// are static when the line buffer takes them (the window is over).
// The time amplifier and DLL are behavioural models inside this module.
// Block structure and sizes follow the sensor description; cycle counts,
// the sequencer, the serial format and the interfaces are this design's.
module lidar_top
#(
  parameter int unsigned COLS          = lidar_pkg::COLS,
  parameter int unsigned ROWS          = lidar_pkg::ROWS,
  parameter int unsigned ARM_CYCLES    = 4,
  parameter int unsigned WINDOW_CYCLES = 32,
  parameter int unsigned HOLD_W        = 8,
  parameter int unsigned FRAME_BITS    = 16,
  parameter real         T_FULL_NS     = 200.0,
  parameter real         DLL_SKEW_PS   = 0.0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    run,
  input  lidar_pkg::tdc_mode_e               mode,
  input  lidar_pkg::ta_gain_e                ta_gain,
  input  logic [HOLD_W-1:0]       hold_cycles,
  input  logic                    ck_inp,
  input  logic                    ck_inn,
  input  logic                    ref_start,
  input  logic [COLS-1:0]         col_out,
  output logic [ROWS-1:0]         row_sel,
  output logic [COLS-1:0]         col_timer,
  output logic                    laser_fire,
  output logic                    sdo,
  output logic                    sval,
  output logic                    sync,
  output logic [FRAME_BITS-1:0]   frame_idx,
  output logic [$clog2(ROWS)-1:0] line_idx,
  output logic                    stall,
  output logic                    frame_done
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W = lidar_pkg::TDC_BITS;

  logic                    tdc_arm, row_first, row_advance, row_en;
  logic                    lb_load, ser_start, ser_busy;
  logic [lidar_pkg::PHASES-1:0] phases;
  logic [COLS-1:0][W-1:0]  dcds;
  logic [COLS-1:0]         valid;
  logic [$clog2(COLS)-1:0] rd_idx;
  logic [W-1:0]            rd_data;
  logic [$clog2(ROWS)-1:0] row_idx;

  apr_sequencer #(
    .ROWS(ROWS), .ARM_CYCLES(ARM_CYCLES), .WINDOW_CYCLES(WINDOW_CYCLES),
    .FRAME_BITS(FRAME_BITS)
  ) u_seq (
    .clk, .rst_n, .run, .ser_busy, .tdc_arm, .laser_fire, .row_first,
    .row_advance, .row_en, .lb_load, .ser_start, .frame_idx, .line_idx,
    .stall, .frame_done
  );

  row_selector #(.ROWS(ROWS)) u_rows (
    .clk, .rst_n, .first(row_first), .advance(row_advance), .en(row_en),
    .row_sel, .row_idx
  );

  dll_16phase #(.SKEW_PS(DLL_SKEW_PS)) u_dll (
    .ck_inp, .ck_inn, .p(phases)
  );

  for (genvar c = 0; c < COLS; c++) begin : g_col
    logic out_n, out_p;

    aqrc_col_timer #(.HOLD_W(HOLD_W)) u_timer (
      .clk, .rst_n, .spad(col_out[c]), .hold_cycles,
      .recharge(col_timer[c]), .holding()
    );

    time_amp #(.T_FULL_NS(T_FULL_NS)) u_ta (
      .in_n(ref_start), .in_p(col_out[c]), .rst(tdc_arm), .gain(ta_gain),
      .out_n, .out_p
    );

    column_tdc u_tdc (
      .p(phases), .rot(frame_idx[lidar_pkg::LSB_BITS-1:0]), .arm(tdc_arm),
      .out_n, .out_p, .mode, .dcds(dcds[c]), .valid(valid[c])
    );
  end

  line_buffer #(.COLS(COLS), .W(W)) u_lb (
    .clk, .rst_n, .load(lb_load), .din(dcds), .din_valid(valid),
    .rd_idx, .rd_data
  );

  column_serializer #(.COLS(COLS), .W(W)) u_ser (
    .clk, .rst_n, .start(ser_start), .mode, .rd_idx, .rd_data,
    .sdo, .sval, .sync, .busy(ser_busy)
  );

endmodule
