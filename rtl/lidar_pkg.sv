// lidar_pkg: sizes, types and constants shared by the column-parallel
// phase-revolved TDC LiDAR periphery.
//
// Array format (320 columns x 232 rows), 16 DLL phases, 8-bit ripple counter
// MSBs and 4 LSBs forming a 12-bit TDC code follow the sensor description.
// The encoding of the two operating modes and of the time-amplifier gain
// select is this design's own choice.
package lidar_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned COLS      = 320;  // column-parallel TDCs
  localparam int unsigned ROWS      = 232;  // lines per frame
  localparam int unsigned PHASES    = 16;   // DLL phases per 1 GHz period
  localparam int unsigned LSB_BITS  = 4;    // log2(PHASES)
  localparam int unsigned MSB_BITS  = 8;    // ripple counter width
  localparam int unsigned TDC_BITS  = MSB_BITS + LSB_BITS;  // 12

  typedef logic [TDC_BITS-1:0] tdc_code_t;

  // Mode 1 enables all 16 latch cells, mode 2 only latch L0 and drops the
  // 4 LSBs (16x data compression, recovered off chip by averaging).
  typedef enum logic {
    MODE_LINEARITY_BOOST  = 1'b0,
    MODE_DATA_COMPRESSIVE = 1'b1
  } tdc_mode_e;

  // Time-amplifier gain: off (1x) or 4x, 8x, 16x.
  typedef enum logic [1:0] {
    TA_GAIN_1X  = 2'd0,
    TA_GAIN_4X  = 2'd1,
    TA_GAIN_8X  = 2'd2,
    TA_GAIN_16X = 2'd3
  } ta_gain_e;

endpackage
