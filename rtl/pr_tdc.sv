// pr_tdc: one phase-revolved time-to-digital converter.
//
// While `arm` is high the converter is cleared. When `arm` falls the ripple
// counter starts counting rising edges of the revolved phase D0; the first
// rising edge of `evt` freezes the PHASES latch cells and stops the counter.
// The decoder joins the latched phases (4 LSBs) and the count (8 MSBs) into a
// 12-bit code, in units of T/PHASES (62.5 ps at 1 GHz), measured from the
// first D0 rising edge after arming (that edge counts as one period). `done`
// tells that an event was converted; with no event the counter wraps.
//
// Interface: d (revolved phases from the PR multiplexer), evt, arm (high =
// clear), mode, code, done. Timing: code is valid a few gate delays after
// the event and holds until arm rises again.
// Structure (latches + ripple counter, enables per mode) follows the sensor
// description; the arm/clear protocol is this design's choice.
module pr_tdc
#(
  parameter int unsigned PHASES   = lidar_pkg::PHASES,
  parameter int unsigned MSB_BITS = lidar_pkg::MSB_BITS
) (
  input  logic [PHASES-1:0]                  d,
  input  logic                               evt,
  input  logic                               arm,
  input  lidar_pkg::tdc_mode_e                          mode,
  output logic [MSB_BITS+$clog2(PHASES)-1:0] code,
  output logic                               done
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [PHASES-1:0]   en;
  logic [PHASES-1:0]   q;
  logic [MSB_BITS-1:0] msb;
  logic                hit;

  // Mode 1: every latch cell; mode 2: only L0.
  assign en = (mode == lidar_pkg::MODE_DATA_COMPRESSIVE) ? PHASES'(1) : '1;

  tdc_latch_bank #(.PHASES(PHASES)) u_lat (
    .d(d), .evt(evt), .clr(arm), .en(en), .q(q), .hit(hit)
  );

  tdc_ripple_counter #(.BITS(MSB_BITS)) u_cnt (
    .ck(d[0]), .run(!hit), .clr(arm), .q(msb)
  );

  tdc_thermo_decoder #(.PHASES(PHASES), .MSB_BITS(MSB_BITS)) u_dec (
    .q(q), .msb(msb), .mode(mode), .code(code)
  );

  assign done = hit;

endmodule
