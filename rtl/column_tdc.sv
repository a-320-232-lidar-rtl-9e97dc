// column_tdc: the converter of one column, a phase-revolving multiplexer and
// two identical PR TDCs working as a digital correlated double sampler
// (DCDS).
//
// TDC "N" converts the time-amplifier output OUT_N (started by the reference
// laser signal), TDC "P" converts OUT_P (started by the SPAD). Both see the
// same revolved phases and are armed together, so the arm-to-clock offset
// and the revolution step (which moves the time origin by rot phase steps)
// are common to both and cancel in the difference code_p - code_n. The
// result, modulo 2^12, is the amplified time of flight in T/PHASES units.
//
// Interface: p (DLL phases), rot (frame index modulo PHASES), arm (high =
// clear both TDCs), out_n/out_p (events), mode, dcds (result), valid (both
// events converted). Timing: dcds is valid once both events have arrived and
// holds until the next arm.
// Two TDCs per column, DCDS and revolving per frame follow the sensor
// description; forming the difference combinationally is this design's.
module column_tdc
#(
  parameter int unsigned PHASES   = lidar_pkg::PHASES,
  parameter int unsigned MSB_BITS = lidar_pkg::MSB_BITS
) (
  input  logic [PHASES-1:0]                  p,
  input  logic [$clog2(PHASES)-1:0]          rot,
  input  logic                               arm,
  input  logic                               out_n,
  input  logic                               out_p,
  input  lidar_pkg::tdc_mode_e                          mode,
  output logic [MSB_BITS+$clog2(PHASES)-1:0] dcds,
  output logic                               valid
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W = MSB_BITS + $clog2(PHASES);

  logic [PHASES-1:0] d;
  logic [W-1:0]      code_n, code_p;
  logic              done_n, done_p;

  phase_revolver #(.PHASES(PHASES)) u_pr (.p(p), .rot(rot), .d(d));

  pr_tdc #(.PHASES(PHASES), .MSB_BITS(MSB_BITS)) u_tdc_n (
    .d(d), .evt(out_n), .arm(arm), .mode(mode), .code(code_n), .done(done_n)
  );

  pr_tdc #(.PHASES(PHASES), .MSB_BITS(MSB_BITS)) u_tdc_p (
    .d(d), .evt(out_p), .arm(arm), .mode(mode), .code(code_p), .done(done_p)
  );

  assign dcds  = code_p - code_n;
  assign valid = done_n & done_p;

endmodule
