// tdc_thermo_decoder: turns the latched phase code of one TDC into binary
// and joins it with the ripple-counter MSBs.
//
// The PHASES phases are taps of a differential DLL, so they are 50 % duty
// copies of the clock, each T/PHASES later than the one before, and the upper
// half are the complements of the lower half. Latched at a time that lies j
// phase steps after the rising edge of D0, the lower half D0..D(PHASES/2-1)
// holds a thermometer code: with D0 = 1 it has j+1 ones, with D0 = 0 it has
// PHASES-1-j ones. The fine code j therefore is a ones count, corrected by
// D0. The 12-bit result is {msb, j}.
//
// In the data-compressive mode only latch L0 is enabled; the low
// log2(PHASES) bits are dropped and returned as zeros, so the code counts
// whole clock periods only.
//
// Interface: q (latched phases), msb (counter), mode, code. Combinational.
// Using only the lower half for the ones count is this design's choice; the
// thermometer-to-binary conversion, the 8+4 bit split and the truncation in
// mode 2 follow the sensor description.
module tdc_thermo_decoder
#(
  parameter int unsigned PHASES   = lidar_pkg::PHASES,
  parameter int unsigned MSB_BITS = lidar_pkg::MSB_BITS
) (
  input  logic [PHASES-1:0]                       q,
  input  logic [MSB_BITS-1:0]                     msb,
  input  lidar_pkg::tdc_mode_e                               mode,
  output logic [MSB_BITS+$clog2(PHASES)-1:0]      code
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned LB = $clog2(PHASES);

  logic [LB-1:0] ones;
  logic [LB-1:0] fine;

  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < PHASES / 2; i++) begin
      ones = ones + LB'(q[i]);
    end
    if (q[0]) fine = ones - LB'(1);
    else      fine = LB'(PHASES - 1) - ones;

    if (mode == lidar_pkg::MODE_DATA_COMPRESSIVE) code = {msb, {LB{1'b0}}};
    else                               code = {msb, fine};
  end

endmodule
