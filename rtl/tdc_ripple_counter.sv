// tdc_ripple_counter: the MSB part of one TDC, a BITS-bit ripple counter.
//
// Bit 0 toggles on each rising edge of `ck` (the revolved phase D0) while
// `run` is high; bit i toggles on the falling edge of bit i-1, so the count
// ripples up through the stages. `run` is the armed-and-not-yet-hit state of
// the TDC: when the event arrives the counter stops and holds the number of
// whole clock periods. `clr` (asynchronous, high active) empties it.
//
// Interface: ck, run, clr, q. Timing: q settles BITS stage delays after the
// ck edge. Counting D0 rather than the unrevolved clock keeps the MSBs
// aligned with the latched LSB phases whatever the revolution step; that
// choice, and stopping rather than sampling the counter, are this design's.
// The ripple structure and width follow the sensor description.
// Each stage is clocked by the previous stage's output by design (ripple
// counter); lint reports these as derived clocks.
module tdc_ripple_counter #(
  parameter int unsigned BITS = lidar_pkg::MSB_BITS
) (
  input  logic            ck,
  input  logic            run,
  input  logic            clr,
  output logic [BITS-1:0] q
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [BITS-1:0] stage;

  always_ff @(posedge ck or posedge clr) begin
    if (clr)      stage[0] <= 1'b0;
    else if (run) stage[0] <= ~stage[0];
  end

  for (genvar i = 1; i < BITS; i++) begin : g_stage
    logic b;
    always_ff @(negedge stage[i-1] or posedge clr) begin
      if (clr) b <= 1'b0;
      else     b <= ~b;
    end
    assign stage[i] = b;
  end

  assign q = stage;

endmodule
