// tdc_latch_bank: the LSB part of one TDC, PHASES latch cells L0..L15 that
// freeze the revolved DLL phases when the (time-amplified) event arrives.
//
// Each cell is a storage element triggered by the rising edge of `evt`. Only
// the first rising edge after `clr` is taken: the `hit` flag, set by that
// edge, blocks later edges until the next clear. Cells whose enable bit is low
// stay at 0 (power-down of the unused cells): in the linearity-boost mode all
// cells are enabled, in the data-compressive mode only L0.
//
// Interface: d (revolved phases), evt (stop event), clr (asynchronous clear,
// high active, held high between conversions), en (per-cell enable),
// q (latched phase code), hit (a conversion has happened).
// Timing: q and hit are valid shortly after the evt edge and stay until clr.
// Triggering on the event edge and the single-shot hit flag are this design's
// reading of "event-driven latches"; the cell count and enables follow the
// sensor description.
module tdc_latch_bank #(
  parameter int unsigned PHASES = lidar_pkg::PHASES
) (
  input  logic [PHASES-1:0] d,
  input  logic              evt,
  input  logic              clr,
  input  logic [PHASES-1:0] en,
  output logic [PHASES-1:0] q,
  output logic              hit
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge evt or posedge clr) begin
    if (clr) begin
      q   <= '0;
      hit <= 1'b0;
    end else if (!hit) begin
      q   <= d & en;
      hit <= 1'b1;
    end
  end

endmodule
