// phase_revolver: the phase-revolving (PR) multiplexer between the global
// DLL and one column TDC.
//
// The DLL delivers PHASES equally spaced phases P[0..PHASES-1] of the clock.
// Latch input D[i] receives P[(i + rot) mod PHASES], so each step of `rot`
// moves every phase one latch cell along the ring. With `rot` taken from the
// frame index, the fixed skew pattern of the DLL stages lands on a different
// output code each frame and averages out over PHASES frames (linearity
// boost), and in the compressive mode the single-latch conversion grid shifts
// by one phase per frame.
//
// Interface: p (DLL phases), rot (revolution step), d (to the latch cells).
// Purely combinational; it carries clock waveforms, so the delay through it
// should match for all paths. The rotation direction and driving it with
// frame index modulo PHASES are this design's choices; the ring rotation
// itself follows the sensor description.
module phase_revolver #(
  parameter int unsigned PHASES = lidar_pkg::PHASES
) (
  input  logic [PHASES-1:0]         p,
  input  logic [$clog2(PHASES)-1:0] rot,
  output logic [PHASES-1:0]         d
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    for (int unsigned i = 0; i < PHASES; i++) begin
      d[i] = p[(i + int'(rot)) % PHASES];
    end
  end

endmodule
