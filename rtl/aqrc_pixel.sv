// aqrc_pixel: behavioural model (not synthesizable) of one SPAD pixel with
// its active quenching and recharging (AQRC) circuit.
//
// The SPAD's sense node V_FD idles high (armed). A photon (rising edge of
// `photon`) makes the SPAD avalanche and V_FD fall after AVALANCHE_NS; the
// active quench then holds it low, so further photons are ignored. The hold
// ends either after HOLD_INT_NS, the internal switched-capacitor
// integrator's time (tsel = 0), or when the column timer raises
// `col_timer` (tsel = 1); the node is then recharged and the pixel re-armed
// RECHARGE_NS later. The pixel drives its column line (high while V_FD is
// low) only when its row is selected.
//
// Interface: photon, rsel, tsel, col_timer, col_out, vfd. Timing as above.
// The quench/hold/recharge sequence and the two hold-time sources follow the
// sensor description; the delays, the polarity of tsel and the column-line
// gating by rsel are this design's.
module aqrc_pixel #(
  parameter real AVALANCHE_NS = 0.1,
  parameter real HOLD_INT_NS  = 300.0,
  parameter real RECHARGE_NS  = 2.0
) (
  input  logic photon,
  input  logic rsel,
  input  logic tsel,
  input  logic col_timer,
  output logic col_out,
  output logic vfd
);
  timeunit 1ns;
  timeprecision 1ps;

  initial begin
    vfd = 1'b1;
    forever begin
      @(posedge photon);
      #(AVALANCHE_NS) vfd = 1'b0;
      if (tsel) @(posedge col_timer);
      else      #(HOLD_INT_NS);
      #(RECHARGE_NS) vfd = 1'b1;
    end
  end

  assign col_out = rsel & ~vfd;

endmodule
