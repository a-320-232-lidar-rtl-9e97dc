// dll_16phase: behavioural model (not synthesizable) of the global
// delay-locked loop that splits the 1 GHz differential clock into 16 phases.
//
// Eight differential delay stages follow each other; stage k's positive
// output is phase P[k] and its negative output P[k+8]. In lock the phase
// detector has made the eight stages add up to half a clock period, so the
// phases are T/16 apart. Real stages are not identical: each stage's delay is
// off by SKEW_PS times a fixed pattern (+1 -1 +2 -2 +1 +1 -1 -1) whose sum is
// zero, because the loop still locks the total. This systematic skew is what
// makes the raw TDC non-linear and what phase revolving averages out.
//
// Interface: ck_inp / ck_inn (differential clock from the PLL), p[15:0].
// Timing: P[k] follows ck_inp by (k+1)*T/16 plus the accumulated skew; the
// loop's locking transient is not modelled (the model starts locked).
// Eight stages, 16 phases and 1 GHz follow the sensor description; the skew
// pattern and the model form are this design's.
module dll_16phase #(
  parameter real PERIOD_NS = 1.0,
  parameter real SKEW_PS   = 0.0
) (
  input  logic        ck_inp,
  input  logic        ck_inn,
  output logic [15:0] p
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int PATTERN [8] = '{1, -1, 2, -2, 1, 1, -1, -1};

  function automatic real tap_delay(int k);
    real d;
    d = 0.0;
    for (int i = 0; i <= k; i++) d = d + PERIOD_NS / 16.0 + SKEW_PS * 1.0e-3 * real'(PATTERN[i]);
    return d;
  endfunction

  initial p = '0;

  for (genvar k = 0; k < 8; k++) begin : g_stage
    localparam real DLY = tap_delay(k);
    always @(ck_inp) p[k]     <= #(DLY) ck_inp;
    always @(ck_inn) p[k + 8] <= #(DLY) ck_inn;
  end

endmodule
