// time_amp: behavioural model (not synthesizable) of the column time
// amplifier.
//
// Two integration nodes V_intN and V_intP start low (held by `rst`). The
// reference start IN_N lets V_intN charge with a large current; when the SPAD
// signal IN_P arrives, both nodes charge with the small current. The node that
// got the head start crosses the inverter threshold first (OUT_N), V_intP
// T_FULL_NS after IN_P (OUT_P), so OUT_P - OUT_N = G * (IN_P - IN_N), G being
// the current ratio (4, 8 or 16). If IN_P comes so late that V_intN reaches
// the threshold on the large current alone (at IN_N + T_FULL_NS / G), the
// output interval saturates. With the gain set to 1x the amplifier is
// bypassed and both edges pass after BYPASS_NS.
//
// Interface: in_n, in_p (rising edges), rst (high = integrators reset), gain,
// out_n, out_p. Timing: OUT_P follows IN_P by T_FULL_NS. One conversion per
// reset; the amplified outputs clear while rst is high. In bypass the
// outputs simply follow the inputs after BYPASS_NS.
// The integrator principle and the gain set follow the sensor description;
// the linear-ramp model, T_FULL_NS and the bypass delay are this design's.
module time_amp
#(
  parameter real T_FULL_NS = 200.0,
  parameter real BYPASS_NS = 0.5
) (
  input  logic     in_n,
  input  logic     in_p,
  input  logic     rst,
  input  lidar_pkg::ta_gain_e gain,
  output logic     out_n,
  output logic     out_p
);
  timeunit 1ns;
  timeprecision 1ps;

  realtime t_n, t_p;
  real     g, dt;
  logic    sat;
  logic    amp_n, amp_p;   // amplified edges
  logic    byp_n, byp_p;   // bypass path (gain 1x)

  initial begin
    byp_n = 1'b0;
    byp_p = 1'b0;
  end
  always @(in_n) byp_n <= #(BYPASS_NS) in_n;
  always @(in_p) byp_p <= #(BYPASS_NS) in_p;

  assign out_n = (gain == lidar_pkg::TA_GAIN_1X) ? byp_n : amp_n;
  assign out_p = (gain == lidar_pkg::TA_GAIN_1X) ? byp_p : amp_p;

  function automatic real gain_value(lidar_pkg::ta_gain_e gs);
    case (gs)
      lidar_pkg::TA_GAIN_4X:  return 4.0;
      lidar_pkg::TA_GAIN_8X:  return 8.0;
      lidar_pkg::TA_GAIN_16X: return 16.0;
      default:     return 1.0;
    endcase
  endfunction

  // V_intN reaching the threshold on the large current alone.
  initial sat = 1'b0;
  always begin
    @(posedge in_n);
    sat = 1'b0;
    if (gain != lidar_pkg::TA_GAIN_1X) begin
      #(T_FULL_NS / gain_value(gain));
      sat = 1'b1;
    end
  end

  initial begin
    amp_n = 1'b0;
    amp_p = 1'b0;
    forever begin
      wait (rst == 1'b1);
      amp_n = 1'b0;
      amp_p = 1'b0;
      wait (rst == 1'b0);
      g = gain_value(gain);
      @(posedge in_n or posedge rst);
      if (rst) continue;
      t_n = $realtime;
      if (gain == lidar_pkg::TA_GAIN_1X) continue;
      @(posedge in_p or posedge sat or posedge rst);
      if (rst) continue;
      if (in_p && !sat) begin
        t_p = $realtime;
        dt  = t_p - t_n;
        #(T_FULL_NS - g * dt) amp_n = 1'b1;
        #(g * dt)             amp_p = 1'b1;
      end else begin
        amp_n = 1'b1;
        @(posedge in_p or posedge rst);
        if (rst) continue;
        #(T_FULL_NS) amp_p = 1'b1;
      end
    end
  end

endmodule
