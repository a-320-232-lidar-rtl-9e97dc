// aqrc_col_timer: the column-parallel digital hold-time timer of the active
// quench / recharge (AQRC) pixels.
//
// When the selected pixel of this column avalanches, its column output
// rises. That edge (after a two-flop synchronizer) starts the hold time: the
// timer counts `hold_cycles` clock cycles, during which the pixel stays
// quenched, so only one pulse can reach the TDC in a window. Then it raises
// `recharge` for RECHARGE_CYCLES cycles, which re-arms the pixel (when the
// pixels are set to take their hold time from the column timer).
//
// Interface: clk, rst_n, spad (asynchronous column output), hold_cycles,
// recharge, holding. Timing: the hold starts 2-3 cycles after the spad edge
// (synchronizer) and recharge follows hold_cycles later.
// The timer's role (hold-time control started by the falling V_FD node)
// follows the sensor description; the counter, the synchronizer and the
// recharge pulse length are this design's.
module aqrc_col_timer #(
  parameter int unsigned HOLD_W          = 8,
  parameter int unsigned RECHARGE_CYCLES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              spad,
  input  logic [HOLD_W-1:0] hold_cycles,
  output logic              recharge,
  output logic              holding
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [1:0] {S_IDLE, S_HOLD, S_RECHARGE} state_e;

  localparam int unsigned CW = (HOLD_W > $clog2(RECHARGE_CYCLES + 1)) ?
                               HOLD_W : $clog2(RECHARGE_CYCLES + 1);

  state_e          state;
  logic [CW-1:0]   cnt;
  logic [2:0]      sync_q;
  logic            rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[1:0], spad};
  end
  assign rise = sync_q[1] & ~sync_q[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (rise) begin
          state <= S_HOLD;
          cnt   <= CW'(hold_cycles);
        end
        S_HOLD: if (cnt <= CW'(1)) begin
          state <= S_RECHARGE;
          cnt   <= CW'(RECHARGE_CYCLES);
        end else begin
          cnt <= cnt - 1'b1;
        end
        S_RECHARGE: if (cnt <= CW'(1)) begin
          state <= S_IDLE;
        end else begin
          cnt <= cnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign recharge = (state == S_RECHARGE);
  assign holding  = (state == S_HOLD);

endmodule
