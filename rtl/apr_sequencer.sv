// apr_sequencer: the on-chip digital controller that runs the line-scanned
// direct time-of-flight operation.
//
// Each line goes through:
//   ARM   the row is selected, both TDCs of every column are held cleared
//         (ARM_CYCLES cycles; the clear is low in every other state, so each
//         line gives the converters a fresh rising clear edge);
//   SHOT  the TDCs are released and the laser trigger pulses for one cycle;
//   CONV  the conversion window, WINDOW_CYCLES cycles, in which the reference
//         start and the SPAD events are converted;
//   WAIT  if the serializer is still sending the previous line, the line
//         stalls here (counted on `stall`);
//   STORE the results are copied into the line buffer and the serializer is
//         started, so line N is sent while line N+1 converts.
// After the last of ROWS lines the frame index increments; its low bits are
// the phase-revolution step, so the DLL phase order moves one step per frame.
//
// Interface: clk, rst_n, run (keep scanning; stops at a line boundary),
// ser_busy; outputs tdc_arm (high = clear), laser_fire, row_first,
// row_advance, row_en, lb_load, ser_start, frame_idx, line_idx, stall,
// frame_done. Timing: a line lasts ARM_CYCLES + 1 + WINDOW_CYCLES + 1 cycles
// plus any stall.
// The order of operations (laser, conversion, storing in the line buffer,
// serial output during the next line, revolving with the frame index)
// follows the sensor description; the state machine and cycle counts are
// this design's.
module apr_sequencer #(
  parameter int unsigned ROWS          = lidar_pkg::ROWS,
  parameter int unsigned ARM_CYCLES    = 4,
  parameter int unsigned WINDOW_CYCLES = 32,
  parameter int unsigned FRAME_BITS    = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    run,
  input  logic                    ser_busy,
  output logic                    tdc_arm,
  output logic                    laser_fire,
  output logic                    row_first,
  output logic                    row_advance,
  output logic                    row_en,
  output logic                    lb_load,
  output logic                    ser_start,
  output logic [FRAME_BITS-1:0]   frame_idx,
  output logic [$clog2(ROWS)-1:0] line_idx,
  output logic                    stall,
  output logic                    frame_done
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [2:0] {S_IDLE, S_ARM, S_SHOT, S_CONV, S_WAIT, S_STORE} state_e;

  localparam int unsigned CW = $clog2(((ARM_CYCLES > WINDOW_CYCLES) ? ARM_CYCLES : WINDOW_CYCLES) + 1);

  state_e        state;
  logic [CW-1:0] cnt;
  logic          last_line;

  assign last_line = (int'(line_idx) == ROWS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      frame_idx <= '0;
      line_idx  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (run) begin
          state    <= S_ARM;
          cnt      <= CW'(ARM_CYCLES);
          line_idx <= '0;
        end
        S_ARM: if (cnt <= CW'(1)) state <= S_SHOT;
               else               cnt   <= cnt - 1'b1;
        S_SHOT: begin
          state <= S_CONV;
          cnt   <= CW'(WINDOW_CYCLES);
        end
        S_CONV: if (cnt <= CW'(1)) state <= S_WAIT;
                else               cnt   <= cnt - 1'b1;
        S_WAIT: if (!ser_busy) state <= S_STORE;
        S_STORE: begin
          if (last_line) begin
            line_idx  <= '0;
            frame_idx <= frame_idx + 1'b1;
          end else begin
            line_idx <= line_idx + 1'b1;
          end
          if (run) begin
            state <= S_ARM;
            cnt   <= CW'(ARM_CYCLES);
          end else begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    tdc_arm     = (state == S_ARM);
    laser_fire  = (state == S_SHOT);
    row_en      = (state == S_ARM) || (state == S_SHOT) || (state == S_CONV);
    stall       = (state == S_WAIT) && ser_busy;
    lb_load     = (state == S_STORE);
    ser_start   = (state == S_STORE);
    row_first   = (state == S_IDLE) || ((state == S_STORE) && last_line);
    row_advance = (state == S_STORE) && !last_line;
    frame_done  = (state == S_STORE) && last_line;
  end

endmodule
