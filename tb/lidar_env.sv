// lidar_env: test environment for lidar_top, used by the end-to-end
// testbench at any array size.
//
// It plays the parts outside the chip periphery: a 100 MHz system clock,
// the 1 GHz differential clock of the PLL, one AQRC pixel model per column
// standing for the selected row, the laser (for every laser trigger the
// reference start rises 5 ns later and each column's photon arrives a
// random time of flight after that, or not at all), and a receiver for the
// serial output. For every line it works out, from the chosen times of
// flight alone, the interval the time amplifier should produce
// (gain * tof, or its saturated value) and checks each received word
// against it: within 1 LSB (62.5 ps) in mode 1, within one 16-LSB step in
// mode 2, all ones (of the bits sent) for a column without photon. Frames cycle through
// mode 1 at 16x, mode 1 at 8x, mode 2 at 4x and mode 1 at 1x (bypass).
// At the end it requires that each mechanism happened (with ALL_MODES
// cleared, only those a single 16x frame shows): stalls on a busy
// serializer, both modes, all gains, saturation, empty columns, column-timer
// recharges, a second photon ignored in the hold, and a changed revolution
// step.
module lidar_env #(
  parameter int  COLS      = 320,
  parameter int  ROWS      = 232,
  parameter int  FRAMES    = 4,
  parameter real T_FULL_NS = 200.0,
  parameter int  WATCHDOG_US = 100000,
  parameter bit  ALL_MODES   = 1'b1,  // require every mode and gain (needs 4 frames)
  parameter bit  GATE_PLL    = 1'b0   // run the 1 GHz clock only while a row is selected
) (
  output logic                    clk,
  output logic                    rst_n,
  output logic                    run,
  output lidar_pkg::tdc_mode_e    mode,
  output lidar_pkg::ta_gain_e     ta_gain,
  output logic [7:0]              hold_cycles,
  output logic                    ck_inp,
  output logic                    ck_inn,
  output logic                    ref_start,
  output logic [COLS-1:0]         col_out,
  input  logic [ROWS-1:0]         row_sel,
  input  logic [COLS-1:0]         col_timer,
  input  logic                    laser_fire,
  input  logic                    sdo,
  input  logic                    sval,
  input  logic                    sync,
  input  logic [15:0]             frame_idx,
  input  logic [$clog2(ROWS)-1:0] line_idx,
  input  logic                    stall,
  input  logic                    frame_done
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam real LSB = 0.0625;   // ns, one DLL phase step at 1 GHz
  localparam int  Q   = 4;        // lines in flight

  int checks = 0, failures = 0;
  int n_stall = 0, n_mode1 = 0, n_mode2 = 0, n_sat = 0, n_none = 0;
  int n_recharge = 0, n_second = 0, n_rot = 0, n_frames = 0, n_words = 0;
  int n_gain [4] = '{0, 0, 0, 0};

  // expected results per line in flight
  real  exp_i    [Q][COLS];
  bit   exp_none [Q][COLS];
  bit   exp_m2   [Q];
  int   shot_no = 0, dec_no = 0;
  real  tof [COLS];
  logic [COLS-1:0] photon;
  logic [15:0] last_rot_frame;
  event shot;
  bit   started = 1'b0;

  // clocks
  initial clk = 1'b0;
  always #5 clk = ~clk;
  // 1 GHz clock; when GATE_PLL is set it stops (low) outside the exposure and
  // conversion part of each line, which only shortens the simulation
  initial ck_inp = 1'b0;
  always #0.5 ck_inp = (!GATE_PLL || (|row_sel) || ck_inp) ? ~ck_inp : 1'b0;
  assign ck_inn = ~ck_inp;

  // pixels of the selected row
  for (genvar c = 0; c < COLS; c++) begin : g_pix
    aqrc_pixel u_pix (.photon(photon[c]), .rsel(|row_sel), .tsel(1'b1),
                      .col_timer(col_timer[c]), .col_out(col_out[c]), .vfd());
  end

  // photon pulses of one shot, in time order: each column with a time of
  // flight gets a pulse, and a second one 20 ns later, inside the hold.
  // Entry = {time in ps, column, kind}; kind 0/2 raise, 1/3 lower.
  initial photon = '0;
  always begin
    longint ev [$];
    longint t_now, t_ev;
    int     c, kind;
    @(shot);
    ev.delete();
    for (int i = 0; i < COLS; i++) begin
      if (tof[i] >= 0.0) begin
        t_ev = longint'((5.0 + tof[i] - 0.1) * 1000.0);
        ev.push_back(((t_ev)         << 14) | (longint'(i) << 2) | 0);
        ev.push_back(((t_ev + 500)   << 14) | (longint'(i) << 2) | 1);
        ev.push_back(((t_ev + 20000) << 14) | (longint'(i) << 2) | 2);
        ev.push_back(((t_ev + 20500) << 14) | (longint'(i) << 2) | 3);
      end
    end
    ev.sort();
    t_now = 0;
    foreach (ev[i]) begin
      t_ev = ev[i] >>> 14;
      c    = int'((ev[i] >>> 2) & 4095);
      kind = int'(ev[i] & 3);
      if (t_ev > t_now) #(real'(t_ev - t_now) / 1000.0);
      t_now = t_ev;
      if (kind == 2 && col_out[c]) n_second++;
      photon[c] = (kind == 0 || kind == 2);
    end
  end

  function automatic real gain_of(lidar_pkg::ta_gain_e g);
    case (g)
      lidar_pkg::TA_GAIN_4X:  return 4.0;
      lidar_pkg::TA_GAIN_8X:  return 8.0;
      lidar_pkg::TA_GAIN_16X: return 16.0;
      default:                return 1.0;
    endcase
  endfunction

  // laser shot: choose the times of flight and the expected intervals
  // (a trigger seen before reset is released is not a shot)
  always @(posedge laser_fire) begin
    int   k;
    real  g;
    logic [ROWS-1:0] exp_sel;
    if (started) begin
      k = shot_no % Q;
      g = gain_of(ta_gain);
      exp_m2[k] = (mode == lidar_pkg::MODE_DATA_COMPRESSIVE);
      if (exp_m2[k]) n_mode2++; else n_mode1++;
      n_gain[int'(ta_gain)]++;
      if (frame_idx != last_rot_frame) begin
        if (frame_idx[3:0] != last_rot_frame[3:0]) n_rot++;
        last_rot_frame = frame_idx;
      end
      exp_sel = '0;
      exp_sel[line_idx] = 1'b1;
      checks++;
      if (row_sel !== exp_sel) begin
        failures++;
        $display("FAIL row select at line %0d", line_idx);
      end
      for (int c = 0; c < COLS; c++) begin
        if ($urandom_range(0, 7) == 0) begin
          tof[c] = -1.0;
          exp_none[k][c] = 1'b1;
          n_none++;
        end else begin
          // mostly inside the linear range; some beyond it at high gain
          if ($urandom_range(0, 9) == 0) tof[c] = 13.0 + 0.001 * $urandom_range(0, 5000);
          else                           tof[c] = 0.2 + 0.001 * $urandom_range(0, 10000);
          exp_none[k][c] = 1'b0;
          if (g == 1.0)                 exp_i[k][c] = tof[c];
          else if (g * tof[c] < T_FULL_NS) exp_i[k][c] = g * tof[c];
          else begin
            exp_i[k][c] = tof[c] + T_FULL_NS - T_FULL_NS / g;
            n_sat++;
          end
        end
      end
      shot_no++;
      ->shot;
      #5.0 ref_start = 1'b1;
      #100.0 ref_start = 1'b0;
    end
  end

  logic [COLS-1:0] col_timer_q = '0;
  always @(posedge clk) begin
    if (stall) n_stall++;
    n_recharge += $countones(col_timer & ~col_timer_q);
    col_timer_q <= col_timer;
  end

  // serial receiver
  int   bit_cnt, col_cnt, bits;
  logic [11:0] word;
  bit   in_line = 0;
  always @(posedge clk) begin
    int   k;
    real  got, d;
    if (sval) begin
      if (sync) begin
        in_line = 1;
        col_cnt = 0;
        bit_cnt = 0;
        word    = '0;
      end
      if (in_line) begin
        k    = dec_no % Q;
        bits = exp_m2[k] ? 8 : 12;
        word = {word[10:0], sdo};
        bit_cnt++;
        if (bit_cnt == bits) begin
          if (exp_m2[k]) word = word << 4;
          checks++;
          n_words++;
          if (exp_none[k][col_cnt]) begin
            if (word !== (exp_m2[k] ? 12'hff0 : 12'hfff)) begin
              failures++;
              $display("FAIL line %0d col %0d: expected no-event code, got %h", dec_no, col_cnt, word);
            end
          end else begin
            got = real'(word) * LSB;
            d   = got - exp_i[k][col_cnt];
            if (exp_m2[k] ? (d <= -16.0 * LSB || d >= 16.0 * LSB) : (d <= -1.001 * LSB || d >= 1.001 * LSB)) begin
              failures++;
              $display("FAIL line %0d col %0d mode%0d: code %0d = %f ns, expected %f ns",
                       dec_no, col_cnt, exp_m2[k] ? 2 : 1, word, got, exp_i[k][col_cnt]);
            end
          end
          bit_cnt = 0;
          word    = '0;
          col_cnt++;
          if (col_cnt == COLS) begin
            in_line = 0;
            dec_no++;
          end
        end
      end
    end
  end

  // frame schedule: 16x, 8x, compressive 4x, 1x
  always @(posedge clk) begin
    if (frame_done) begin
      n_frames++;
      unique case (n_frames % 4)
        0: begin mode <= lidar_pkg::MODE_LINEARITY_BOOST;  ta_gain <= lidar_pkg::TA_GAIN_16X; end
        1: begin mode <= lidar_pkg::MODE_LINEARITY_BOOST;  ta_gain <= lidar_pkg::TA_GAIN_8X;  end
        2: begin mode <= lidar_pkg::MODE_DATA_COMPRESSIVE; ta_gain <= lidar_pkg::TA_GAIN_4X;  end
        default: begin mode <= lidar_pkg::MODE_LINEARITY_BOOST; ta_gain <= lidar_pkg::TA_GAIN_1X; end
      endcase
      if (n_frames >= FRAMES) run <= 1'b0;
    end
  end

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL never happened: %s", what); end
    else $display("  %-34s %0d", what, n);
  endtask

  initial begin
    #(real'(WATCHDOG_US) * 1000.0);
    failures++;
    $display("FAIL watchdog: %0d of %0d lines received", dec_no, shot_no);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; run = 1'b0; ref_start = 1'b0;
    mode = lidar_pkg::MODE_LINEARITY_BOOST; ta_gain = lidar_pkg::TA_GAIN_16X;
    hold_cycles = 8'd30;
    last_rot_frame = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    started = 1'b1;
    @(posedge clk);
    run <= 1'b1;
    wait (n_frames >= FRAMES);
    wait (dec_no == shot_no);
    repeat (5) @(posedge clk);
    $display("Mechanisms:");
    need(n_stall,    "stall cycles (serializer busy)");
    need(n_mode1,    "lines in linearity-boost mode");
    if (ALL_MODES) begin
      need(n_mode2,    "lines in data-compressive mode");
      need(n_gain[0],  "lines with TA bypass (1x)");
      need(n_gain[1],  "lines with TA 4x");
      need(n_gain[2],  "lines with TA 8x");
    end
    need(n_gain[3],  "lines with TA 16x");
    need(n_sat,      "saturated TA conversions");
    need(n_none,     "columns without photon");
    need(n_recharge, "column-timer recharges");
    need(n_second,   "photons ignored during hold");
    if (ALL_MODES) need(n_rot, "revolution step changes");
    need(n_frames,   "frames");
    need(n_words,    "words received");
    checks++;
    if (n_words != shot_no * COLS) begin
      failures++;
      $display("FAIL received %0d words for %0d lines", n_words, shot_no);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
