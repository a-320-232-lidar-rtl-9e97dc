// tb_time_amp: applies IN_N then IN_P with known intervals and measures the
// output edges. Checks OUT_P - OUT_N = G * (IN_P - IN_N) for G = 4, 8, 16,
// OUT_P = IN_P + T_FULL, saturation when G * interval exceeds T_FULL, and
// the 1x bypass.
module tb_time_amp;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real T_FULL = 200.0;
  logic in_n = 0, in_p = 0, rst = 1;
  lidar_pkg::ta_gain_e gain;
  logic out_n, out_p;
  realtime t_on, t_op, t_ip, t_in;
  int checks = 0, failures = 0;

  time_amp #(.T_FULL_NS(T_FULL)) dut (.in_n, .in_p, .rst, .gain, .out_n, .out_p);

  always @(posedge out_n) t_on = $realtime;
  always @(posedge out_p) t_op = $realtime;

  task automatic run_one(input lidar_pkg::ta_gain_e g, input real dt);
    real gv, exp_d, exp_p;
    gain = g;
    gv = (g == lidar_pkg::TA_GAIN_4X) ? 4.0 : (g == lidar_pkg::TA_GAIN_8X) ? 8.0 :
         (g == lidar_pkg::TA_GAIN_16X) ? 16.0 : 1.0;
    rst = 1; in_n = 0; in_p = 0; t_on = -1; t_op = -1;
    #10 rst = 0;
    #10 in_n = 1; t_in = $realtime;
    #(dt) in_p = 1; t_ip = $realtime;
    #(T_FULL + 20);
    if (g == lidar_pkg::TA_GAIN_1X) begin
      exp_d = dt; exp_p = t_ip + 0.5;
    end else if (gv * dt < T_FULL) begin
      exp_d = gv * dt; exp_p = t_ip + T_FULL;
    end else begin
      exp_d = t_ip + T_FULL - (t_in + T_FULL / gv); exp_p = t_ip + T_FULL;
    end
    checks++;
    if (t_op - t_on < exp_d - 0.002 || t_op - t_on > exp_d + 0.002 ||
        t_op < exp_p - 0.002 || t_op > exp_p + 0.002) begin
      failures++;
      $display("FAIL gain=%0d dt=%f: out interval %f (exp %f), out_p at %f (exp %f)",
               gv, dt, t_op - t_on, exp_d, t_op, exp_p);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lidar_pkg::ta_gain_e gs [4] = '{lidar_pkg::TA_GAIN_1X, lidar_pkg::TA_GAIN_4X,
                                    lidar_pkg::TA_GAIN_8X, lidar_pkg::TA_GAIN_16X};
    for (int g = 0; g < 4; g++) begin
      for (int n = 0; n < 8; n++) run_one(gs[g], 0.1 + 1.5 * n);  // up to 10.6 ns
      run_one(gs[g], 30.0);                                         // saturates for 8x, 16x
    end
    // outputs clear on reset
    rst = 1; #1;
    checks++;
    if (out_n || out_p) begin failures++; $display("FAIL outputs not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
