// tb_pr_tdc: one phase-revolved TDC fed with ideal phases. The testbench
// steps time in phase units (100 ps here, period 1.6 ns, so the grid is
// exact): at step s phase k is high when (s - k) mod 16 < 8. The TDC is
// released between two steps and the event comes between two later steps;
// the expected code is 16 * (D0 rising edges between release and event) +
// ((s_event - rot) mod 16), worked out from the step numbers. Both modes and
// the freeze after the event are checked.
module tb_pr_tdc;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real STEP = 0.1;

  logic [15:0] p;
  logic evt, arm, done;
  lidar_pkg::tdc_mode_e mode;
  logic [11:0] code;
  int s = 0;
  int checks = 0, failures = 0;

  pr_tdc dut (.d(p), .evt, .arm, .mode, .code, .done);

  initial forever begin
    for (int k = 0; k < 16; k++) p[k] = (((s - k) % 16 + 16) % 16) < 8;
    #(STEP);
    s++;
  end

  function automatic int expected(int sa, int se, int m);
    int cnt = 0;
    for (int x = sa + 1; x <= se; x++) if (x % 16 == 0) cnt++;
    return (m == 0) ? ((cnt * 16 + (se % 16)) % 4096) : ((cnt * 16) % 4096);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sa, se, e;
    evt = 0; arm = 0; mode = lidar_pkg::MODE_LINEARITY_BOOST;
    #(STEP * 20.5);
    for (int t = 0; t < 60; t++) begin
      mode = (t % 4 == 3) ? lidar_pkg::MODE_DATA_COMPRESSIVE : lidar_pkg::MODE_LINEARITY_BOOST;
      arm = 1;
      #(STEP * 3);
      sa = s;                // release half a step after step sa
      arm = 0;
      #(STEP * $urandom_range(1, (t < 5) ? 40 : 600));
      se = s;
      evt = 1;
      #(STEP * 0.25);
      e = expected(sa, se, (mode == lidar_pkg::MODE_LINEARITY_BOOST) ? 0 : 1);
      checks++;
      if (code !== 12'(e) || !done) begin
        failures++;
        $display("FAIL t=%0d sa=%0d se=%0d mode=%0d code=%0d exp=%0d", t, sa, se, mode, code, e);
      end
      #(STEP * 39.75);       // counter must stay frozen
      evt = 0;
      checks++;
      if (code !== 12'(e)) begin
        failures++;
        $display("FAIL freeze t=%0d code=%0d exp=%0d", t, code, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
