// tb_column_tdc: a column converter (PR multiplexer plus two TDCs in DCDS)
// with ideal phases on an exact 100 ps grid (period 1.6 ns). For random
// start/stop steps and revolution steps it checks the DCDS code against
// code(stop) - code(start), each computed from step numbers in the
// testbench. It then checks the dithering property of the compressive mode:
// for a start at a fixed phase of the clock, the coarse-only results summed
// over the 16 revolution steps add up to exactly 16 times the interval in
// phase steps, i.e. their average has the full 4-bit fine resolution.
module tb_column_tdc;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real STEP = 0.1;

  logic [15:0] p;
  logic [3:0]  rot;
  logic arm, out_n, out_p, valid;
  lidar_pkg::tdc_mode_e mode;
  logic [11:0] dcds;
  int s = 0;
  int checks = 0, failures = 0;

  column_tdc dut (.p, .rot, .arm, .out_n, .out_p, .mode, .dcds, .valid);

  initial forever begin
    for (int k = 0; k < 16; k++) p[k] = (((s - k) % 16 + 16) % 16) < 8;
    #(STEP);
    s++;
  end

  function automatic int code_at(int sa, int se, int r, int m);
    int cnt = 0;
    for (int x = sa + 1; x <= se; x++) if (((x - r) % 16 + 16) % 16 == 0) cnt++;
    return (m == 0) ? (cnt * 16 + (((se - r) % 16 + 16) % 16)) : (cnt * 16);
  endfunction

  task automatic convert(input int r, input int m, input int d1, input int d2,
                         output int sa, output int s1, output int s2);
    rot  = 4'(r);
    mode = (m == 0) ? lidar_pkg::MODE_LINEARITY_BOOST : lidar_pkg::MODE_DATA_COMPRESSIVE;
    out_n = 0; out_p = 0;
    arm = 1;
    #(STEP * 3);
    sa = s; arm = 0;
    // d1 < 0: start on a fixed grid phase, s1 mod 16 == -d1
    if (d1 < 0) d1 = 16 + (((-d1 - sa) % 16 + 16) % 16);
    #(STEP * d1);
    s1 = s; out_n = 1;
    #(STEP * d2);
    s2 = s; out_p = 1;
    #(STEP * 2);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sa, s1, s2, r, m, e, sum;
    arm = 0; out_n = 0; out_p = 0; rot = 0; mode = lidar_pkg::MODE_LINEARITY_BOOST;
    #(STEP * 10.5);
    for (int t = 0; t < 80; t++) begin
      r = int'($urandom_range(0, 15));
      m = (t % 3 == 2) ? 1 : 0;
      convert(r, m, int'($urandom_range(1, 300)), int'($urandom_range(1, 1500)), sa, s1, s2);
      e = (code_at(sa, s2, r, m) - code_at(sa, s1, r, m)) & 12'hfff;
      checks++;
      if (dcds !== 12'(e) || !valid) begin
        failures++;
        $display("FAIL r=%0d m=%0d sa=%0d s1=%0d s2=%0d dcds=%0d exp=%0d valid=%b",
                 r, m, sa, s1, s2, dcds, e, valid);
      end
    end
    // Compressive mode: the revolving grid dithers the 1-period quantizer.
    for (int t = 0; t < 6; t++) begin
      int d2;
      d2  = int'($urandom_range(3, 200));
      sum = 0;
      for (r = 0; r < 16; r++) begin
        convert(r, 1, -t, d2, sa, s1, s2);
        sum += int'(dcds);
      end
      checks++;
      if (sum != 16 * d2) begin
        failures++;
        $display("FAIL dither d=%0d sum=%0d exp=%0d", d2, sum, 16 * d2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
