// tb_pr_linearity: code-density test of the linearity-boost mechanism.
//
// A DLL model with a fixed stage-delay mismatch (SKEW_PS = 10 ps on a
// +1 -1 +2 -2 +1 +1 -1 -1 pattern, so stage delays range from 42.5 to
// 82.5 ps) feeds a phase-revolving multiplexer and one TDC. Events are placed
// on a 1 ps grid across a whole clock period, so the count of each fine
// code (code mod 16) is its bin width in ps.
//   fixed order   (rot = 0 for every conversion): the histogram reproduces
//                 the stage widths, DNL up to about +/-0.3 LSB; each bin is
//                 checked against the width worked out from the pattern;
//   revolving     (rot = 0..15, one full round per offset): each code sees
//                 every stage once, so each bin holds 16 * 62.5 = 1000
//                 counts and the DNL is flat.
module tb_pr_linearity;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real SKEW = 10.0;
  logic ck = 0;
  logic [15:0] p, d;
  logic [3:0]  rot;
  logic evt, arm, done;
  logic [11:0] code;
  int checks = 0, failures = 0;
  int pat [8] = '{1, -1, 2, -2, 1, 1, -1, -1};

  dll_16phase #(.SKEW_PS(SKEW)) u_dll (.ck_inp(ck), .ck_inn(~ck), .p(p));
  phase_revolver u_pr (.p(p), .rot(rot), .d(d));
  pr_tdc u_tdc (.d(d), .evt(evt), .arm(arm), .mode(lidar_pkg::MODE_LINEARITY_BOOST),
                .code(code), .done(done));

  always #0.5 ck = ~ck;   // rising edges at 0.5 + k ns

  task automatic convert(input int r, input int offs_ps, output int fine);
    realtime t0;
    rot = 4'(r);
    evt = 0;
    arm = 1;
    // next rising clock edge at least 2 ns ahead
    t0 = real'(int'($realtime) + 3) + 0.5;
    #(t0 - 1.3 - $realtime);
    arm = 0;                     // released 1.3 ns before t0
    #(1.3 + 2.0 + real'(offs_ps) / 1000.0);
    evt = 1;
    #0.2;
    fine = int'(code) % 16;
    evt = 0;
  endtask

  function automatic real max_abs_dnl(int h [16], real ideal);
    real m = 0.0, x;
    for (int j = 0; j < 16; j++) begin
      x = real'(h[j]) / ideal - 1.0;
      if (x < 0.0) x = -x;
      if (x > m) m = x;
    end
    return m;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h_fix [16], h_rev [16];
    int f, w;
    real dnl_fix, dnl_rev;
    arm = 0; evt = 0; rot = 0;
    for (int j = 0; j < 16; j++) begin h_fix[j] = 0; h_rev[j] = 0; end
    #5;
    for (int o = 0; o < 1000; o++) begin
      convert(0, o, f);
      h_fix[f]++;
    end
    for (int o = 0; o < 1000; o++) begin
      for (int r = 0; r < 16; r++) begin
        convert(r, o, f);
        h_rev[f]++;
      end
    end
    // fixed order: fine code j spans the edges of P(j) and P(j+1), i.e. the
    // delay of stage (j+1) mod 8
    for (int j = 0; j < 16; j++) begin
      w = int'(62.5 + SKEW * real'(pat[(j + 1) % 8]));
      checks++;
      if (h_fix[j] < w - 2 || h_fix[j] > w + 2) begin
        failures++;
        $display("FAIL fixed bin %0d: %0d counts, stage width %0d ps", j, h_fix[j], w);
      end
      checks++;
      if (h_rev[j] < 1000 - 16 || h_rev[j] > 1000 + 16) begin
        failures++;
        $display("FAIL revolved bin %0d: %0d counts, expected 1000", j, h_rev[j]);
      end
    end
    dnl_fix = max_abs_dnl(h_fix, 62.5);
    dnl_rev = max_abs_dnl(h_rev, 1000.0);
    $display("max |DNL| fixed order %0.3f LSB, revolving %0.3f LSB", dnl_fix, dnl_rev);
    checks++;
    if (!(dnl_fix > 0.25 && dnl_rev < 0.02)) begin
      failures++;
      $display("FAIL DNL not improved by revolving");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
