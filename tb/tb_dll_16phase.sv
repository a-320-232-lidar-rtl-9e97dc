// tb_dll_16phase: drives a 1 GHz differential clock, records the rising
// edge time of each of the 16 phases and checks the spacing (62.5 ps ideal;
// with skew the per-stage errors of the fixed pattern) and that one full
// round of 16 phase steps still spans exactly one period.
module tb_dll_16phase;
  timeunit 1ns;
  timeprecision 1ps;

  logic ck = 0;
  logic [15:0] p_ideal, p_skew;
  realtime t_ideal [16], t_skew [16];
  int checks = 0, failures = 0;

  dll_16phase #(.SKEW_PS(0.0))  u_ideal (.ck_inp(ck), .ck_inn(~ck), .p(p_ideal));
  dll_16phase #(.SKEW_PS(10.0)) u_skew  (.ck_inp(ck), .ck_inn(~ck), .p(p_skew));

  always #0.5 ck = ~ck;

  for (genvar k = 0; k < 16; k++) begin : g_mon
    always @(posedge p_ideal[k]) t_ideal[k] = $realtime;
    always @(posedge p_skew[k])  t_skew[k]  = $realtime;
  end

  function automatic real wrap(real d);   // into [0, 1) ns
    while (d < 0.0) d += 1.0;
    while (d >= 1.0) d -= 1.0;
    return d;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real d, total;
    int pat [8] = '{1, -1, 2, -2, 1, 1, -1, -1};
    #20.25;
    for (int rep = 0; rep < 3; rep++) begin
      total = 0.0;
      for (int k = 0; k < 16; k++) begin
        d = wrap(t_ideal[(k + 1) % 16] - t_ideal[k]);
        checks++;
        if (d < 0.0615 || d > 0.0635) begin failures++; $display("FAIL ideal step %0d = %f", k, d); end
        d = wrap(t_skew[(k + 1) % 16] - t_skew[k]);
        total += d;
        checks++;
        // step k -> k+1 is stage (k+1) mod 8
        if (d < 0.0625 + 0.010 * pat[(k + 1) % 8] - 0.0015 || d > 0.0625 + 0.010 * pat[(k + 1) % 8] + 0.0015) begin
          failures++; $display("FAIL skewed step %0d = %f", k, d);
        end
      end
      checks++;
      if (total < 0.998 || total > 1.002) begin failures++; $display("FAIL round = %f", total); end
      #1.0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
