// tb_phase_revolver: checks the ring rotation D[i] = P[(i + rot) mod 16]
// for every rotation step and random phase words, against an index
// computation done in the testbench.
module tb_phase_revolver;
  timeunit 1ns;
  timeprecision 1ps;

  logic [15:0] p, d;
  logic [3:0]  rot;
  int checks = 0, failures = 0;

  phase_revolver dut (.p(p), .rot(rot), .d(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++) begin
      for (int n = 0; n < 20; n++) begin
        rot = 4'(r);
        p   = (n == 0) ? 16'h0001 : 16'($urandom);
        #1;
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (d[i] !== p[(i + r) % 16]) begin
            failures++;
            $display("FAIL rot=%0d i=%0d p=%h d=%h", r, i, p, d);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
