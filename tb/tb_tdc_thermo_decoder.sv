// tb_tdc_thermo_decoder: builds the 16-phase word that a differential DLL
// shows j phase steps after the rising edge of D0 (phase k high when
// (j - k) mod 16 < 8) and checks the decoded code {msb, j} in mode 1 and
// {msb, 0000} in mode 2.
module tb_tdc_thermo_decoder;
  timeunit 1ns;
  timeprecision 1ps;

  logic [15:0] q;
  logic [7:0]  msb;
  lidar_pkg::tdc_mode_e mode;
  logic [11:0] code;
  int checks = 0, failures = 0;

  tdc_thermo_decoder dut (.q, .msb, .mode, .code);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] exp_code;
    for (int n = 0; n < 10; n++) begin
      for (int j = 0; j < 16; j++) begin
        for (int m = 0; m < 2; m++) begin
          for (int k = 0; k < 16; k++) q[k] = (((j - k + 16) % 16) < 8);
          msb  = 8'($urandom);
          mode = (m == 0) ? lidar_pkg::MODE_LINEARITY_BOOST : lidar_pkg::MODE_DATA_COMPRESSIVE;
          if (m == 1) q = {15'b0, q[0]};  // only L0 enabled
          #1;
          exp_code = (m == 0) ? {msb, 4'(j)} : {msb, 4'b0};
          checks++;
          if (code !== exp_code) begin
            failures++;
            $display("FAIL j=%0d mode=%0d q=%b code=%h exp=%h", j, m, q, code, exp_code);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
