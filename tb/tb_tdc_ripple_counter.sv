// tb_tdc_ripple_counter: counts a random number of clock edges with run
// high and checks the count (mod 256), then checks that it holds with run
// low and that clr empties it.
module tb_tdc_ripple_counter;
  timeunit 1ns;
  timeprecision 1ps;

  logic ck, run, clr;
  logic [7:0] q;
  int checks = 0, failures = 0;

  tdc_ripple_counter dut (.ck, .run, .clr, .q);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, m;
    ck = 0; run = 0; clr = 0;
    #1 clr = 1;
    #2;
    for (int t = 0; t < 30; t++) begin
      n = (t == 0) ? 255 : (t == 1) ? 256 : (t == 2) ? 300 : int'($urandom_range(1, 400));
      m = int'($urandom_range(0, 20));
      clr = 1; #1; clr = 0; #1;
      checks++;
      if (q !== 8'd0) begin failures++; $display("FAIL clear q=%0d", q); end
      run = 1;
      repeat (n) begin ck = 1; #0.5; ck = 0; #0.5; end
      #1;
      checks++;
      if (q !== 8'(n)) begin failures++; $display("FAIL count n=%0d q=%0d", n, q); end
      run = 0;
      repeat (m) begin ck = 1; #0.5; ck = 0; #0.5; end
      #1;
      checks++;
      if (q !== 8'(n)) begin failures++; $display("FAIL hold n=%0d q=%0d", n, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
