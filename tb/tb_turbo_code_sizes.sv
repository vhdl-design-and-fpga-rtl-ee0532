// tb_turbo_code_sizes: end-to-end runs of the turbo decoder for the other
// configurations it is built for: the DSC(7,3)^2 and DSC(73,45)^2 product codes
// with 5-bit soft values, and the DSC(21,11)^2 code with 3, 4, 6 and 7-bit
// soft values. Each harness checks every decoded column, bit for bit and clock for
// clock, against its reference decoder. A watchdog ends the run if one hangs.
module tb_turbo_code_sizes;
  logic d0, d1, d2, d3, d4, d5;
  int c0, c1, c2, c3, c4, c5, f0, f1, f2, f3, f4, f5;

  turbo_harness #(.N(7),  .Q(5), .FRAMES(24)) h7    (.done(d0), .checks(c0), .failures(f0));
  turbo_harness #(.N(73), .Q(5), .FRAMES(8))  h73   (.done(d1), .checks(c1), .failures(f1));
  turbo_harness #(.N(21), .Q(4), .FRAMES(16)) h21q4 (.done(d2), .checks(c2), .failures(f2));
  turbo_harness #(.N(21), .Q(7), .FRAMES(16)) h21q7 (.done(d3), .checks(c3), .failures(f3));
  turbo_harness #(.N(21), .Q(3), .FRAMES(12)) h21q3 (.done(d4), .checks(c4), .failures(f4));
  turbo_harness #(.N(21), .Q(6), .FRAMES(12)) h21q6 (.done(d5), .checks(c5), .failures(f5));

  initial begin
    #1;
    wait (d0 && d1 && d2 && d3 && d4 && d5);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3 + c4 + c5, f0 + f1 + f2 + f3 + f4 + f5);
    $finish;
  end

  initial begin
    #2000000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3 + c4 + c5, f0 + f1 + f2 + f3 + f4 + f5 + 1);
    $finish;
  end
endmodule
