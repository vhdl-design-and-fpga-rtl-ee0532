// tb_ml_siso: self-checking test of the majority-logic SISO decoder.
//
// The default instance is the DSC(21,11) decoder with 5-bit soft values; two
// more harnesses run the DSC(7,3) and DSC(73,45) decoders with 5 bits, and one
// the DSC(21,11) decoder with 7 bits, the other sizes the decoder is built for.
// Each harness compares every output word with a reference decoder and checks
// the one-clock latency. A watchdog ends the run if the harnesses hang.
module tb_ml_siso;
  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  logic d0, d1, d2, d3;
  int c0, c1, c2, c3, f0, f1, f2, f3;

  siso_harness #(.N(21), .Q(5), .WORDS(400)) h21 (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0));
  siso_harness #(.N(7),  .Q(5), .WORDS(300)) h7  (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));
  siso_harness #(.N(73), .Q(5), .WORDS(200)) h73 (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2));
  siso_harness #(.N(21), .Q(7), .WORDS(300)) h21q7 (.clk, .rst_n, .done(d3), .checks(c3), .failures(f3));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d0 && d1 && d2 && d3);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end
endmodule
