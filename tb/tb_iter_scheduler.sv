// tb_iter_scheduler: self-checking test of the frame admission scheduler.
//
// A source offers frames of N rows with a random iteration count of 1 to 3
// (and sometimes 0, which counts as 1), keeps offering a refused first row
// until it is taken, then sends the other N-1 rows on consecutive clocks. The
// testbench keeps its own map of which future clocks of the row SISO input are
// taken: a frame of P passes admitted at clock t takes [t + k*LOOP,
// t + k*LOOP + N) for k < P. A first row must be accepted exactly when all of
// its windows are free in that map, and in_ready must stay high for the rest
// of the frame; row_first and row_last are checked on every taken row. It
// also counts refusals (stalls), back-to-back admissions and each iteration
// count, and fails if any of them never happened.
module tb_iter_scheduler;
  localparam int N    = 21;
  localparam int LOOP = 2 * N + 2;
  localparam int NMAX = 3;
  localparam int FRAMES = 150;

  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid;
  logic [1:0] in_niter;
  logic       in_ready;
  logic       row_first;
  logic [1:0] row_last;

  iter_scheduler dut (.*);   // default size: N = 21, LOOP = 44, 3 iterations

  int checks = 0, failures = 0;
  int cycle = 0;
  bit occ [int];
  int stalls = 0, back_to_back = 0;
  int per_niter [4] = '{0, 0, 0, 0};

  function automatic bit windows_free(int t, int p);
    for (int k = 0; k < p; k++)
      for (int j = 0; j < N; j++)
        if (occ.exists(t + k * LOOP + j)) return 0;
    return 1;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("cycle %0d: %s", cycle, what);
    end
  endtask

  initial begin
    int last_end;
    in_valid = 0; in_niter = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    last_end = -100;
    for (int f = 0; f < FRAMES; f++) begin
      automatic int gap = ($urandom % 2) ? 0 : int'($urandom % (LOOP + 1));
      automatic int req = int'($urandom % 4);
      automatic int p   = (req == 0) ? 1 : req;
      repeat (gap) begin
        #1 in_valid = 0;
        in_niter = 2'd1;
        #1;
        check(in_ready == windows_free(cycle, 1), "idle in_ready wrong");
        @(posedge clk); cycle++;
      end
      // offer the first row until taken
      forever begin
        automatic bit exp_ok;
        #1;
        in_valid = 1;
        in_niter = 2'(req);
        exp_ok = windows_free(cycle, p);
        #1;
        check(in_ready == exp_ok, "in_ready differs from the reservation map");
        check(row_first == exp_ok, "row_first wrong");
        if (exp_ok) begin
          check(row_last == 2'(p - 1), "row_last wrong on first row");
          break;
        end
        stalls++;
        @(posedge clk); cycle++;
      end
      if (cycle == last_end) back_to_back++;
      per_niter[p]++;
      for (int k = 0; k < p; k++)
        for (int j = 0; j < N; j++) occ[cycle + k * LOOP + j] = 1;
      @(posedge clk); cycle++;
      for (int r = 1; r < N; r++) begin
        #1;
        in_valid = 1;
        in_niter = 2'($urandom);   // ignored after the first row
        #1;
        check(in_ready && !row_first && row_last == 2'(p - 1), "frame row not taken");
        @(posedge clk); cycle++;
      end
      last_end = cycle;
    end
    #1 in_valid = 0;
    check(stalls > 0, "no frame was ever refused");
    check(back_to_back > 0, "no back-to-back admission");
    for (int p = 1; p <= NMAX; p++) check(per_niter[p] > 0, "an iteration count never used");
    $display("frames=%0d stalls=%0d back_to_back=%0d niter1=%0d niter2=%0d niter3=%0d",
             FRAMES, stalls, back_to_back, per_niter[1], per_niter[2], per_niter[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
