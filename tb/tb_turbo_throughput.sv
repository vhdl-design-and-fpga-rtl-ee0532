// tb_turbo_throughput: frame rate and latency of the default DSC(21,11)^2
// decoder for 1, 2 and 3 iterations under full load.
//
// For each iteration count P the source offers frames without pause. The
// frames are the noiseless all-zero code word (every symbol +6), so every
// decoded bit must be 0; correctness on noisy words is the business of the
// other end-to-end testbench.
// The testbench measures the clock of every admitted frame and of every first
// output column and checks:
//   - latency of every frame: N + 2 + (P - 1)(2N + 2) clocks (23, 67, 111),
//     i.e. 2P SISO clocks plus 2P - 1 interleaver latencies;
//   - the admission interval: exactly N = 21 clocks per frame with P = 1, and
//     between P*N and 1.1*P*N on average for P = 2 and 3, the rate division of
//     the iterative decoder (frames are admitted in pairs N clocks apart,
//     86 clocks per pair for P = 2 and 130 for P = 3);
//   - all decisions are 0.
module tb_turbo_throughput;
  localparam int N    = 21;
  localparam int Q    = 5;
  localparam int LOOP = 2 * N + 2;
  localparam int PER_P = 13;   // frames per iteration count (odd: whole admission periods)

  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  logic                in_valid;
  logic                in_ready;
  logic [1:0]          in_niter;
  logic signed [Q-1:0] in_row [N];
  logic                out_valid;
  logic                out_first;
  logic [N-1:0]        out_hard;

  ml_turbo_decoder dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int admit_q [$];
  int outs = 0, frames_out = 0;
  int cur_p = 1;

  initial begin
    in_valid = 0; in_niter = 0;
    foreach (in_row[j]) in_row[j] = Q'(6);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 1; p <= 3; p++) begin
      int first_admit, last_admit;
      cur_p = p;
      for (int f = 0; f < PER_P; f++) begin
        forever begin
          #1;
          in_valid = 1;
          in_niter = 2'(p);
          #1;
          if (in_ready) break;
          @(posedge clk);
        end
        admit_q.push_back(cycle);
        if (f == 0) first_admit = cycle;
        last_admit = cycle;
        @(posedge clk);
        for (int r = 1; r < N; r++) @(posedge clk);
      end
      #1 in_valid = 0;
      // let this iteration count drain before the next
      wait (frames_out == p * PER_P);
      begin
        real avg;
        avg = real'(last_admit - first_admit) / real'(PER_P - 1);
        $display("P=%0d: average admission interval %0.1f clocks (N = %0d)", p, avg, N);
        checks++;
        if (p == 1 ? (avg != real'(N)) : (avg < real'(p * N) || avg > 1.1 * real'(p * N))) begin
          failures++;
          $display("P=%0d: admission interval out of range", p);
        end
      end
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      #2;
      if (out_valid) begin
        outs++;
        checks++;
        if (out_hard != '0) begin failures++; $display("cycle %0d: wrong decision", cycle); end
        if (out_first) begin
          automatic int t0 = admit_q.pop_front();
          automatic int lat = cycle - t0;
          checks++;
          if (lat != N + 2 + (cur_p - 1) * LOOP) begin
            failures++;
            $display("P=%0d: latency %0d, expected %0d", cur_p, lat, N + 2 + (cur_p - 1) * LOOP);
          end
          frames_out++;
        end
      end
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
