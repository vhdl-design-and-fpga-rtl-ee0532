// iter_scheduler: admission control for frames entering the iteration loop.
//
// The turbo decoder reuses one row SISO, one column SISO and four interleavers
// for every iteration: after the column SISO a frame that needs another
// iteration goes back, through the interleavers of the return path, to the row
// SISO input, exactly LOOP clocks after it first entered it. That input is
// therefore shared by new frames and returning ones, and a frame of N rows that
// is to make P passes occupies it during the windows [t + k*LOOP, t + k*LOOP + N)
// for k = 0 .. P-1, t being the clock its first row enters.
//
// The scheduler keeps a reservation vector with one bit per future clock of
// that input. A new frame is admitted (in_ready high while its first row is
// offered) only if all of its P windows are still free; they are then marked.
// The vector shifts by one bit per clock. Returning frames never need to ask:
// their windows were reserved when they were admitted. With one iteration the
// input is free at once and frames stream back to back; with P iterations the
// accepted frame rate falls to about 1/P of the row rate, the throughput
// division of the iterative decoder.
//
// Interface: the source offers rows with in_valid and the requested number of
// iterations in_niter (1 .. NITER_MAX, other values are clamped) with the
// first row. Once a first row is taken, in_ready stays high and the source
// must supply the remaining N-1 rows on consecutive clocks (asserted).
// row_first marks the taken first row; row_last gives the frame's last pass
// index (iterations minus one) for every taken row.
//
// This block is this design's own: the document states the iteration count,
// the shared hardware and the resulting throughput, not how frames are
// admitted.
module iter_scheduler #(
  parameter int N         = 21,         // rows per frame
  parameter int LOOP      = 2 * N + 2,  // clocks from row SISO input back to it
  parameter int NITER_MAX = 3           // most iterations a frame may ask for
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [1:0] in_niter,
  output logic       in_ready,
  output logic       row_first,
  output logic [1:0] row_last
);
  localparam int RL = (NITER_MAX - 1) * LOOP + N;  // reservation horizon
  localparam int RW = $clog2(N + 1);

  initial begin
    assert (LOOP >= N) else $fatal(1, "iter_scheduler: LOOP must be at least N");
    assert (NITER_MAX >= 1 && NITER_MAX <= 4)
      else $fatal(1, "iter_scheduler: NITER_MAX must be 1 to 4");
  end

  logic [RL-1:0] resv;       // bit b: row SISO input taken b clocks from now
  logic [RL-1:0] need;       // windows the offered frame would take
  logic [RW-1:0] rows_left;  // rows still to come of the frame being taken
  logic [1:0]    cur_last;
  logic [2:0]    niter;
  logic          busy, fits;

  assign busy = (rows_left != '0);

  always_comb begin
    if (in_niter == 2'd0)                  niter = 3'd1;
    else if (int'(in_niter) > NITER_MAX)   niter = 3'(NITER_MAX);
    else                                   niter = {1'b0, in_niter};
    for (int b = 0; b < RL; b++) begin
      need[b] = 1'b0;
      for (int k = 0; k < NITER_MAX; k++)
        if (k < int'(niter) && b >= k * LOOP && b < k * LOOP + N) need[b] = 1'b1;
    end
    fits = ((need & resv) == '0);
  end

  assign in_ready  = busy || fits;
  assign row_first = !busy && in_valid && fits;
  assign row_last  = busy ? cur_last : 2'(niter - 3'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resv      <= '0;
      rows_left <= '0;
      cur_last  <= '0;
    end else begin
      if (row_first) begin
        resv      <= (resv | need) >> 1;
        rows_left <= RW'(N - 1);
        cur_last  <= 2'(niter - 3'd1);
      end else begin
        resv <= resv >> 1;
        if (busy) rows_left <= rows_left - 1'b1;
      end
    end
  end

  // The rows of an admitted frame arrive on consecutive clocks.
  a_contiguous: assert property (@(posedge clk) disable iff (!rst_n) busy |-> in_valid)
    else $error("iter_scheduler: gap inside a frame");

endmodule
