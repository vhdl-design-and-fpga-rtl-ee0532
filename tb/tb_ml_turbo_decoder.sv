// tb_ml_turbo_decoder: end-to-end test of the DSC(21,11)^2 turbo decoder at its
// default parameters (N = 21, 5-bit soft values, up to 3 iterations).
//
// Each frame is a random product-code word: the testbench finds a basis of
// the DSC(21,11) code by Gaussian elimination of its cyclic parity-check
// matrix, and builds C = G^T U G from a random 11 x 11 matrix U, so every row
// and every column is a code word. The word is sent as BPSK (bit 0 -> +A,
// bit 1 -> -A), noise made from a sum of uniform numbers is added, and the
// result is clipped to the 5-bit symmetric range. Frames ask for 1, 2 or 3
// iterations and arrive in bursts and with gaps.
//
// A reference turbo decoder in the testbench (rows, then columns, repeated;
// R + alpha W inputs; min-sum threshold decoding written from the decoding
// rules) gives the hard decisions every output column must carry, bit for bit.
// The cycle of every output column is also predicted: column c of a frame
// admitted at clock t with P iterations must appear at t + N + 2 +
// (P-1)(2N+2) + c (SISO, interleaver, SISO, plus one loop per extra
// iteration). Checked as mechanisms, each of which must occur: back-to-back
// frames at the full rate of one frame per N clocks, refused first rows
// (stalls), frames making 2 and 3 passes around the loop, frames finishing out
// of admission order, and frames in which the decoder corrected channel
// errors.
module tb_ml_turbo_decoder;
  localparam int N      = 21;
  localparam int K      = 11;
  localparam int Q      = 5;
  localparam int MAXV   = (1 << (Q - 1)) - 1;
  localparam int LOOP   = 2 * N + 2;
  localparam int FRAMES = 60;
  localparam int ALPHA_REF [8] = '{0, 2, 2, 4, 6, 7, 8, 8};  // eighths, per half-iteration

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

  // ---- code construction --------------------------------------------------
  int dset [5] = '{0, 1, 4, 14, 16};
  bit [N-1:0] basis [$];

  task automatic build_basis();
    bit [N-1:0] h [N];
    int piv_col [$];
    int row = 0;
    bit is_piv [N];
    for (int s = 0; s < N; s++) begin
      h[s] = '0;
      foreach (dset[e]) h[s][(dset[e] + s) % N] = 1'b1;
    end
    foreach (is_piv[c]) is_piv[c] = 0;
    for (int c = 0; c < N && row < N; c++) begin
      int p = -1;
      for (int r = row; r < N; r++) if (h[r][c]) begin p = r; break; end
      if (p < 0) continue;
      begin bit [N-1:0] tmp = h[p]; h[p] = h[row]; h[row] = tmp; end
      for (int r = 0; r < N; r++) if (r != row && h[r][c]) h[r] ^= h[row];
      piv_col.push_back(c);
      is_piv[c] = 1;
      row++;
    end
    // one basis vector per free column
    for (int f = 0; f < N; f++) begin
      if (!is_piv[f]) begin
        bit [N-1:0] v = '0;
        v[f] = 1'b1;
        foreach (piv_col[i]) if (h[i][f]) v[piv_col[i]] = 1'b1;
        basis.push_back(v);
      end
    end
  endtask

  function automatic bit is_codeword(bit [N-1:0] v);
    for (int s = 0; s < N; s++) begin
      bit par = 0;
      foreach (dset[e]) par ^= v[(dset[e] + s) % N];
      if (par) return 0;
    end
    return 1;
  endfunction

  // ---- reference decoder ----------------------------------------------------
  function automatic int sat(int v);
    if (v > MAXV)  return MAXV;
    if (v < -MAXV) return -MAXV;
    return v;
  endfunction

  // one code word: soft input rq -> saturated extrinsic and decision
  function automatic void ref_word(input int rq[N], output int ew[N], output bit eh[N]);
    for (int j = 0; j < N; j++) begin
      int acc = 0;
      for (int s = 0; s < N; s++) begin
        bit has_j = 0;
        foreach (dset[e]) if ((dset[e] + s) % N == j) has_j = 1;
        if (has_j) begin
          bit par = 0;
          int mn = 1 << 30;
          foreach (dset[e]) begin
            int b = (dset[e] + s) % N;
            if (b != j) begin
              par ^= (rq[b] < 0);
              if ((rq[b] < 0 ? -rq[b] : rq[b]) < mn) mn = rq[b] < 0 ? -rq[b] : rq[b];
            end
          end
          acc += par ? -mn : mn;
        end
      end
      ew[j] = sat(acc);
      eh[j] = (rq[j] + acc) < 0;
    end
  endfunction

  typedef struct {
    int  r [N][N];       // channel values, [row][column]
    bit  tx [N][N];      // transmitted bits
    bit  dec [N][N];     // expected decisions
    int  niter;          // requested (0 means 1)
    int  passes;
    int  chan_err, dec_err;
  } frame_t;

  frame_t frames [FRAMES];

  task automatic ref_decode(int id);
    int w [N][N];
    foreach (w[r, c]) w[r][c] = 0;
    for (int m = 0; m < 2 * frames[id].passes; m++) begin
      for (int x = 0; x < N; x++) begin
        int rq[N], ew[N];
        bit eh[N];
        for (int y = 0; y < N; y++) begin
          // even m: word x is row x; odd m: word x is column x
          int rr = (m % 2 == 0) ? x : y;
          int cc = (m % 2 == 0) ? y : x;
          rq[y] = sat(frames[id].r[rr][cc] + ((ALPHA_REF[m] * w[rr][cc]) >>> 3));
        end
        ref_word(rq, ew, eh);
        for (int y = 0; y < N; y++) begin
          int rr = (m % 2 == 0) ? x : y;
          int cc = (m % 2 == 0) ? y : x;
          w[rr][cc] = ew[y];
          frames[id].dec[rr][cc] = eh[y];
        end
      end
    end
  endtask

  // ---- frames -------------------------------------------------------------------

  task automatic make_frame(int id);
    bit [N-1:0] t [K];
    int amp, spread;
    for (int a = 0; a < K; a++) begin
      t[a] = '0;
      for (int b = 0; b < K; b++) if ($urandom % 2) t[a] ^= basis[b];
    end
    for (int r = 0; r < N; r++) begin
      bit [N-1:0] row = '0;
      for (int a = 0; a < K; a++) if (basis[a][r]) row ^= t[a];
      for (int c = 0; c < N; c++) frames[id].tx[r][c] = row[c];
    end
    amp    = 6;
    spread = 3 + int'($urandom % 3);   // noise level varies per frame
    frames[id].chan_err = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      int v = frames[id].tx[r][c] ? -amp : amp;
      for (int u = 0; u < 3; u++) v += int'($urandom % (2 * spread + 1)) - spread;
      frames[id].r[r][c] = sat(v);
      if ((frames[id].r[r][c] < 0) != frames[id].tx[r][c]) frames[id].chan_err++;
    end
    // the first frames stream with one iteration, the rest are random
    frames[id].niter  = (id < 6) ? id % 2 : int'($urandom % 4);
    frames[id].passes = (frames[id].niter == 0) ? 1 : frames[id].niter;
    ref_decode(id);
    frames[id].dec_err = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
      if (frames[id].dec[r][c] != frames[id].tx[r][c]) frames[id].dec_err++;
  endtask

  // expected output per cycle
  typedef struct { int id; int col; } slot_t;
  slot_t expect_at [int];
  int outputs_seen = 0;
  int last_done_id = -1, out_of_order = 0;

  int stalls = 0, back_to_back = 0, corrected = 0;
  int passes_used [4] = '{0, 0, 0, 0};
  int tot_chan = 0, tot_dec = 0;

  initial begin
    int last_start = -100;
    in_valid = 0; in_niter = 0;
    foreach (in_row[j]) in_row[j] = '0;
    build_basis();
    checks++;
    if (basis.size() != K) begin failures++; $display("code dimension %0d, expected %0d", basis.size(), K); end
    foreach (basis[i]) begin
      checks++;
      if (!is_codeword(basis[i])) begin failures++; $display("basis vector %0d is not a code word", i); end
    end
    for (int f = 0; f < FRAMES; f++) begin
      make_frame(f);
      tot_chan += frames[f].chan_err;
      tot_dec  += frames[f].dec_err;
      if (frames[f].chan_err > 0 && frames[f].dec_err < frames[f].chan_err) corrected++;
      passes_used[frames[f].passes]++;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      automatic int gap = (f % 10 < 6) ? 0 : int'($urandom % (2 * N));
      repeat (gap) begin #1 in_valid = 0; @(posedge clk); end
      forever begin
        #1;
        in_valid = 1;
        in_niter = 2'(frames[f].niter);
        for (int c = 0; c < N; c++) in_row[c] = Q'(frames[f].r[0][c]);
        #1;
        if (in_ready) break;
        stalls++;
        @(posedge clk);
      end
      if (cycle == last_start + N) back_to_back++;
      last_start = cycle;
      for (int c = 0; c < N; c++) begin
        slot_t s;
        s.id = f; s.col = c;
        expect_at[cycle + N + 2 + (frames[f].passes - 1) * LOOP + c] = s;
      end
      @(posedge clk);
      for (int r = 1; r < N; r++) begin
        #1;
        in_valid = 1;
        for (int c = 0; c < N; c++) in_row[c] = Q'(frames[f].r[r][c]);
        #1;
        checks++;
        if (!in_ready) begin failures++; $display("cycle %0d: row %0d of frame %0d refused", cycle, r, f); end
        @(posedge clk);
      end
    end
    #1 in_valid = 0;
    wait (outputs_seen == FRAMES * N);
    repeat (2 * LOOP) @(posedge clk);
    // every mechanism must have happened
    checks += 6;
    if (back_to_back == 0) begin failures++; $display("no back-to-back frames"); end
    if (stalls == 0)       begin failures++; $display("no stall"); end
    if (passes_used[2] == 0) begin failures++; $display("no 2-iteration frame"); end
    if (passes_used[3] == 0) begin failures++; $display("no 3-iteration frame"); end
    if (out_of_order == 0) begin failures++; $display("no out-of-order completion"); end
    if (corrected == 0)    begin failures++; $display("no channel errors corrected"); end
    $display("frames=%0d back_to_back=%0d stalls=%0d passes1=%0d passes2=%0d passes3=%0d out_of_order=%0d corrected_frames=%0d",
             FRAMES, back_to_back, stalls, passes_used[1], passes_used[2], passes_used[3], out_of_order, corrected);
    $display("bit errors: channel %0d, after decoding %0d (of %0d bits)", tot_chan, tot_dec, FRAMES * N * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n) begin
      #2;
      checks++;
      if (expect_at.exists(cycle)) begin
        automatic slot_t s = expect_at[cycle];
        automatic int errs = 0;
        if (!out_valid) errs++;
        else begin
          if (out_first != (s.col == 0)) errs++;
          for (int r = 0; r < N; r++) if (out_hard[r] != frames[s.id].dec[r][s.col]) errs++;
        end
        if (errs) begin
          failures++;
          $display("cycle %0d: frame %0d column %0d: %0d mismatches", cycle, s.id, s.col, errs);
        end
        if (s.col == 0) begin
          if (s.id < last_done_id) out_of_order++;
          last_done_id = s.id;
        end
        outputs_seen++;
        expect_at.delete(cycle);
      end else if (out_valid) begin
        failures++;
        $display("cycle %0d: unexpected output", cycle);
      end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
