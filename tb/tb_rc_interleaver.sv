// tb_rc_interleaver: self-checking test of the row-to-column interleaver.
//
// Sends matrices of random 5-bit symbols, one row per clock with the rows of a
// matrix on consecutive clocks, separated by random idle gaps of 0 to 2N
// clocks (gap 0 exercises back-to-back matrices and the ping-pong banks). The
// expected output of every clock is worked out from the input schedule: column
// c of a matrix whose row 0 entered in cycle t must appear in cycle t + N + c,
// lane j carrying element c of row j, with the matrix tag; out_valid must be
// low on every other clock. The default N = 21 instance is checked, and an
// N = 7 instance runs the 7 x 7 ramp example: input lane i carries 7i+1+t at
// clock t, so output lane j of a matrix's column k must carry 7k+1+j plus
// 7 per earlier matrix, starting 7 clocks after the first row.
module tb_rc_interleaver;
  localparam int N = 21;
  localparam int Q = 5;
  localparam int FRAMES = 40;

  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int back_to_back = 0;

  // ---- N = 21 instance ---------------------------------------------------
  logic                in_valid;
  logic [3:0]          in_tag;
  logic signed [Q-1:0] in_row [N];
  logic                out_valid;
  logic [3:0]          out_tag;
  logic signed [Q-1:0] out_col [N];

  rc_interleaver dut (.*);   // default size: N = 21, Q = 5

  // expected output per cycle
  typedef struct { int tag; int col[N]; } exp_t;
  exp_t expq [int];

  always @(posedge clk) cycle <= cycle + 1;

  // ---- N = 7 instance: the 7 x 7 example ---------------------------------
  logic                s_valid;
  logic signed [7:0]   s_row [7];
  logic                s_out_valid;
  logic [0:0]          s_tag_o;
  logic signed [7:0]   s_col [7];

  rc_interleaver #(.N(7), .Q(8), .TAG_W(1)) dut7 (
    .clk, .rst_n, .in_valid (s_valid), .in_tag (1'b0), .in_row (s_row),
    .out_valid (s_out_valid), .out_tag (s_tag_o), .out_col (s_col));

  initial begin
    in_valid = 0; in_tag = '0; s_valid = 0;
    foreach (in_row[j]) in_row[j] = '0;
    foreach (s_row[j]) s_row[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      // N = 21 stimulus
      begin
        for (int f = 0; f < FRAMES; f++) begin
          automatic int gap = ($urandom % 3 == 0) ? 0 : int'($urandom % (2 * N + 1));
          int m[N][N];
          automatic int tg = int'($urandom % 16);
          int t0;
          if (gap == 0) back_to_back++;
          repeat (gap) begin #1; in_valid = 0; @(posedge clk); end
          #1;
          t0 = cycle;
          for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
            m[r][c] = int'($urandom % 32) - 16;
          for (int c = 0; c < N; c++) begin
            automatic exp_t e;
            e.tag = tg;
            for (int j = 0; j < N; j++) e.col[j] = m[j][c];
            expq[t0 + N + c] = e;
          end
          for (int r = 0; r < N; r++) begin
            in_valid = 1;
            in_tag   = 4'(tg);
            for (int c = 0; c < N; c++) in_row[c] = Q'(m[r][c]);
            @(posedge clk);
            #1;
          end
          in_valid = 0;
        end
        in_valid = 0;
        repeat (3 * N) @(posedge clk);
      end
      // N = 7 stimulus: row r of matrix b holds 7r+1+7b+c ... as a ramp
      begin
        for (int t = 0; t < 28; t++) begin
          #1;
          s_valid = 1;
          for (int i = 0; i < 7; i++) s_row[i] = 8'(7 * i + 1 + t);
          @(posedge clk);
        end
        #1 s_valid = 0;
      end
    join
    checks++;
    if (back_to_back == 0) begin failures++; $display("no back-to-back matrices"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // N = 7 checker: t counts clocks after the edge that took row 0; output
  // lane j of column k of matrix b is visible from t = 6 + 7b + k on.
  initial begin
      begin
        int t = 0;
        @(posedge clk iff s_valid);
        forever begin
          #2;
          if (t >= 6 && t < 34) begin
            automatic int b  = (t - 6) / 7;        // matrix number
            automatic int k  = (t - 6) % 7;        // column number
            checks++;
            if (!s_out_valid) begin failures++; $display("N=7: no output at %0d", t); end
            else for (int j = 0; j < 7; j++)
              if (s_col[j] != 8'(7 * k + 1 + 7 * b + j)) begin
                failures++;
                $display("N=7 t=%0d lane %0d: %0d expected %0d", t, j, s_col[j], 7 * k + 1 + 7 * b + j);
                break;
              end
          end else if (t < 6 || t >= 34 && t < 40) begin
            checks++;
            if (s_out_valid) begin failures++; $display("N=7: unexpected output at %0d", t); end
          end
          @(posedge clk);
          t++;
        end
      end
  end

  // N = 21 checker
  always @(posedge clk) begin
    if (rst_n) begin
      #2;
      checks++;
      if (expq.exists(cycle)) begin
        automatic exp_t e = expq[cycle];
        automatic int errs = 0;
        if (!out_valid) errs++;
        else begin
          if (out_tag != 4'(e.tag)) errs++;
          for (int j = 0; j < N; j++) if (out_col[j] != Q'(e.col[j])) errs++;
        end
        if (errs) begin failures++; $display("cycle %0d: %0d mismatches", cycle, errs); end
        expq.delete(cycle);
      end else if (out_valid) begin
        failures++; $display("cycle %0d: unexpected out_valid", cycle);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
