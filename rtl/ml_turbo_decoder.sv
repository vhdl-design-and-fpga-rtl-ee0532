// ml_turbo_decoder: iterative (turbo) decoder for the product code DSC(N,K)^2
// built on majority-logic SISO decoders.
//
// A frame is the N x N matrix of quantized channel values of one product-code
// word, delivered one row of N soft values per clock. One iteration is two
// half-iterations:
//   row SISO (s1)     decodes the N rows, extrinsic W = 0 on the first pass;
//   interleavers i1/i2 turn the channel values R and the row extrinsic W into
//                     columns;
//   column SISO (s2)  decodes the N columns with R + alpha W;
//   interleavers i3/i4 turn R and the column extrinsic back into rows, and feed
//                     them to the row SISO for the next iteration.
// The same two SISOs and four interleavers serve every iteration; a frame
// makes 1 .. NITER_MAX passes around this loop, chosen per frame with in_niter,
// and iter_scheduler admits a new frame only when the row SISO input is free
// for all of its passes. Each row carries a tag (pass number, last pass) that
// selects alpha for the half-iteration and tells the column SISO when the
// frame is finished.
//
// Output: after the last column half-iteration the hard decisions leave one
// column per clock (out_hard bit j = matrix row j of column c, c = 0 .. N-1),
// out_first marking column 0. Soft values are Q-bit two's complement,
// symmetric range, positive meaning bit 0; decision 1 means bit 1.
//
// Timing: with one iteration, column 0 of a frame leaves N+2 clocks after its
// row 0 entered (SISO + interleaver + SISO: 1 + N + 1) and frames may follow
// each other every N clocks. Each further iteration adds LOOP = 2N+2 clocks
// (interleaver, SISO, interleaver, SISO) and divides the frame rate by about
// the number of iterations.
//
// Follows the document: two SISO decoders and four interleavers, rows first
// and columns second, channel and extrinsic values interleaved together, the
// reuse of the hardware for iterations 2 and 3 and the latencies above. This
// design's own choices: the admission scheduler, the tags, the alpha table
// (values close to the usual 0, 0.2, 0.3, 0.5, 0.7, 0.9 sequence, in eighths)
// and the column order of the output.
module ml_turbo_decoder #(
  parameter int              N         = 21,  // component code length
  parameter int              Q         = 5,   // bits per soft value
  parameter int              NITER_MAX = 3,   // most iterations per frame (1..4)
  // alpha of half-iteration m in ALPHA[m], unsigned, 3 fraction bits
  parameter logic [7:0][3:0] ALPHA     = {4'd8, 4'd8, 4'd7, 4'd6, 4'd4, 4'd2, 4'd2, 4'd0}
) (
  input  logic                clk,
  input  logic                rst_n,
  // frame input, one row per clock
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [1:0]          in_niter,     // iterations for the frame, sampled with row 0
  input  logic signed [Q-1:0] in_row [N],
  // decoded output, one column per clock
  output logic                out_valid,
  output logic                out_first,
  output logic [N-1:0]        out_hard
);
  import turbo_pkg::*;

  localparam int LOOP = 2 * N + 2;
  localparam int TW   = TAG_BITS;
  localparam int CW   = $clog2(N);

  // ---- admission -------------------------------------------------------
  logic       row_first;
  logic [1:0] row_last;
  logic       accept;

  iter_scheduler #(.N(N), .LOOP(LOOP), .NITER_MAX(NITER_MAX)) u_sched (
    .clk, .rst_n,
    .in_valid, .in_niter, .in_ready,
    .row_first, .row_last
  );

  assign accept = in_valid && in_ready;

  // ---- row SISO input: new frame or returning frame ---------------------
  logic                fb_valid;
  iter_tag_t           fb_tag;
  logic signed [Q-1:0] fb_r [N];
  logic signed [Q-1:0] fb_w [N];

  logic                s1_in_valid;
  iter_tag_t           s1_in_tag;
  logic signed [Q-1:0] s1_in_r [N];
  logic signed [Q-1:0] s1_in_w [N];
  logic [3:0]          s1_alpha;

  always_comb begin
    if (fb_valid) begin
      s1_in_valid    = 1'b1;
      s1_in_tag.pass = fb_tag.pass + 2'd1;
      s1_in_tag.last = fb_tag.last;
      s1_in_r        = fb_r;
      s1_in_w        = fb_w;
    end else begin
      s1_in_valid    = accept;
      s1_in_tag.pass = 2'd0;
      s1_in_tag.last = row_last;
      s1_in_r        = in_row;
      for (int j = 0; j < N; j++) s1_in_w[j] = '0;
    end
    s1_alpha = ALPHA[{s1_in_tag.pass, 1'b0}];
  end

  // ---- row SISO ----------------------------------------------------------
  logic                s1_valid;
  logic [TW-1:0]       s1_tag;
  logic signed [Q-1:0] s1_r [N];
  logic signed [Q-1:0] s1_w [N];
  logic [N-1:0]        s1_hard;   // row decisions, not used further

  ml_siso #(.N(N), .Q(Q), .ALPHA_W(4), .ALPHA_FRAC(3), .TAG_W(TW)) u_siso_row (
    .clk, .rst_n,
    .in_valid (s1_in_valid), .in_tag (s1_in_tag),
    .in_r (s1_in_r), .in_w (s1_in_w), .alpha (s1_alpha),
    .out_valid (s1_valid), .out_tag (s1_tag),
    .out_r (s1_r), .out_w (s1_w), .out_hard (s1_hard)
  );

  // ---- rows to columns -----------------------------------------------------
  logic                i1_valid, i2_valid;
  logic [TW-1:0]       i1_tag, i2_tag;
  logic signed [Q-1:0] i1_r [N];
  logic signed [Q-1:0] i2_w [N];

  rc_interleaver #(.N(N), .Q(Q), .TAG_W(TW)) u_intl_r_fwd (
    .clk, .rst_n,
    .in_valid (s1_valid), .in_tag (s1_tag), .in_row (s1_r),
    .out_valid (i1_valid), .out_tag (i1_tag), .out_col (i1_r)
  );

  rc_interleaver #(.N(N), .Q(Q), .TAG_W(TW)) u_intl_w_fwd (
    .clk, .rst_n,
    .in_valid (s1_valid), .in_tag (s1_tag), .in_row (s1_w),
    .out_valid (i2_valid), .out_tag (i2_tag), .out_col (i2_w)
  );

  // ---- column SISO -------------------------------------------------------
  iter_tag_t           s2_in_tag;
  logic [3:0]          s2_alpha;
  logic                s2_valid;
  iter_tag_t           s2_tag;
  logic signed [Q-1:0] s2_r [N];
  logic signed [Q-1:0] s2_w [N];
  logic [N-1:0]        s2_hard;

  assign s2_in_tag = iter_tag_t'(i1_tag);
  assign s2_alpha  = ALPHA[{s2_in_tag.pass, 1'b1}];

  ml_siso #(.N(N), .Q(Q), .ALPHA_W(4), .ALPHA_FRAC(3), .TAG_W(TW)) u_siso_col (
    .clk, .rst_n,
    .in_valid (i1_valid), .in_tag (i1_tag),
    .in_r (i1_r), .in_w (i2_w), .alpha (s2_alpha),
    .out_valid (s2_valid), .out_tag (s2_tag),
    .out_r (s2_r), .out_w (s2_w), .out_hard (s2_hard)
  );

  // ---- finished frames leave, the others go round again -------------------
  logic done, fb_in_valid;

  assign done        = s2_valid && (s2_tag.pass == s2_tag.last);
  assign fb_in_valid = s2_valid && !done;

  logic [TW-1:0] i3_tag, i4_tag;
  logic          i4_valid;

  rc_interleaver #(.N(N), .Q(Q), .TAG_W(TW)) u_intl_r_back (
    .clk, .rst_n,
    .in_valid (fb_in_valid), .in_tag (s2_tag), .in_row (s2_r),
    .out_valid (fb_valid), .out_tag (i3_tag), .out_col (fb_r)
  );

  rc_interleaver #(.N(N), .Q(Q), .TAG_W(TW)) u_intl_w_back (
    .clk, .rst_n,
    .in_valid (fb_in_valid), .in_tag (s2_tag), .in_row (s2_w),
    .out_valid (i4_valid), .out_tag (i4_tag), .out_col (fb_w)
  );

  assign fb_tag = iter_tag_t'(i3_tag);

  // ---- output ------------------------------------------------------------
  logic [CW-1:0] col_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    col_cnt <= '0;
    else if (done) col_cnt <= (col_cnt == CW'(N - 1)) ? '0 : col_cnt + 1'b1;
  end

  assign out_valid = done;
  assign out_first = done && (col_cnt == '0);
  assign out_hard  = s2_hard;

  // ---- rules -------------------------------------------------------------
  // The scheduler never lets a new row meet a returning one.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(fb_valid && accept))
    else $error("ml_turbo_decoder: new frame collides with a returning frame");
  // A new frame only starts on a clock with no returning row.
  a_first_free: assert property (@(posedge clk) disable iff (!rst_n)
    row_first |-> !fb_valid)
    else $error("ml_turbo_decoder: frame admitted onto a busy input");
  // The channel and extrinsic interleavers of a pair stay in step.
  a_fwd_pair: assert property (@(posedge clk) disable iff (!rst_n)
    (i1_valid == i2_valid) && (!i1_valid || i1_tag == i2_tag))
    else $error("ml_turbo_decoder: forward interleavers out of step");
  a_back_pair: assert property (@(posedge clk) disable iff (!rst_n)
    (fb_valid == i4_valid) && (!fb_valid || i3_tag == i4_tag))
    else $error("ml_turbo_decoder: return interleavers out of step");

endmodule
