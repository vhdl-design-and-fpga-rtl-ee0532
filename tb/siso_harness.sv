// siso_harness: drives one ml_siso instance of code length N with random rows
// and checks every output word against a reference threshold decoder.
//
// The reference is written from the decoding rules, independently of the RTL:
// it keeps its own copy of the perfect difference set, checks that every
// nonzero residue is a difference of two of its elements exactly once, and
// finds the orthogonal equations of bit j by scanning all N cyclic shifts of the
// set for those that contain j. For every such check it takes the XOR of the
// sign bits and the smallest magnitude over the other bits, and sums
// (1 - 2B) * min into the extrinsic value. Inputs change every clock with a
// random valid; outputs are compared one clock after each valid input (the
// one-clock latency), and out_valid is checked on every clock.
module siso_harness #(
  parameter int N     = 21,
  parameter int Q     = 5,
  parameter int WORDS = 300
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int MAXV = (1 << (Q - 1)) - 1;

  logic                in_valid;
  logic [3:0]          in_tag;
  logic signed [Q-1:0] in_r [N];
  logic signed [Q-1:0] in_w [N];
  logic [3:0]          alpha;
  logic                out_valid;
  logic [3:0]          out_tag;
  logic signed [Q-1:0] out_r [N];
  logic signed [Q-1:0] out_w [N];
  logic [N-1:0]        out_hard;

  ml_siso #(.N(N), .Q(Q)) dut (.*);

  int set_ [$];

  function automatic void load_set();
    case (N)
      7:  set_ = '{0, 1, 3};
      21: set_ = '{0, 1, 4, 14, 16};
      73: set_ = '{0, 1, 3, 7, 15, 31, 36, 54, 63};
      default: set_ = '{};
    endcase
  endfunction

  function automatic int sat(int v);
    if (v > MAXV)  return MAXV;
    if (v < -MAXV) return -MAXV;
    return v;
  endfunction

  // Reference: expected extrinsic (saturated) and decision for every bit.
  function automatic void reference(input int r[N], input int w[N], input int a,
                                    output int ew[N], output bit eh[N]);
    int rq[N];
    for (int j = 0; j < N; j++) rq[j] = sat(r[j] + ((a * w[j]) >>> 3));
    for (int j = 0; j < N; j++) begin
      int acc = 0;
      int nchk = 0;
      for (int s = 0; s < N; s++) begin
        bit has_j = 0;
        foreach (set_[e]) if ((set_[e] + s) % N == j) has_j = 1;
        if (has_j) begin
          bit par = 0;
          int mn = 1 << 30;
          nchk++;
          foreach (set_[e]) begin
            int b = (set_[e] + s) % N;
            if (b != j) begin
              int m = rq[b] < 0 ? -rq[b] : rq[b];
              par ^= (rq[b] < 0);
              if (m < mn) mn = m;
            end
          end
          acc += par ? -mn : mn;
        end
      end
      if (nchk != set_.size()) $fatal(1, "reference: wrong check count");
      ew[j] = sat(acc);
      eh[j] = (rq[j] + acc) < 0;
    end
  endfunction

  initial begin
    int exp_w[N];
    bit exp_h[N];
    int cur_r[N], cur_w[N];
    int cur_a;
    bit pend;
    int pend_tag;
    int pend_r[N];
    int seen[int];
    done = 0; checks = 0; failures = 0;
    in_valid = 0; in_tag = '0; alpha = '0;
    foreach (in_r[j]) begin in_r[j] = '0; in_w[j] = '0; end
    load_set();
    // the set must be a perfect difference set modulo N
    foreach (set_[a]) foreach (set_[b])
      if (a != b) seen[(set_[a] - set_[b] + N) % N]++;
    checks++;
    if (seen.num() != N - 1) begin
      failures++; $display("N=%0d: difference set is not perfect", N);
    end
    pend = 0;
    wait (rst_n);
    @(posedge clk);
    for (int t = 0; t < WORDS + 1; t++) begin
      #1;
      // compare what the last edge produced
      checks++;
      if (out_valid !== pend) begin
        failures++; $display("N=%0d t=%0d: out_valid %b expected %b", N, t, out_valid, pend);
      end
      if (pend) begin
        int errs = 0;
        for (int j = 0; j < N; j++) begin
          if (out_w[j] != exp_w[j] || out_hard[j] != exp_h[j] || out_r[j] != pend_r[j]) errs++;
        end
        checks++;
        if (out_tag != 4'(pend_tag)) errs++;
        if (errs != 0) begin
          failures++;
          $display("N=%0d t=%0d: %0d output mismatches", N, t, errs);
        end
      end
      // new input
      pend = 0;
      if (t < WORDS) begin
        automatic int mode = $urandom % 4;
        in_valid = ($urandom % 5) != 0;
        in_tag   = 4'($urandom);
        cur_a    = $urandom % 16;
        alpha    = 4'(cur_a);
        for (int j = 0; j < N; j++) begin
          // mode 0: full range, 1: strong and clean, 2: small values, 3: extremes
          case (mode)
            0: begin cur_r[j] = int'($urandom % (2*MAXV+1)) - MAXV; cur_w[j] = int'($urandom % (2*MAXV+1)) - MAXV; end
            1: begin cur_r[j] = ($urandom % 8 == 0) ? -MAXV/2 : MAXV/2 + int'($urandom % 3); cur_w[j] = 0; end
            2: begin cur_r[j] = int'($urandom % 5) - 2; cur_w[j] = int'($urandom % 5) - 2; end
            default: begin cur_r[j] = ($urandom % 2) ? MAXV : -MAXV; cur_w[j] = ($urandom % 2) ? MAXV : -MAXV; end
          endcase
          in_r[j] = Q'(cur_r[j]);
          in_w[j] = Q'(cur_w[j]);
        end
        if (in_valid) begin
          reference(cur_r, cur_w, cur_a, exp_w, exp_h);
          pend = 1;
          pend_tag = int'(in_tag);
          pend_r = cur_r;
        end
      end else begin
        in_valid = 0;
      end
      @(posedge clk);
    end
    done = 1;
  end
endmodule
