// ml_siso: soft-in soft-out threshold decoder for one DSC(N,K) code word per clock.
//
// One call decodes one row (or one column) of the product-code matrix, all N
// symbols in parallel, which is what gives the decoder its data rate:
//   1. Soft input of this half-iteration: Rq = sat(R + alpha * W_in), with alpha
//      an unsigned fixed-point factor of ALPHA_FRAC fraction bits
//      (R(q+1) = R + alpha(q) W(q) of the iterative scheme).
//   2. For every bit j and each of its J orthogonal equations i (the J
//      difference-set checks that contain j), the other J-1 bits of the check
//      give a parity B_i (XOR of their hard decisions, i.e. of their sign bits)
//      and a weight w_i = min |Rq| over them: the min-sum simplification of the
//      log-tanh weight.
//   3. Extrinsic information W_j = sum_i (1 - 2 B_i) w_i, and the decision value
//      LLR_j = Rq_j + W_j; the hard decision is 1 when LLR_j < 0.
// Soft values are two's complement, Q bits, positive meaning bit 0 (BPSK maps
// 0 to +1). They are kept in the symmetric range +-(2^(Q-1)-1), so a magnitude
// fits in Q-1 bits. The extrinsic output is saturated to the same range so that
// it can travel through a Q-bit interleaver; the decision uses the full sum.
//
// Timing: the whole computation is one combinational stage followed by the
// output register, so a row presented with in_valid in cycle t appears with
// out_valid in cycle t+1 (latency one clock, one word per clock). in_r and
// in_tag are passed along with the same latency, so the channel values follow
// the extrinsic values into the next interleaver.
//
// Follows the document: the threshold algorithm, the min-sum weight, the
// R + alpha W input and the one-clock latency. This design's own choices: the
// sign convention (the document writes "LLR > 0 gives 1", which does not agree
// with its (1 - 2 B_i) weighting; the weighting is kept and the decision
// follows it), the fixed-point alpha, saturation of the extrinsic value to Q
// bits, the unit channel scale (4Es/N0 is absorbed in the quantizer) and the
// tag side band.
module ml_siso #(
  parameter int N          = 21,  // code length
  parameter int Q          = 5,   // bits per soft value
  parameter int ALPHA_W    = 4,   // width of the alpha factor
  parameter int ALPHA_FRAC = 3,   // fraction bits of alpha (alpha = value / 2^ALPHA_FRAC)
  parameter int TAG_W      = 4    // side-band tag carried with the word
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [TAG_W-1:0]         in_tag,
  input  logic signed [Q-1:0]      in_r   [N],   // channel soft values R
  input  logic signed [Q-1:0]      in_w   [N],   // extrinsic of the previous half-iteration
  input  logic [ALPHA_W-1:0]       alpha,
  output logic                     out_valid,
  output logic [TAG_W-1:0]         out_tag,
  output logic signed [Q-1:0]      out_r  [N],   // R, delayed by one clock
  output logic signed [Q-1:0]      out_w  [N],   // new extrinsic W, saturated to Q bits
  output logic [N-1:0]             out_hard      // hard decisions, bit j for symbol j
);
  import turbo_pkg::*;

  localparam int J    = ds_size(N);
  localparam int MAXV = (1 << (Q - 1)) - 1;
  localparam int PW   = ALPHA_W + Q + 1;          // alpha * W product
  localparam int WW   = Q + $clog2(J + 1) + 1;    // full extrinsic sum
  localparam int LW   = WW + 1;                   // decision value
  localparam logic signed [PW:0]   SMAX = (PW + 1)'(MAXV);
  localparam logic signed [WW-1:0] WMAX = WW'(MAXV);

  initial begin
    assert (J > 0) else $fatal(1, "ml_siso: N must be 7, 21 or 73");
  end

  logic signed [Q-1:0]  rq      [N];
  logic [Q-2:0]         mag     [N];
  logic [N-1:0]         sgn;
  logic signed [Q-1:0]  w_sat   [N];
  logic [N-1:0]         hard;

  // Step 1: soft input of the half-iteration.
  always_comb begin
    for (int j = 0; j < N; j++) begin
      logic signed [PW-1:0] prod;
      logic signed [PW:0]   sum;
      prod = $signed({1'b0, alpha}) * in_w[j];
      sum  = (PW + 1)'(in_r[j]) + (PW + 1)'(prod >>> ALPHA_FRAC);
      if (sum > SMAX)       rq[j] = Q'(MAXV);
      else if (sum < -SMAX) rq[j] = Q'(-MAXV);
      else                  rq[j] = Q'(sum);
      sgn[j] = rq[j][Q-1];
      mag[j] = rq[j][Q-1] ? (Q-1)'(-rq[j]) : (Q-1)'(rq[j]);
    end
  end

  // Steps 2 and 3: orthogonal equations, extrinsic sum and decision. Check i
  // of bit j is the shifted set {j - p_i + p_k mod N : k}; leaving out k = i
  // removes bit j itself.
  always_comb begin
    for (int j = 0; j < N; j++) begin
      logic signed [WW-1:0] acc;
      logic signed [LW-1:0] llr;
      acc = '0;
      for (int i = 0; i < J; i++) begin
        logic         b;
        logic [Q-2:0] m;
        b = 1'b0;
        m = '1;
        for (int k = 0; k < J; k++) begin
          if (k != i) begin
            int idx;
            idx = (j + N - ds_elem(N, i) + ds_elem(N, k)) % N;
            b = b ^ sgn[idx];
            if (mag[idx] < m) m = mag[idx];
          end
        end
        if (b) acc = acc - WW'(m);
        else   acc = acc + WW'(m);
      end
      llr       = LW'(rq[j]) + LW'(acc);
      hard[j]   = llr[LW-1];
      if (acc > WMAX)       w_sat[j] = Q'(MAXV);
      else if (acc < -WMAX) w_sat[j] = Q'(-MAXV);
      else                  w_sat[j] = Q'(acc);
    end
  end

  // Output register: the one clock of latency.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_tag  <= in_tag;
      out_r    <= in_r;
      out_w    <= w_sat;
      out_hard <= hard;
    end
  end

endmodule
