// rc_interleaver: row-to-column interleaver for an N x N product-code matrix.
//
// The interleaver of a product code receives the whole N x N matrix and hands
// it on with rows and columns swapped. Here a row of N soft symbols enters per
// clock; once the N rows of a matrix are in, the matrix leaves one column per
// clock, lane j of output column c being element c of input row j. This is
// the transposition the column decoder needs after the row decoder, and the
// transposition back after the column decoder.
//
// Two banks of N x N registers work in ping-pong: a matrix is written row by
// row into one bank while the other bank is read out column by column, so
// matrices may follow each other without a gap and a new matrix may start at
// any clock, also while the previous one is still being read. The only rule is
// that a bank is free again before a third matrix needs it, which holds as
// long as the rows of one matrix arrive on consecutive clocks (one matrix per
// N clocks at most); an assertion checks that no row is written into a bank
// that is still being read.
//
// Timing: if row 0 of a matrix enters in cycle t and its rows are contiguous,
// column 0 leaves in cycle t+N and column N-1 in cycle t+2N-1: latency N clocks,
// throughput one N-symbol word per clock. The outputs come from the register
// banks through a column multiplexer, without an extra register. in_tag is
// sampled with row 0 and returned with every column of the same matrix.
//
// Follows the document: the row/column exchange, one word per clock and the
// N-clock latency. This design's own choices: the ping-pong register banks, the
// valid/tag side band and reset of the control state only.
module rc_interleaver #(
  parameter int N     = 21,  // matrix size (code length)
  parameter int Q     = 5,   // bits per symbol
  parameter int TAG_W = 4    // side-band tag carried with each matrix
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [TAG_W-1:0]    in_tag,
  input  logic signed [Q-1:0] in_row  [N],
  output logic                out_valid,
  output logic [TAG_W-1:0]    out_tag,
  output logic signed [Q-1:0] out_col [N]
);
  localparam int CW = (N > 1) ? $clog2(N) : 1;

  logic signed [Q-1:0] mem  [2][N][N];   // [bank][row][column]
  logic [TAG_W-1:0]   tag  [2];
  logic [1:0]         full;             // bank holds a complete matrix
  logic               wr_bank, rd_bank;
  logic [CW-1:0]      wr_cnt, rd_cnt;

  // Write side: row wr_cnt of bank wr_bank.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      mem[wr_bank][wr_cnt] <= in_row;
      if (wr_cnt == '0) tag[wr_bank] <= in_tag;
    end
  end

  // Bank status: the read side empties a bank after its last column, the
  // write side fills one after its last row.
  logic [1:0] full_nxt;
  logic       rd_last, wr_last;

  assign rd_last = full[rd_bank] && (rd_cnt == CW'(N - 1));
  assign wr_last = in_valid && (wr_cnt == CW'(N - 1));

  always_comb begin
    full_nxt = full;
    if (rd_last) full_nxt[rd_bank] = 1'b0;
    if (wr_last) full_nxt[wr_bank] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank <= 1'b0;
      wr_cnt  <= '0;
      rd_bank <= 1'b0;
      rd_cnt  <= '0;
      full    <= '0;
    end else begin
      full <= full_nxt;
      // Read side: column rd_cnt of bank rd_bank while that bank is full.
      if (full[rd_bank]) begin
        rd_cnt <= rd_last ? '0 : rd_cnt + 1'b1;
        if (rd_last) rd_bank <= ~rd_bank;
      end
      if (in_valid) begin
        wr_cnt <= wr_last ? '0 : wr_cnt + 1'b1;
        if (wr_last) wr_bank <= ~wr_bank;
      end
    end
  end

  assign out_valid = full[rd_bank];
  assign out_tag   = tag[rd_bank];
  always_comb begin
    for (int j = 0; j < N; j++) out_col[j] = mem[rd_bank][j][rd_cnt];
  end

  // A row may only be written into a bank that is not waiting to be read.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> !full[wr_bank])
    else $error("rc_interleaver: matrix written into a bank still being read");

endmodule
