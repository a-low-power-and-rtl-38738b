// tr_median_filter: low-power 1-D median filter with a token ring.
//
// A window of N samples is kept in N cells that never move their data.
// Exactly one cell holds a token; it takes the new sample and passes the
// token on, so the ring behaves as a FIFO that dequeues the oldest sample in
// place. Instead of sorting the samples, each cell keeps the rank (1..N) of
// its sample; equal samples are ranked by age, newer above older, so ranks
// are unique. When sample X enters:
//   - the token cell's new rank is A = 1 + #(other cells with Ri <= X),
//   - every other cell's rank is decremented, incremented or kept, depending
//     on how it compares with the token cell's old rank B and with X.
// The cell whose rank is (N+1)/2 holds the median (N odd).
//
// Pipeline: register X captures x_in; the cell registers form the first
// stage and Y the second. With en held high, y_out after edge k+2 is the
// median of the last N samples captured in X up to edge k. Before N samples
// have arrived, missing samples count as zero (X and all cells reset to
// zero and the reset value of X is itself taken in as a sample, as in the
// document's worked example). en freezes every register; it is this
// design's addition for streams with gaps.
module tr_median_filter #(
  parameter int unsigned N  = 5,   // window size, odd
  parameter int unsigned DW = 8,   // sample width
  localparam int unsigned PW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [DW-1:0] x_in,
  output logic [DW-1:0] y_out
);

  logic [DW-1:0]         x_q;
  logic [PW-1:0]         a, b;
  logic [N-1:0]          a_vec, t_vec, y_vec;
  logic [N-1:0][PW-1:0]  p_vec;
  logic [N-1:0][DW-1:0]  r_vec;
  logic [DW-1:0]         med;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  x_q <= '0;
    else if (en) x_q <= x_in;
  end

  for (genvar i = 0; i < N; i++) begin : g_cell
    tr_cell #(
      .N(N), .DW(DW), .PW(PW),
      .TOKEN_INIT(i == N - 1)
    ) u_cell (
      .clk(clk), .rst_n(rst_n), .en(en),
      .x(x_q), .a(a), .b(b),
      .t_prev(t_vec[(i + N - 1) % N]),
      .a_i(a_vec[i]), .p_i(p_vec[i]), .r_i(r_vec[i]),
      .t_i(t_vec[i]), .y_i(y_vec[i])
    );
  end

  rank_cal #(.N(N), .PW(PW)) u_rank_cal (.a_vec(a_vec), .a(a));
  rank_sel #(.N(N), .PW(PW)) u_rank_sel (.p(p_vec), .t(t_vec), .b(b));
  median_sel #(.N(N), .DW(DW)) u_median_sel (.r(r_vec), .y(y_vec), .med(med));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y_out <= '0;
    else if (en) y_out <= med;
  end

  // The ring must carry exactly one token, and at most one cell may hold
  // the median rank.
  a_one_token: assert property (@(posedge clk) disable iff (!rst_n) $onehot(t_vec));
  a_one_median: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(y_vec));

endmodule
