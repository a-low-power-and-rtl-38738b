// tr_cell: one cell ci of the token-ring median filter.
//
// Holds three registers: the sample Ri, its rank Pi within the window and
// the token bit Ti. On every enabled clock edge
//   - Ri loads the input sample X if the cell holds the token, otherwise it
//     keeps its value (samples never move between cells),
//   - Pi loads the next rank Qi from rank_gen,
//   - Ti loads the token bit of the previous cell, so the single token
//     walks round the ring by one cell per sample.
// Yi = (Pi == (N+1)/2) marks the cell that holds the median. Ri and Pi reset
// to zero and Ti to TOKEN_INIT, as in the document; the document's last
// cell starts with the token. The asynchronous active-low reset and the
// enable input are this design's choices.
module tr_cell #(
  parameter int unsigned N          = 5,
  parameter int unsigned DW         = 8,
  parameter int unsigned PW         = 3,
  parameter bit          TOKEN_INIT = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [DW-1:0] x,          // input register X
  input  logic [PW-1:0] a,          // RankCal output
  input  logic [PW-1:0] b,          // RankSel output
  input  logic          t_prev,     // token bit of the previous cell
  output logic          a_i,        // vote into RankCal
  output logic [PW-1:0] p_i,        // rank register
  output logic [DW-1:0] r_i,        // sample register
  output logic          t_i,        // token register
  output logic          y_i         // this cell holds the median
);

  localparam logic [PW-1:0] MED_RANK = PW'((N + 1) / 2);

  logic [PW-1:0] q_i;

  rank_gen #(.DW(DW), .PW(PW)) u_rank_gen (
    .a(a), .b(b), .p_i(p_i), .t_i(t_i), .r_i(r_i), .x(x),
    .a_i(a_i), .q_i(q_i)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_i <= '0;
      r_i <= '0;
      t_i <= TOKEN_INIT;
    end else if (en) begin
      p_i <= q_i;
      if (t_i) r_i <= x;
      t_i <= t_prev;
    end
  end

  assign y_i = (p_i == MED_RANK);

endmodule
