// rank_gen: the RankGen module of a token-ring median cell.
//
// From the cell's rank Pi, sample Ri and token Ti, the shared input sample
// X, the recalculated rank A (RankCal) and the token cell's rank B
// (RankSel) it forms:
//   Fi = (Ri <= X), Gi = (Pi > B), Ei = (Pi == B),
//   Ai = ~Ti & Fi             (this cell's vote into RankCal),
//   Qi = mux(S1S0; 3: A, 2: Pi-1, 1: Pi+1, 0: Pi)  (next rank).
// The comparators, the AND gate and the multiplexer inputs are those of the
// document's RankGen figure; the select lines come from rank_ctrl.
// Purely combinational.
module rank_gen
  import amf_pkg::*;
#(
  parameter int unsigned DW = 8,   // sample width
  parameter int unsigned PW = 3    // rank width
) (
  input  logic [PW-1:0] a,         // recalculated rank from RankCal
  input  logic [PW-1:0] b,         // rank of the token cell from RankSel
  input  logic [PW-1:0] p_i,       // this cell's rank
  input  logic          t_i,       // this cell holds the token
  input  logic [DW-1:0] r_i,       // this cell's sample
  input  logic [DW-1:0] x,         // input sample
  output logic          a_i,       // ~Ti & (Ri <= X)
  output logic [PW-1:0] q_i        // next rank
);

  logic      e_i, f_i, g_i;
  rank_src_e sel;

  always_comb begin
    f_i = (r_i <= x);
    g_i = (p_i > b);
    e_i = (p_i == b);
    a_i = ~t_i & f_i;
  end

  rank_ctrl u_ctrl (
    .t_i(t_i), .e_i(e_i), .f_i(f_i), .g_i(g_i), .sel(sel)
  );

  always_comb begin
    unique case (sel)
      RANK_RECALC: q_i = a;
      RANK_DEC:    q_i = p_i - PW'(1);
      RANK_INC:    q_i = p_i + PW'(1);
      default:     q_i = p_i;
    endcase
  end

endmodule
