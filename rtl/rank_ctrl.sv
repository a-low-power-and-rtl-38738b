// rank_ctrl: the Ctrl module of a token-ring median cell.
//
// Drives the select lines S1S0 of the cell's 4-to-1 rank multiplexer from
// four flags: Ti (cell holds the token), Ei (Pi == Pj), Fi (Ri <= X) and
// Gi (Pi > Pj), where Pj is the rank of the token cell.
//   Ti = 1               -> 11  recalculate (take A from RankCal)
//   Ti = 0, EiFiGi = 011 -> 10  decrement (case 1)
//   Ti = 0, EiFiGi = 000 -> 01  increment (case 2)
//   otherwise            -> 00  keep (cases 3, 4 and 5)
// The truth table is the document's; the sum-of-products form below is
// derived from it:  S1 = Ti | ~Ei&Fi&Gi,  S0 = Ti | ~Ei&~Fi&~Gi.
// Purely combinational.
module rank_ctrl
  import amf_pkg::*;
(
  input  logic      t_i,
  input  logic      e_i,
  input  logic      f_i,
  input  logic      g_i,
  output rank_src_e sel
);

  logic s1, s0;

  always_comb begin
    s1  = t_i | (~e_i &  f_i &  g_i);
    s0  = t_i | (~e_i & ~f_i & ~g_i);
    sel = rank_src_e'({s1, s0});
  end

endmodule
