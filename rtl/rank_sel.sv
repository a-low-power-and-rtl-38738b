// rank_sel: the RankSel module of the token-ring median filter.
//
// Forwards the rank of the cell that holds the token to output B. Each rank
// is ANDed with its token bit and the results are ORed, as in the document's
// AND/OR form; the tristate-bus variant the document also mentions is not
// used. Exactly one token bit is set at any time, which an assertion
// checks in simulation. Purely combinational.
module rank_sel #(
  parameter int unsigned N  = 5,
  parameter int unsigned PW = 3
) (
  input  logic [N-1:0][PW-1:0] p,  // rank of every cell
  input  logic [N-1:0]         t,  // token bit of every cell
  output logic [PW-1:0]        b   // rank of the token cell
);

  always_comb begin
    b = '0;
    for (int i = 0; i < N; i++) b = b | (p[i] & {PW{t[i]}});
  end

endmodule
