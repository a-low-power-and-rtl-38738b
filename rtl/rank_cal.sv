// rank_cal: the RankCal module of the token-ring median filter.
//
// A multi-input adder: counts the cells that do not hold the token and
// whose sample is <= X (the Ai inputs) and adds one. The result A is the
// rank the token cell takes for the new sample X: it ranks above every
// older sample of equal value. The adder is the original design's; its
// structure is left to synthesis. Purely combinational.
module rank_cal #(
  parameter int unsigned N  = 5,   // number of cells (window size)
  parameter int unsigned PW = 3    // rank width, must hold N
) (
  input  logic [N-1:0]  a_vec,     // Ai of every cell
  output logic [PW-1:0] a          // 1 + number of ones in a_vec
);

  always_comb begin
    a = PW'(1);
    for (int i = 0; i < N; i++) a = a + PW'(a_vec[i]);
  end

endmodule
