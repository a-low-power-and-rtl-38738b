// median_sel: the MedianSel module of the token-ring median filter.
//
// Forwards the sample of the cell whose rank equals (N+1)/2 (flag Yi) to
// the median output. AND/OR form like rank_sel: if no cell has the median
// rank (the window still holds fewer than (N+1)/2 real samples) the output
// is zero, which equals the median of the zero-initialised window.
// Purely combinational.
module median_sel #(
  parameter int unsigned N  = 5,
  parameter int unsigned DW = 8
) (
  input  logic [N-1:0][DW-1:0] r,  // sample of every cell
  input  logic [N-1:0]         y,  // Yi: cell holds the median
  output logic [DW-1:0]        med
);

  always_comb begin
    med = '0;
    for (int i = 0; i < N; i++) med = med | (r[i] & {DW{y[i]}});
  end

endmodule
