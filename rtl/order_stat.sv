// order_stat: minimum, median and maximum of N samples (N odd).
//
// Works by ranking rather than sorting, the same idea as the token-ring
// filter: every sample's rank is the number of samples smaller than it plus
// the number of equal samples with a lower index, which makes all ranks
// distinct (0..N-1). The sample of rank 0 is the minimum, (N-1)/2 the
// median and N-1 the maximum; each is picked with an AND/OR selector.
// N*(N-1) comparators, purely combinational; the caller registers the
// results. The adaptive filter needs these three values, but no circuit
// for them is given; this single-cycle ranking form is this design's
// choice.
module order_stat #(
  parameter int unsigned N  = 9,
  parameter int unsigned DW = 8
) (
  input  logic [N-1:0][DW-1:0] d,
  output logic [DW-1:0]        vmin,
  output logic [DW-1:0]        vmed,
  output logic [DW-1:0]        vmax
);

  localparam int unsigned RW = $clog2(N);

  logic [N-1:0][RW-1:0] rank;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      rank[j] = '0;
      for (int i = 0; i < N; i++) begin
        if (i != j) begin
          if ((d[i] < d[j]) || ((d[i] == d[j]) && (i < j)))
            rank[j] = rank[j] + RW'(1);
        end
      end
    end
  end

  always_comb begin
    vmin = '0;
    vmed = '0;
    vmax = '0;
    for (int j = 0; j < N; j++) begin
      vmin = vmin | (d[j] & {DW{rank[j] == RW'(0)}});
      vmed = vmed | (d[j] & {DW{rank[j] == RW'((N - 1) / 2)}});
      vmax = vmax | (d[j] & {DW{rank[j] == RW'(N - 1)}});
    end
  end

endmodule
