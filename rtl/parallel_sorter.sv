// parallel_sorter: register-array sorter with odd-even compare-exchange.
//
// N registers form a shift chain. A set of N data words is shifted in, one
// per in_valid cycle (N steps). The array is then sorted in place: each
// sort cycle applies two layers of compare-exchange between neighbouring
// registers, first the pairs (0,1),(2,3),... then (1,2),(3,4),..., which is
// one column of the document's parallel-sorting figure; N/2 such cycles
// (N layers, odd-even transposition) sort any input. While the next set is
// shifted in, the sorted set leaves at the far end of the chain, smallest
// first, so loading and unloading overlap.
// One set therefore takes N + N/2 cycles to load and sort and another N
// cycles to leave: (n + n/2) + n, the document's count for a single sort.
// in_ready is low during the N/2 sort cycles. The last set leaves only
// when another set (or filler data) is shifted in. The document names N=8
// in its figure; the stream handshake is this design's choice.
module parallel_sorter #(
  parameter int unsigned N  = 8,   // words per set, even
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] din,
  output logic          out_valid,
  output logic [DW-1:0] dout,
  output logic          sorting     // high during the sort cycles
);

  localparam int unsigned LW = $clog2(N + 1);
  localparam int unsigned SW = $clog2(N / 2 + 1);

  typedef enum logic {S_LOAD, S_SORT} state_e;

  state_e               state;
  logic [N-1:0][DW-1:0] regs;
  logic [N-1:0][DW-1:0] after_even, after_odd;
  logic [LW-1:0]        load_cnt;
  logic [SW-1:0]        sort_cnt;
  logic                 have_sorted;   // regs hold a sorted set not yet sent

  // Two compare-exchange layers; after sorting regs[N-1] holds the minimum.
  always_comb begin
    after_even = regs;
    for (int i = 0; i + 1 < N; i += 2) begin
      if (regs[i] < regs[i+1]) begin
        after_even[i]   = regs[i+1];
        after_even[i+1] = regs[i];
      end
    end
    after_odd = after_even;
    for (int i = 1; i + 1 < N; i += 2) begin
      if (after_even[i] < after_even[i+1]) begin
        after_odd[i]   = after_even[i+1];
        after_odd[i+1] = after_even[i];
      end
    end
  end

  assign in_ready  = (state == S_LOAD);
  assign sorting   = (state == S_SORT);
  assign dout      = regs[N-1];
  assign out_valid = in_valid && in_ready && have_sorted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_LOAD;
      regs        <= '0;
      load_cnt    <= '0;
      sort_cnt    <= '0;
      have_sorted <= 1'b0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          regs[0] <= din;
          for (int i = 1; i < N; i++) regs[i] <= regs[i-1];
          if (load_cnt == LW'(N - 1)) begin
            load_cnt    <= '0;
            have_sorted <= 1'b0;
            state       <= S_SORT;
          end else begin
            load_cnt <= load_cnt + LW'(1);
          end
        end
        S_SORT: begin
          regs <= after_odd;
          if (sort_cnt == SW'(N / 2 - 1)) begin
            sort_cnt    <= '0;
            have_sorted <= 1'b1;
            state       <= S_LOAD;
          end else begin
            sort_cnt <= sort_cnt + SW'(1);
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
