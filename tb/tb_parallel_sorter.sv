// tb_parallel_sorter: sets of 8 random words (some with ties) are pushed
// through the sorter, with random gaps in in_valid. Every word that leaves
// must be the next element of the earlier set in ascending order. With
// in_valid held high for the first two sets, the first set must be loaded,
// sorted and fully sent within n + n/2 + n = 20 cycles of its first word,
// and in_ready must be low for exactly n/2 = 4 cycles per set.
module tb_parallel_sorter;
  localparam int N = 8, DW = 8, SETS = 60;

  logic          clk = 0, rst_n = 0, in_valid = 0;
  logic          in_ready, out_valid, sorting;
  logic [DW-1:0] din = 0, dout;
  int            checks = 0, failures = 0;
  int            expq[$];          // expected output order
  int            sent_words = 0, got = 0;
  int            cyc = 0, first_in_cyc = -1, last_out_set0 = -1;
  int            stall_cycles = 0;

  parallel_sorter #(.N(N), .DW(DW)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .din(din), .out_valid(out_valid), .dout(dout), .sorting(sorting)
  );

  always #5 clk = ~clk;

  initial begin
    automatic int set[$];
    #12 rst_n = 1;
    // SETS real sets, then one filler set to push the last one out.
    while (sent_words < (SETS + 1) * N) begin
      @(negedge clk);
      if (set.size() == 0) begin
        for (int i = 0; i < N; i++) set.push_back($urandom_range(0, (sent_words / N) % 2 ? 255 : 5));
        if (sent_words / N < SETS) begin
          automatic int srt[$] = set;
          srt.sort();
          foreach (srt[i]) expq.push_back(srt[i]);
        end
      end
      in_valid = (sent_words < 2 * N) || ($urandom_range(0, 3) != 0);
      din      = DW'(set[0]);
      @(posedge clk);
      cyc++;
      if (!in_ready) stall_cycles++;
      if (out_valid) begin
        checks++;
        if (expq.size() == 0 || int'(dout) != expq[0]) begin
          failures++;
          $display("FAIL out %0d exp %0d", dout, expq.size() ? expq[0] : -1);
        end
        if (expq.size()) void'(expq.pop_front());
        got++;
        if (got == N) last_out_set0 = cyc;
      end
      if (in_valid && in_ready) begin
        if (first_in_cyc < 0) first_in_cyc = cyc;
        void'(set.pop_front());
        sent_words++;
      end
    end
    repeat (6) @(posedge clk);
    checks += 3;
    if (got != SETS * N) begin failures++; $display("FAIL got %0d words", got); end
    if (last_out_set0 - first_in_cyc + 1 != N + N / 2 + N) begin
      failures++;
      $display("FAIL first set took %0d cycles", last_out_set0 - first_in_cyc + 1);
    end
    if (stall_cycles != SETS * N / 2) begin
      failures++;
      $display("FAIL %0d sort cycles, exp %0d", stall_cycles, SETS * N / 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
