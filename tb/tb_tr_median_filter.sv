// tb_tr_median_filter: the token-ring median filter against a sliding-window
// reference.
// The first six samples are the worked example 12, 99, 35, 47, 66, 52:
// after the fifth sample the cell ranks must be 1, 5, 2, 3, 4 and the
// median 47; after 52 has replaced 12 they must be 3, 5, 1, 2, 4.
// Then random samples from a small range (many equal values, so the
// age-based tie break is exercised) are streamed with random enable gaps.
// Every enabled cycle the output is compared with the median of the last N
// captured samples, two enabled cycles earlier (the pipeline latency);
// samples before the start count as zero. The single token and the rank
// set {1..N} are checked each cycle once the window is full. A second
// filter with a 9-sample window runs on the same stream and is checked
// against its own sliding-window reference.
module tb_tr_median_filter;
  localparam int N = 5, DW = 8;

  logic          clk = 0, rst_n = 0, en = 0;
  logic [DW-1:0] x = 0, y, y9;
  int            checks = 0, failures = 0;
  int            hist[$];         // values captured in X, hist[0] = reset 0
  int            gaps = 0;

  tr_median_filter #(.N(N), .DW(DW)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .x_in(x), .y_out(y)
  );

  tr_median_filter #(.N(9), .DW(DW)) dut9 (
    .clk(clk), .rst_n(rst_n), .en(en), .x_in(x), .y_out(y9)
  );

  always #5 clk = ~clk;

  function automatic int ref_median(int k, int n = N);   // Y after enabled edge k
    int w[$];
    for (int i = k - 1 - n; i <= k - 2; i++) w.push_back((i >= 0) ? hist[i] : 0);
    w.sort();
    return w[n / 2];
  endfunction

  int example[6] = '{12, 99, 35, 47, 66, 52};

  initial begin
    int k = 0;
    hist.push_back(0);
    #12 rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      if (it < 7) begin
        en = 1;
        x  = DW'((it < 6) ? example[it] : $urandom_range(0, 9));
      end else begin
        en = ($urandom_range(0, 5) != 0);
        x  = DW'($urandom_range(0, 9));
        if (!en) gaps++;
      end
      @(posedge clk);
      if (en) begin
        k++;
        hist.push_back(int'(x));
      end
      #1;
      if (en) begin
        checks++;
        if (int'(y) != ref_median(k)) begin
          failures++;
          $display("FAIL edge %0d: y=%0d exp=%0d", k, y, ref_median(k));
        end
        checks++;
        if (int'(y9) != ref_median(k, 9)) begin
          failures++;
          $display("FAIL N=9 edge %0d: y=%0d exp=%0d", k, y9, ref_median(k, 9));
        end
      end
      if (k == 6) begin      // cells now hold the five example samples
        checks++;
        if (dut.p_vec[0] != 1 || dut.p_vec[1] != 5 || dut.p_vec[2] != 2 ||
            dut.p_vec[3] != 3 || dut.p_vec[4] != 4) begin
          failures++;
          $display("FAIL example ranks %p", dut.p_vec);
        end
      end
      if (k == 7) begin      // 52 replaced 12 in c1: ranks 3, 5, 1, 2, 4
        checks++;
        if (dut.p_vec[0] != 3 || dut.p_vec[1] != 5 || dut.p_vec[2] != 1 ||
            dut.p_vec[3] != 2 || dut.p_vec[4] != 4) begin
          failures++;
          $display("FAIL example ranks after 52 %p", dut.p_vec);
        end
      end
      if (k == 7 && en) begin
        checks++;
        if (y != 47) begin failures++; $display("FAIL example median %0d", y); end
      end
      if (k > N) begin       // ranks form a permutation of 1..N
        automatic logic [N:0] seen = '0;
        for (int i = 0; i < N; i++) seen[dut.p_vec[i]] = 1'b1;
        checks++;
        if (seen != {{N{1'b1}}, 1'b0}) begin
          failures++;
          $display("FAIL ranks not a permutation %p", dut.p_vec);
        end
      end
    end
    checks++;
    if (gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
