// tb_median_sel: the output must be the sample of the flagged cell, or zero
// when no cell is flagged.
module tb_median_sel;
  localparam int N = 5, DW = 8;

  logic [N-1:0][DW-1:0] r;
  logic [N-1:0]         y;
  logic [DW-1:0]        med;
  int                   checks = 0, failures = 0;

  median_sel #(.N(N), .DW(DW)) dut (.r(r), .y(y), .med(med));

  initial begin
    for (int it = 0; it < 600; it++) begin
      automatic int k = $urandom_range(0, N);     // N means: no cell flagged
      for (int i = 0; i < N; i++) r[i] = DW'($urandom);
      y = (k == N) ? '0 : N'(1) << k;
      #1;
      checks++;
      if (med !== ((k == N) ? DW'(0) : r[k])) begin
        failures++;
        $display("FAIL k=%0d med=%0d", k, med);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
