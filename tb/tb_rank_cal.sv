// tb_rank_cal: the recalculated rank must be one plus the number of set
// Ai inputs; checked for every input pattern of a 9-cell ring.
module tb_rank_cal;
  localparam int N = 9, PW = 4;

  logic [N-1:0]  av;
  logic [PW-1:0] a;
  int            checks = 0, failures = 0;

  rank_cal #(.N(N), .PW(PW)) dut (.a_vec(av), .a(a));

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      automatic int ones = 0;
      av = N'(v);
      for (int i = 0; i < N; i++) if (v & (1 << i)) ones++;
      #1;
      checks++;
      if (a != PW'(ones + 1)) begin
        failures++;
        $display("FAIL av=%b a=%0d", av, a);
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
