// tb_rank_sel: with one-hot token bits, B must equal the rank of the cell
// that holds the token. Random ranks, every token position.
module tb_rank_sel;
  localparam int N = 5, PW = 3;

  logic [N-1:0][PW-1:0] p;
  logic [N-1:0]         t;
  logic [PW-1:0]        b;
  int                   checks = 0, failures = 0;

  rank_sel #(.N(N), .PW(PW)) dut (.p(p), .t(t), .b(b));

  initial begin
    for (int it = 0; it < 500; it++) begin
      automatic int k = $urandom_range(0, N - 1);
      for (int i = 0; i < N; i++) p[i] = PW'($urandom_range(0, 7));
      t = N'(1) << k;
      #1;
      checks++;
      if (b !== p[k]) begin
        failures++;
        $display("FAIL token=%0d b=%0d exp=%0d", k, b, p[k]);
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
