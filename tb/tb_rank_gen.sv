// tb_rank_gen: random check of the next-rank logic of one cell.
// Random ranks, samples, token bit and A/B inputs are applied; the expected
// next rank and Ai are computed from the rank-update cases directly.
module tb_rank_gen;
  localparam int DW = 8, PW = 3;

  logic [PW-1:0] a, b, p, q;
  logic          t, ai;
  logic [DW-1:0] r, x;
  int            checks = 0, failures = 0;
  int            n_dec = 0, n_inc = 0;

  rank_gen #(.DW(DW), .PW(PW)) dut (
    .a(a), .b(b), .p_i(p), .t_i(t), .r_i(r), .x(x), .a_i(ai), .q_i(q)
  );

  initial begin
    for (int it = 0; it < 4000; it++) begin
      automatic logic [PW-1:0] exp_q;
      a = PW'($urandom_range(1, 5));
      b = PW'($urandom_range(0, 5));
      p = PW'($urandom_range(0, 5));
      t = 1'($urandom_range(0, 3) == 0);
      r = DW'($urandom_range(0, 15));
      x = DW'($urandom_range(0, 15));
      #1;
      if (t)                    exp_q = a;
      else if (p > b && r <= x) begin exp_q = p - 1; n_dec++; end
      else if (p < b && r > x)  begin exp_q = p + 1; n_inc++; end
      else                      exp_q = p;
      checks += 2;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL q: a=%0d b=%0d p=%0d t=%b r=%0d x=%0d q=%0d exp=%0d",
                 a, b, p, t, r, x, q, exp_q);
      end
      if (ai !== (!t && r <= x)) begin
        failures++;
        $display("FAIL ai: t=%b r=%0d x=%0d ai=%b", t, r, x, ai);
      end
    end
    if (n_dec == 0 || n_inc == 0) failures++;
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
