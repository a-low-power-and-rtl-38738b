// tb_tr_cell: one token-ring cell driven with random inputs.
// A reference copy of the cell's three registers is kept in the testbench:
// Ri must load X only when the cell holds the token, Ti must follow the
// previous cell's token bit, Pi must follow the rank-update cases, and
// Yi must flag rank (N+1)/2. Reset values are checked too.
module tb_tr_cell;
  localparam int N = 5, DW = 8, PW = 3;

  logic          clk = 0, rst_n = 0, en = 0;
  logic [DW-1:0] x;
  logic [PW-1:0] a, b, p;
  logic          t_prev, ai, t, y;
  logic [DW-1:0] r;
  logic [PW-1:0] ref_p;
  logic [DW-1:0] ref_r;
  logic          ref_t;
  int            checks = 0, failures = 0;

  tr_cell #(.N(N), .DW(DW), .PW(PW), .TOKEN_INIT(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a(a), .b(b), .t_prev(t_prev),
    .a_i(ai), .p_i(p), .r_i(r), .t_i(t), .y_i(y)
  );

  always #5 clk = ~clk;

  task automatic compare(string tag);
    checks++;
    if (p !== ref_p || r !== ref_r || t !== ref_t || y !== (ref_p == 3)) begin
      failures++;
      $display("FAIL %s p=%0d/%0d r=%0d/%0d t=%b/%b y=%b", tag, p, ref_p, r, ref_r, t, ref_t, y);
    end
  endtask

  initial begin
    x = 0; a = 1; b = 0; t_prev = 0;
    #12;
    ref_p = 0; ref_r = 0; ref_t = 1;
    compare("reset");
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      en     = ($urandom_range(0, 7) != 0);
      x      = DW'($urandom_range(0, 20));
      a      = PW'($urandom_range(1, 5));
      b      = PW'($urandom_range(0, 5));
      t_prev = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (en) begin
        if (ref_t)                         ref_p = a;
        else if (ref_p > b && ref_r <= x)  ref_p = ref_p - 1;
        else if (ref_p < b && ref_r > x)   ref_p = ref_p + 1;
        if (ref_t) ref_r = x;
        ref_t = t_prev;
      end
      #1 compare("run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
