// tb_rank_ctrl: exhaustive check of the rank multiplexer select logic.
// All 16 combinations of Ti, Ei, Fi, Gi are applied and the select code is
// compared with the rank-update rules written as a table: token -> recalc,
// Pi>Pj and Ri<=X -> decrement, Pi<Pj and Ri>X -> increment, else keep.
module tb_rank_ctrl;
  import amf_pkg::*;

  logic      t, e, f, g;
  rank_src_e sel;
  int        checks = 0, failures = 0;

  rank_ctrl dut (.t_i(t), .e_i(e), .f_i(f), .g_i(g), .sel(sel));

  function automatic rank_src_e expected(logic tt, ee, ff, gg);
    if (tt)                return RANK_RECALC;
    if (ee)                return RANK_KEEP;      // Pi == Pj (case 5)
    if (gg && ff)          return RANK_DEC;       // case 1
    if (!gg && !ff)        return RANK_INC;       // case 2
    return RANK_KEEP;                             // cases 3, 4
  endfunction

  initial begin
    for (int v = 0; v < 16; v++) begin
      {t, e, f, g} = 4'(v);
      #1;
      checks++;
      if (sel !== expected(t, e, f, g)) begin
        failures++;
        $display("FAIL T=%b E=%b F=%b G=%b sel=%b", t, e, f, g, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
