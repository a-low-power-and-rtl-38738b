// tb_order_stat: min, median and max of 9 and of 25 random samples drawn
// from a small range (many ties), compared with a sorted copy.
module tb_order_stat;
  localparam int DW = 8;

  logic [8:0][DW-1:0]  d9;
  logic [24:0][DW-1:0] d25;
  logic [DW-1:0]       mn9, md9, mx9, mn25, md25, mx25;
  int                  checks = 0, failures = 0;

  order_stat #(.N(9),  .DW(DW)) dut9  (.d(d9),  .vmin(mn9),  .vmed(md9),  .vmax(mx9));
  order_stat #(.N(25), .DW(DW)) dut25 (.d(d25), .vmin(mn25), .vmed(md25), .vmax(mx25));

  initial begin
    for (int it = 0; it < 2000; it++) begin
      automatic int a[$], b[$];
      automatic int range = (it % 2) ? 255 : 6;
      for (int i = 0; i < 9; i++)  begin d9[i]  = DW'($urandom_range(0, range)); a.push_back(d9[i]); end
      for (int i = 0; i < 25; i++) begin d25[i] = DW'($urandom_range(0, range)); b.push_back(d25[i]); end
      a.sort();
      b.sort();
      #1;
      checks += 2;
      if (mn9 != a[0] || md9 != a[4] || mx9 != a[8]) begin
        failures++;
        $display("FAIL 9: %0d %0d %0d exp %0d %0d %0d", mn9, md9, mx9, a[0], a[4], a[8]);
      end
      if (mn25 != b[0] || md25 != b[12] || mx25 != b[24]) begin
        failures++;
        $display("FAIL 25: %0d %0d %0d exp %0d %0d %0d", mn25, md25, mx25, b[0], b[12], b[24]);
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
