// tb_window_gen: the 3x3 window generator on a 16-pixel-wide stream with
// random gaps in in_valid. After each accepted pixel s (once two full lines
// have passed) window cell [r][c] must hold pixel s - r*W - c, the pixel r
// lines up and c columns left. Pixel values are a function of the index.
module tb_window_gen;
  localparam int K = 3, W = 16, DW = 8;

  logic                        clk = 0, rst_n = 0, in_valid = 0;
  logic [DW-1:0]               pix = 0;
  logic [K-1:0][K-1:0][DW-1:0] win;
  int                          checks = 0, failures = 0;

  window_gen #(.K(K), .IMG_W(W), .DW(DW)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pix_in(pix), .win(win)
  );

  always #5 clk = ~clk;

  function automatic logic [DW-1:0] pv(int s);
    return DW'(s * 37 + (s >> 3));
  endfunction

  initial begin
    int s = 0;
    #12 rst_n = 1;
    for (int it = 0; it < 1500; it++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      pix      = pv(s);
      @(posedge clk);
      #1;
      if (in_valid) begin
        if (s >= (K - 1) * W + K - 1) begin
          for (int r = 0; r < K; r++)
            for (int c = 0; c < K; c++) begin
              checks++;
              if (win[r][c] !== pv(s - r * W - c)) begin
                failures++;
                $display("FAIL s=%0d win[%0d][%0d]=%0d exp=%0d", s, r, c,
                         win[r][c], pv(s - r * W - c));
              end
            end
        end
        s++;
      end
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
