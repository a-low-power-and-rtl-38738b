// tb_amf_noise_levels: the adaptive median filter on 64x64 images with
// salt-and-pepper noise of 20, 30, 40 and 50 percent, frames streamed back
// to back. Every output is compared with the reference model. For each
// noise level the test also measures, over the interior pixels, how many
// impulses remain after filtering and the mean absolute error against the
// noise-free image, and requires the filter to remove at least 90 percent
// of the impulses up to 40 percent noise.
module tb_amf_noise_levels;
  import tb_amf_ref_pkg::*;
  localparam int W = 64, H = 64, DW = 8, LEVELS = 4;
  localparam int D = 2 * W + 2;
  localparam int LEVEL[LEVELS] = '{20, 30, 40, 50};

  logic          clk = 0, rst_n = 0, in_valid = 0;
  logic [DW-1:0] pix = 0, pout;
  logic          out_valid, enl, rep;
  int            checks = 0, failures = 0;
  img_t          clean[LEVELS], noisy[LEVELS];
  int            n_out = 0;
  int            imp_in[LEVELS], imp_out[LEVELS], abs_err[LEVELS], n_int[LEVELS];

  adaptive_median_filter #(.IMG_W(W), .IMG_H(H), .DW(DW)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pix_in(pix),
    .out_valid(out_valid), .pix_out(pout), .out_enlarged(enl), .out_replaced(rep)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && out_valid && n_out < LEVELS * W * H) begin
      automatic int f = n_out / (W * H), p = n_out % (W * H);
      automatic int cx = p % W, cy = p / W;
      automatic bit e_enl, e_rep;
      automatic int e = filter_px(noisy[f], W, H, cx, cy, e_enl, e_rep);
      checks++;
      if (int'(pout) != e || enl != e_enl || rep != e_rep) begin
        failures++;
        if (failures < 10) $display("FAIL level %0d (%0d,%0d): %0d exp %0d", LEVEL[f], cx, cy, pout, e);
      end
      if (cx >= 2 && cy >= 2 && cx < W - 2 && cy < H - 2) begin
        n_int[f]++;
        if (noisy[f][p] == 0 || noisy[f][p] == 255) imp_in[f]++;
        if (pout == 0 || pout == 255) imp_out[f]++;
        abs_err[f] += (int'(pout) > clean[f][p]) ? int'(pout) - clean[f][p] : clean[f][p] - int'(pout);
      end
      n_out++;
    end
  end

  initial begin
    automatic int s = 0;
    for (int f = 0; f < LEVELS; f++) begin
      clean[f] = make_clean(W, H);
      noisy[f] = add_noise(clean[f], LEVEL[f]);
      imp_in[f] = 0; imp_out[f] = 0; abs_err[f] = 0; n_int[f] = 0;
    end
    #12 rst_n = 1;
    while (s < LEVELS * W * H + D) begin
      @(negedge clk);
      in_valid = 1'b1;
      pix = (s < LEVELS * W * H) ? DW'(noisy[s / (W * H)][s % (W * H)]) : DW'(0);
      @(posedge clk);
      s++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != LEVELS * W * H) begin failures++; $display("FAIL %0d outputs", n_out); end
    for (int f = 0; f < LEVELS; f++) begin
      $display("noise %0d%%: impulses in=%0d out=%0d, mean abs error %0d.%02d",
               LEVEL[f], imp_in[f], imp_out[f], abs_err[f] / n_int[f],
               (abs_err[f] * 100 / n_int[f]) % 100);
      if (LEVEL[f] <= 40) begin
        checks++;
        if (imp_out[f] * 10 > imp_in[f]) begin
          failures++;
          $display("FAIL noise %0d%%: too many impulses left", LEVEL[f]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
