// tb_adaptive_median_filter: two noisy 16x12 frames streamed through the
// filter with random gaps in in_valid, then filler pixels to flush the
// pipeline. Every output is compared, in raster order, with an
// independent model of the adaptive rule (tb_amf_ref_pkg), including the
// enlarged/replaced flags. Each output must appear exactly two cycles
// after the input that completes its window (2*W+2 pixels after the
// centre pixel). The test counts border pass-through, kept pixels,
// replaced pixels and 5x5 enlargements, and fails if any never occurred.
module tb_adaptive_median_filter;
  import tb_amf_ref_pkg::*;
  localparam int W = 16, H = 12, DW = 8, FRAMES = 2;
  localparam int D = 2 * W + 2;

  logic          clk = 0, rst_n = 0, in_valid = 0;
  logic [DW-1:0] pix = 0, pout;
  logic          out_valid, enl, rep;
  int            checks = 0, failures = 0;
  img_t          frames[FRAMES];
  int            acc_cyc[$];
  int            cyc = 0, n_out = 0;
  int            n_border = 0, n_kept = 0, n_rep = 0, n_enl = 0;

  adaptive_median_filter #(.IMG_W(W), .IMG_H(H), .DW(DW)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pix_in(pix),
    .out_valid(out_valid), .pix_out(pout), .out_enlarged(enl), .out_replaced(rep)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid && n_out < FRAMES * W * H) begin
      automatic int f = n_out / (W * H), p = n_out % (W * H);
      automatic int cx = p % W, cy = p / W;
      automatic bit e_enl, e_rep;
      automatic int e = filter_px(frames[f], W, H, cx, cy, e_enl, e_rep);
      checks += 2;
      if (int'(pout) != e || enl != e_enl || rep != e_rep) begin
        failures++;
        $display("FAIL f%0d (%0d,%0d): out=%0d exp=%0d enl=%b/%b rep=%b/%b",
                 f, cx, cy, pout, e, enl, e_enl, rep, e_rep);
      end
      // cyc is updated with a non-blocking assignment, so it reads one less
      // here than in the stimulus loop: 3 here means two clock cycles.
      if (acc_cyc.size() == 0 || cyc - acc_cyc[0] != 3) begin
        failures++;
        $display("FAIL latency at output %0d", n_out);
      end
      if (acc_cyc.size()) void'(acc_cyc.pop_front());
      if (cx < 2 || cy < 2 || cx >= W - 2 || cy >= H - 2) n_border++;
      else if (e_rep) n_rep++;
      else n_kept++;
      if (e_enl) n_enl++;
      n_out++;
    end
  end

  initial begin
    automatic int s = 0;
    for (int f = 0; f < FRAMES; f++) frames[f] = make_image(W, H, 25);
    #12 rst_n = 1;
    while (s < FRAMES * W * H + D) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      pix = (s < FRAMES * W * H) ? DW'(frames[s / (W * H)][s % (W * H)]) : DW'(0);
      @(posedge clk);
      if (in_valid) begin
        if (s >= D) acc_cyc.push_back(cyc);
        s++;
      end
    end
    repeat (5) @(posedge clk);
    checks += 5;
    if (n_out != FRAMES * W * H) begin failures++; $display("FAIL %0d outputs", n_out); end
    if (n_border == 0) failures++;
    if (n_kept == 0)   failures++;
    if (n_rep == 0)    failures++;
    if (n_enl == 0)    failures++;
    $display("border=%0d kept=%0d replaced=%0d enlarged=%0d", n_border, n_kept, n_rep, n_enl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
