// tb_amf_top: end-to-end test of the whole subsystem at its default sizes
// (5-sample token ring, 256x256 image, 8-word sorter), all three engines
// running at the same time.
//   - 1-D filter: 3000 random samples with enable gaps, output checked
//     against a sliding-window median two enabled cycles later.
//   - 2-D filter: one full noisy 256x256 frame plus flush pixels, every
//     output pixel checked against the reference model.
//   - sorter: 40 sets of 8 words, each checked to leave in ascending order.
// Mechanisms counted, each must occur: token passes from the last cell
// back to the first, enable gaps in the 1-D filter, border pass-through,
// kept pixels, median replacement, 5x5 enlargement, sorter stalls
// (in_ready low) and output overlapped with loading.
module tb_amf_top;
  import tb_amf_ref_pkg::*;
  localparam int DW = 8, W = 256, H = 256, TRN = 5, SN = 8, SETS = 40;
  localparam int D = 2 * W + 2;

  logic          clk = 0, rst_n = 0;
  logic          tr_en = 0;
  logic [DW-1:0] tr_x = 0, tr_y;
  logic          a_iv = 0, a_ov, a_enl, a_rep;
  logic [DW-1:0] a_pi = 0, a_po;
  logic          s_iv = 0, s_rdy, s_ov, s_sorting;
  logic [DW-1:0] s_din = 0, s_dout;

  int checks = 0, failures = 0;
  int n_wrap = 0, n_gap = 0, n_border = 0, n_kept = 0, n_rep = 0, n_enl = 0;
  int n_stall = 0, n_overlap = 0;

  amf_top dut (
    .clk(clk), .rst_n(rst_n),
    .tr_en(tr_en), .tr_x(tr_x), .tr_y(tr_y),
    .amf_in_valid(a_iv), .amf_pix_in(a_pi), .amf_out_valid(a_ov),
    .amf_pix_out(a_po), .amf_out_enlarged(a_enl), .amf_out_replaced(a_rep),
    .srt_in_valid(s_iv), .srt_in_ready(s_rdy), .srt_din(s_din),
    .srt_out_valid(s_ov), .srt_dout(s_dout), .srt_sorting(s_sorting)
  );

  always #5 clk = ~clk;

  // ------------------------------------------------------------ 1-D filter
  int  hist[$];
  bit  tr_done = 0;

  function automatic int tr_ref(int k);
    int w[$];
    for (int i = k - 1 - TRN; i <= k - 2; i++) w.push_back((i >= 0) ? hist[i] : 0);
    w.sort();
    return w[TRN / 2];
  endfunction

  initial begin
    automatic int k = 0;
    hist.push_back(0);
    wait (rst_n);
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      tr_en = ($urandom_range(0, 5) != 0);
      tr_x  = DW'($urandom_range(0, 255));
      if (!tr_en) n_gap++;
      @(posedge clk);
      if (dut.u_tr.t_vec[TRN-1] && tr_en) n_wrap++;
      if (tr_en) begin
        k++;
        hist.push_back(int'(tr_x));
        #1;
        checks++;
        if (int'(tr_y) != tr_ref(k)) begin
          failures++;
          $display("FAIL 1-D edge %0d: %0d exp %0d", k, tr_y, tr_ref(k));
        end
      end
    end
    tr_en = 0;
    tr_done = 1;
  end

  // ------------------------------------------------------------ 2-D filter
  img_t img;
  int   a_out = 0;
  bit   amf_done = 0;

  initial begin
    automatic int s = 0;
    img = make_image(W, H, 20);
    wait (rst_n);
    while (s < W * H + D) begin
      @(negedge clk);
      a_iv = 1'b1;
      a_pi = (s < W * H) ? DW'(img[s]) : DW'(0);
      @(posedge clk);
      s++;
    end
    @(negedge clk);
    a_iv = 0;
    repeat (4) @(posedge clk);
    amf_done = 1;
  end

  always @(posedge clk) begin
    if (rst_n && a_ov && a_out < W * H) begin
      automatic int cx = a_out % W, cy = a_out / W;
      automatic bit e_enl, e_rep;
      automatic int e = filter_px(img, W, H, cx, cy, e_enl, e_rep);
      checks++;
      if (int'(a_po) != e || a_enl != e_enl || a_rep != e_rep) begin
        failures++;
        if (failures < 20)
          $display("FAIL 2-D (%0d,%0d): %0d exp %0d", cx, cy, a_po, e);
      end
      if (cx < 2 || cy < 2 || cx >= W - 2 || cy >= H - 2) n_border++;
      else if (e_rep) n_rep++;
      else n_kept++;
      if (e_enl) n_enl++;
      a_out++;
    end
  end

  // ---------------------------------------------------------------- sorter
  int  expq[$];
  int  s_got = 0;
  bit  srt_done = 0;

  initial begin
    automatic int set[$];
    automatic int sent = 0;
    wait (rst_n);
    while (sent < (SETS + 1) * SN) begin
      @(negedge clk);
      if (set.size() == 0) begin
        for (int i = 0; i < SN; i++) set.push_back($urandom_range(0, 255));
        if (sent / SN < SETS) begin
          automatic int srt[$] = set;
          srt.sort();
          foreach (srt[i]) expq.push_back(srt[i]);
        end
      end
      s_iv  = ($urandom_range(0, 3) != 0);
      s_din = DW'(set[0]);
      @(posedge clk);
      if (!s_rdy) n_stall++;
      if (s_ov) begin
        n_overlap++;
        checks++;
        if (expq.size() == 0 || int'(s_dout) != expq[0]) begin
          failures++;
          $display("FAIL sorter %0d", s_dout);
        end
        if (expq.size()) void'(expq.pop_front());
        s_got++;
      end
      if (s_iv && s_rdy) begin
        void'(set.pop_front());
        sent++;
      end
    end
    @(negedge clk);
    s_iv = 0;
    srt_done = 1;
  end

  // ------------------------------------------------------------- summary
  initial begin
    #12 rst_n = 1;
    wait (tr_done && amf_done && srt_done);
    checks += 3;
    if (a_out != W * H)      begin failures++; $display("FAIL 2-D gave %0d pixels", a_out); end
    if (s_got != SETS * SN)  begin failures++; $display("FAIL sorter gave %0d words", s_got); end
    if (hist.size() < 100)   failures++;
    $display("token wraps=%0d enable gaps=%0d border=%0d kept=%0d replaced=%0d enlarged=%0d sorter stalls=%0d overlapped outputs=%0d",
             n_wrap, n_gap, n_border, n_kept, n_rep, n_enl, n_stall, n_overlap);
    checks += 8;
    if (n_wrap == 0)    begin failures++; $display("FAIL no token wrap"); end
    if (n_gap == 0)     begin failures++; $display("FAIL no enable gap"); end
    if (n_border == 0)  begin failures++; $display("FAIL no border pixel"); end
    if (n_kept == 0)    begin failures++; $display("FAIL no kept pixel"); end
    if (n_rep == 0)     begin failures++; $display("FAIL no replaced pixel"); end
    if (n_enl == 0)     begin failures++; $display("FAIL no enlarged window"); end
    if (n_stall == 0)   begin failures++; $display("FAIL no sorter stall"); end
    if (n_overlap == 0) begin failures++; $display("FAIL no overlapped unload"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
