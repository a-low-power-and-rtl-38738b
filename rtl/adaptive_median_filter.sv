// adaptive_median_filter: 2-D adaptive median filter for impulse noise.
//
// For every pixel z of a greyscale image the filter looks at the 3x3 window
// around it. A value is treated as an impulse when it equals the minimum or
// the maximum of the window.
//   - If the 3x3 median is not an impulse, z is kept unless z itself is an
//     impulse, in which case it is replaced by the median.
//   - If the 3x3 median is an impulse, the window is enlarged to 5x5 and the
//     same test is repeated there. If the 5x5 median is still an impulse,
//     the largest window is reached and the 5x5 median is output.
// The document gives the rule "enlarge the window while the median is an
// impulse, otherwise keep z unless it is an impulse"; the impulse test
// (equal to window min or max), the two window sizes 3 and 5 and the
// output at the largest window are this design's choices, following the
// usual form of the adaptive median filter.
//
// Pixels closer than two pixels to an image edge, where the 5x5 window does
// not fit, are passed through unchanged (this design's choice).
//
// Interface: a continuous raster-order pixel stream, frame after frame, one
// pixel per in_valid cycle, no back-pressure; the first pixel after reset
// is the top-left pixel of a frame. The output for the pixel taken in
// 2*IMG_W+2 valid pixels earlier (the window centre) appears two clock
// cycles after the in_valid cycle that completes its window, with out_valid.
// Output pixels are therefore in raster order, starting with the top-left
// pixel of the first frame; the last 2*IMG_W+2 outputs of a frame come out
// while the next frame (or any filler) is streamed in.
// out_enlarged marks outputs that needed the 5x5 window, out_replaced
// outputs where the centre pixel was replaced by a median.
module adaptive_median_filter
  import amf_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  parameter int unsigned DW    = PIXEL_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] pix_in,
  output logic          out_valid,
  output logic [DW-1:0] pix_out,
  output logic          out_enlarged,   // 5x5 window was used
  output logic          out_replaced    // centre pixel replaced by a median
);

  localparam int unsigned SMAX  = 5;
  localparam int unsigned HALF  = SMAX / 2;
  localparam int unsigned DELAY = HALF * IMG_W + HALF;   // centre lag in pixels
  localparam int unsigned XW    = $clog2(IMG_W);
  localparam int unsigned YW    = $clog2(IMG_H);
  localparam int unsigned CW    = $clog2(DELAY + 1);

  // ---------------------------------------------------------------- window
  logic [SMAX-1:0][SMAX-1:0][DW-1:0] win;

  window_gen #(.K(SMAX), .IMG_W(IMG_W), .DW(DW)) u_win (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pix_in(pix_in), .win(win)
  );

  // ------------------------------------------------ centre position tracking
  logic [CW-1:0] fill_cnt;     // pixels taken in, saturating at DELAY
  logic [XW-1:0] cx;
  logic [YW-1:0] cy;
  logic          v0;           // window registers hold a complete window
                               // (the first one is formed by the pixel
                               // that arrives when fill_cnt == DELAY)
  logic          border0;      // that window's centre is a border pixel

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_cnt <= '0;
      cx       <= '0;
      cy       <= '0;
      v0       <= 1'b0;
      border0  <= 1'b0;
    end else begin
      v0 <= 1'b0;
      if (in_valid) begin
        if (fill_cnt != CW'(DELAY)) begin
          fill_cnt <= fill_cnt + CW'(1);
        end else begin
          v0      <= 1'b1;
          border0 <= (cx < XW'(HALF)) || (cx >= XW'(IMG_W - HALF)) ||
                     (cy < YW'(HALF)) || (cy >= YW'(IMG_H - HALF));
          if (cx == XW'(IMG_W - 1)) begin
            cx <= '0;
            cy <= (cy == YW'(IMG_H - 1)) ? '0 : cy + YW'(1);
          end else begin
            cx <= cx + XW'(1);
          end
        end
      end
    end
  end

  // ------------------------------------------------------ order statistics
  logic [8:0][DW-1:0]  w3;
  logic [24:0][DW-1:0] w5;
  logic [DW-1:0] min3, med3, max3, min5, med5, max5;

  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        w3[r*3 + c] = win[r+1][c+1];
    for (int r = 0; r < SMAX; r++)
      for (int c = 0; c < SMAX; c++)
        w5[r*SMAX + c] = win[r][c];
  end

  order_stat #(.N(9),  .DW(DW)) u_os3 (.d(w3), .vmin(min3), .vmed(med3), .vmax(max3));
  order_stat #(.N(25), .DW(DW)) u_os5 (.d(w5), .vmin(min5), .vmed(med5), .vmax(max5));

  // Stage 1: register the statistics.
  logic          v1, border1;
  logic [DW-1:0] z1, min3_q, med3_q, max3_q, min5_q, med5_q, max5_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      border1 <= 1'b0;
      {z1, min3_q, med3_q, max3_q, min5_q, med5_q, max5_q} <= '0;
    end else begin
      v1 <= v0;
      if (v0) begin
        border1 <= border0;
        z1      <= win[HALF][HALF];
        min3_q  <= min3;  med3_q <= med3;  max3_q <= max3;
        min5_q  <= min5;  med5_q <= med5;  max5_q <= max5;
      end
    end
  end

  // Stage 2: adaptive decision.
  logic          enl, rep;
  logic [DW-1:0] res;

  always_comb begin
    enl = 1'b0;
    rep = 1'b0;
    res = z1;
    if (!border1) begin
      if ((min3_q < med3_q) && (med3_q < max3_q)) begin
        if (!((min3_q < z1) && (z1 < max3_q))) begin
          res = med3_q;
          rep = 1'b1;
        end
      end else begin
        enl = 1'b1;
        if ((min5_q < med5_q) && (med5_q < max5_q)) begin
          if (!((min5_q < z1) && (z1 < max5_q))) begin
            res = med5_q;
            rep = 1'b1;
          end
        end else begin
          res = med5_q;
          rep = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      pix_out      <= '0;
      out_enlarged <= 1'b0;
      out_replaced <= 1'b0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        pix_out      <= res;
        out_enlarged <= enl;
        out_replaced <= rep;
      end
    end
  end

endmodule
