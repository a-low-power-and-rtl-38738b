// amf_top: median-filtering subsystem for impulse-noise removal.
//
// Three independent engines side by side, each with its own ports:
//   - tr_median_filter: the low-power 1-D median filter (token ring, ranks
//     updated instead of samples moved), window TR_N, one sample per clock,
//     two-stage pipeline behind input register X;
//   - adaptive_median_filter: the 2-D filter that applies the 3x3 / 5x5
//     adaptive median rule to a raster pixel stream of IMG_W x IMG_H;
//   - parallel_sorter: a register-array sorter of SORT_N words with
//     overlapped load/unload.
// They share only clock and reset. No interconnection between them is
// defined, so none is made here; the sizes not given by the original
// design (widths, image size) are this design's choices.
module amf_top
  import amf_pkg::*;
#(
  parameter int unsigned DW     = PIXEL_W,
  parameter int unsigned TR_N   = 5,
  parameter int unsigned IMG_W  = 256,
  parameter int unsigned IMG_H  = 256,
  parameter int unsigned SORT_N = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // 1-D token-ring median filter
  input  logic          tr_en,
  input  logic [DW-1:0] tr_x,
  output logic [DW-1:0] tr_y,
  // 2-D adaptive median filter
  input  logic          amf_in_valid,
  input  logic [DW-1:0] amf_pix_in,
  output logic          amf_out_valid,
  output logic [DW-1:0] amf_pix_out,
  output logic          amf_out_enlarged,
  output logic          amf_out_replaced,
  // parallel sorter
  input  logic          srt_in_valid,
  output logic          srt_in_ready,
  input  logic [DW-1:0] srt_din,
  output logic          srt_out_valid,
  output logic [DW-1:0] srt_dout,
  output logic          srt_sorting
);

  tr_median_filter #(.N(TR_N), .DW(DW)) u_tr (
    .clk(clk), .rst_n(rst_n), .en(tr_en), .x_in(tr_x), .y_out(tr_y)
  );

  adaptive_median_filter #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DW(DW)) u_amf (
    .clk(clk), .rst_n(rst_n),
    .in_valid(amf_in_valid), .pix_in(amf_pix_in),
    .out_valid(amf_out_valid), .pix_out(amf_pix_out),
    .out_enlarged(amf_out_enlarged), .out_replaced(amf_out_replaced)
  );

  parallel_sorter #(.N(SORT_N), .DW(DW)) u_srt (
    .clk(clk), .rst_n(rst_n),
    .in_valid(srt_in_valid), .in_ready(srt_in_ready), .din(srt_din),
    .out_valid(srt_out_valid), .dout(srt_dout), .sorting(srt_sorting)
  );

endmodule
