// window_gen: sliding K x K pixel window over a raster-order pixel stream.
//
// Built as in the document's 3x3 window figure, generalised to K rows: the
// input stream runs through K neighbourhood registers, then through a row
// buffer of length IMG_W - K into the next row of K registers, and so on.
// The delay from one row of registers to the next is therefore exactly one
// image line. win[r][c] is the pixel r lines and c pixels before the
// newest one: win[0][0] is the pixel just taken in, win[K/2][K/2] the
// window centre. Near the left/right image edges a window wraps into the
// neighbouring line; the consumer must treat such windows as borders.
// Everything advances only on cycles with in_valid; the window is updated
// on the clock edge that takes in the pixel. Registers reset to zero, the
// row-buffer memories do not.
module window_gen #(
  parameter int unsigned K     = 3,     // window size (document: 3)
  parameter int unsigned IMG_W = 256,   // image width in pixels
  parameter int unsigned DW    = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [DW-1:0]             pix_in,
  output logic [K-1:0][K-1:0][DW-1:0] win
);

  logic [K-1:0][DW-1:0] row_in;   // input of the first register of each row

  assign row_in[0] = pix_in;

  for (genvar r = 1; r < K; r++) begin : g_rowbuf
    line_buffer #(.LEN(IMG_W - K), .DW(DW)) u_lb (
      .clk(clk), .rst_n(rst_n), .en(in_valid),
      .din(win[r-1][K-1]), .dout(row_in[r])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win <= '0;
    end else if (in_valid) begin
      for (int r = 0; r < K; r++) begin
        win[r][0] <= row_in[r];
        for (int c = 1; c < K; c++) win[r][c] <= win[r][c-1];
      end
    end
  end

endmodule
