// Two-line delay buffer that turns a raster pixel stream into columns of
// three vertically adjacent pixels, as a 3x3 neighbourhood operator needs.
//
// Two memories of IMG_WIDTH pixels, both addressed by the column of the
// incoming pixel. On each write the pixel stored one line ago at that
// column moves from the first memory to the second and the new pixel takes
// its place, so the two memories always hold the two most recent lines.
//
// Interface: wr_en pushes pix_in at column col. One cycle later top, mid
// and bot hold the pixels two lines above, one line above and at the
// written position (bot is pix_in, registered). Outputs hold their value
// while wr_en is low. Memory contents are not reset: the first two lines
// of a frame read stale data, which the edge detector discards because
// those outputs fall on the image border.
// The structure is this design's own; the source only implies that two
// lines of storage exist by using 3x3 kernels on a pixel stream.
module line_buffer
  import img_pkg::*;
#(
  parameter int unsigned IMG_WIDTH = 512,
  localparam int unsigned COL_W = (IMG_WIDTH > 1) ? $clog2(IMG_WIDTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [COL_W-1:0] col,
  input  pixel_t           pix_in,
  output pixel_t           top,
  output pixel_t           mid,
  output pixel_t           bot
);

  pixel_t line1 [IMG_WIDTH];   // one line above
  pixel_t line2 [IMG_WIDTH];   // two lines above

  always_ff @(posedge clk) begin
    if (wr_en) begin
      top        <= line2[col];
      mid        <= line1[col];
      bot        <= pix_in;
      line2[col] <= line1[col];
      line1[col] <= pix_in;
    end
  end

endmodule
