// Sobel edge detector core: RGB pixel stream in, edge magnitude stream out.
//
// rgb2gray reduces each pixel to its intensity
//   I = 0.2989 R + 0.5870 G + 0.1140 B,
// and sobel_core applies the two 3x3 Sobel kernels to the intensity image
// and outputs G = |Gx| + |Gy|, clamped to 255, with border pixels 0.
// Port names and the grey-level, kernel and magnitude equations follow
// the source design; the gradient orientation it also defines has no
// output port there and is not computed here.
//
// Interface: pixel_in_R/G/B, fs_in (first pixel of a frame), val_in
// (pixel valid); pixel_out, fs_out, val_out. One pixel per clock at most,
// raster order, IMG_WIDTH x IMG_HEIGHT per frame.
// Timing: output pixel k leaves 7 cycles after input pixel
// k + IMG_WIDTH + 1 entered (3 for the grey-level conversion, 4 in the
// Sobel core); the last IMG_WIDTH + 1 border pixels of a frame follow the
// last input pixel without further input. Synchronous active-high reset.
module sobel_edge_detector
  import img_pkg::*;
#(
  parameter int unsigned IMG_WIDTH  = 512,
  parameter int unsigned IMG_HEIGHT = 512,
  parameter int unsigned COEF_FRAC  = 12
) (
  input  logic   clk,
  input  logic   rst,
  input  pixel_t pixel_in_R,
  input  pixel_t pixel_in_G,
  input  pixel_t pixel_in_B,
  input  logic   fs_in,
  input  logic   val_in,
  output pixel_t pixel_out,
  output logic   fs_out,
  output logic   val_out
);

  pixel_t gray;
  logic   g_fs, g_val;

  rgb2gray #(.COEF_FRAC(COEF_FRAC)) u_gray (
    .clk, .rst,
    .rgb('{r: pixel_in_R, g: pixel_in_G, b: pixel_in_B}),
    .fs_in, .val_in,
    .gray, .fs_out(g_fs), .val_out(g_val)
  );

  sobel_core #(.IMG_WIDTH(IMG_WIDTH), .IMG_HEIGHT(IMG_HEIGHT)) u_core (
    .clk, .rst,
    .gray_in(gray), .fs_in(g_fs), .val_in(g_val),
    .pixel_out, .fs_out, .val_out
  );

endmodule
