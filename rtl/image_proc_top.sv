// Two streaming image-processing accelerators side by side.
//
// csc:   RGB to YCbCr colour-space converter (csc_rgb2ycbcr).
// sobel: Sobel edge detector (sobel_edge_detector).
// The two are independent designs; they share only clock and reset, and
// each has its own pixel stream in and out: R, G, B (or Y, Cb, Cr, or the
// edge magnitude) with a frame-start flag fs and a valid flag val. See the
// two cores for equations and timing (CSC: 3 cycles; Sobel: one image
// line plus 8 cycles, one pixel per clock for both).
module image_proc_top
  import img_pkg::*;
#(
  parameter int unsigned IMG_WIDTH  = 512,
  parameter int unsigned IMG_HEIGHT = 512,
  parameter int unsigned COEF_FRAC  = 12
) (
  input  logic   clk,
  input  logic   rst,
  // colour-space converter
  input  rgb_t   csc_pixel_in,
  input  logic   csc_fs_in,
  input  logic   csc_val_in,
  output ycbcr_t csc_pixel_out,
  output logic   csc_fs_out,
  output logic   csc_val_out,
  // edge detector
  input  rgb_t   sobel_pixel_in,
  input  logic   sobel_fs_in,
  input  logic   sobel_val_in,
  output pixel_t sobel_pixel_out,
  output logic   sobel_fs_out,
  output logic   sobel_val_out
);

  csc_rgb2ycbcr #(.COEF_FRAC(COEF_FRAC)) u_csc (
    .clk, .rst,
    .pixel_in_R(csc_pixel_in.r), .pixel_in_G(csc_pixel_in.g), .pixel_in_B(csc_pixel_in.b),
    .fs_in(csc_fs_in), .val_in(csc_val_in),
    .yout(csc_pixel_out.y), .Cbout(csc_pixel_out.cb), .Crout(csc_pixel_out.cr),
    .fs_out(csc_fs_out), .val_out(csc_val_out)
  );

  sobel_edge_detector #(.IMG_WIDTH(IMG_WIDTH), .IMG_HEIGHT(IMG_HEIGHT), .COEF_FRAC(COEF_FRAC)) u_sobel (
    .clk, .rst,
    .pixel_in_R(sobel_pixel_in.r), .pixel_in_G(sobel_pixel_in.g), .pixel_in_B(sobel_pixel_in.b),
    .fs_in(sobel_fs_in), .val_in(sobel_val_in),
    .pixel_out(sobel_pixel_out), .fs_out(sobel_fs_out), .val_out(sobel_val_out)
  );

endmodule
