// RGB to YCbCr colour-space converter, streaming, one pixel per clock.
//
//   Y  =  0.299 R + 0.587 G + 0.114 B +  16
//   Cb = -0.169 R - 0.331 G + 0.500 B + 128
//   Cr =  0.500 R - 0.419 G - 0.081 B + 128
//
// The equations, including the +16 on Y with full-range weights, and the
// port names are those of the converter this core reproduces. Each output
// component is one rgb_weighted_sum pipeline; results are rounded to
// nearest and clamped to 0..255 (the clamp matters for Y, which reaches
// 271 on white, and for Cb/Cr near saturated blue/red).
//
// Interface: pixel_in_R/G/B with fs_in (first pixel of a frame) and val_in
// (pixel valid). fs_out and val_out are the input flags delayed to line
// up with yout/Cbout/Crout.
// Timing: LATENCY = 3 cycles, throughput one pixel per cycle, no stall.
// Latency, rounding, 8-bit output width and the synchronous active-high
// reset (it clears only the flag pipeline) are this design's choices.
module csc_rgb2ycbcr
  import img_pkg::*;
#(
  parameter int unsigned COEF_FRAC = 12
) (
  input  logic   clk,
  input  logic   rst,
  input  pixel_t pixel_in_R,
  input  pixel_t pixel_in_G,
  input  pixel_t pixel_in_B,
  input  logic   fs_in,
  input  logic   val_in,
  output pixel_t yout,
  output pixel_t Cbout,
  output pixel_t Crout,
  output logic   fs_out,
  output logic   val_out
);

  localparam int unsigned LATENCY = 3;

  rgb_t rgb;
  assign rgb = '{r: pixel_in_R, g: pixel_in_G, b: pixel_in_B};

  rgb_weighted_sum #(.COEF_FRAC(COEF_FRAC), .W_R(Y_R),  .W_G(Y_G),  .W_B(Y_B),  .OFFSET(Y_OFS))
    u_y  (.clk, .rgb, .y(yout));
  rgb_weighted_sum #(.COEF_FRAC(COEF_FRAC), .W_R(CB_R), .W_G(CB_G), .W_B(CB_B), .OFFSET(C_OFS))
    u_cb (.clk, .rgb, .y(Cbout));
  rgb_weighted_sum #(.COEF_FRAC(COEF_FRAC), .W_R(CR_R), .W_G(CR_G), .W_B(CR_B), .OFFSET(C_OFS))
    u_cr (.clk, .rgb, .y(Crout));

  logic [LATENCY-1:0] fs_d, val_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      fs_d  <= '0;
      val_d <= '0;
    end else begin
      fs_d  <= {fs_d[LATENCY-2:0],  fs_in & val_in};
      val_d <= {val_d[LATENCY-2:0], val_in};
    end
  end

  assign fs_out  = fs_d[LATENCY-1];
  assign val_out = val_d[LATENCY-1];

endmodule
