// Grey-level conversion for the edge detector, streaming, one pixel/clock.
//
//   I = 0.2989 R + 0.5870 G + 0.1140 B
//
// One rgb_weighted_sum pipeline (offset 0), rounded to nearest and clamped
// to 0..255. The weights are those of the intensity equation the edge
// detector is built on; the word length (COEF_FRAC fractional bits),
// rounding, latency and the reset of the flag pipeline are this design's
// choices.
//
// Interface: rgb with fs_in/val_in in; gray with fs_out/val_out out.
// Timing: LATENCY = 3 cycles, one pixel per cycle.
module rgb2gray
  import img_pkg::*;
#(
  parameter int unsigned COEF_FRAC = 12
) (
  input  logic   clk,
  input  logic   rst,
  input  rgb_t   rgb,
  input  logic   fs_in,
  input  logic   val_in,
  output pixel_t gray,
  output logic   fs_out,
  output logic   val_out
);

  localparam int unsigned LATENCY = 3;

  rgb_weighted_sum #(.COEF_FRAC(COEF_FRAC), .W_R(I_R), .W_G(I_G), .W_B(I_B), .OFFSET(0))
    u_sum (.clk, .rgb, .y(gray));

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
