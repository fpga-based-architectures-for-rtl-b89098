// Pipelined weighted sum of one RGB pixel: y = W_R*R + W_G*G + W_B*B + OFFSET.
//
// This is the arithmetic shared by the colour-space converter (one instance
// per output component) and the grey-level conversion of the edge
// detector. The weights are real parameters, quantised at elaboration to
// signed fixed-point words with COEF_FRAC fractional bits. The result is
// rounded to nearest and
// saturated to 0..255.
//
// Timing: a free-running 3-stage pipeline, one pixel per clock.
//   stage 1  three constant multiplications
//   stage 2  sum of the products, offset and rounding constant
//   stage 3  drop the fraction, clamp to 8 bits
// y is valid LATENCY = 3 cycles after rgb. The data path has no reset;
// the instantiating core carries valid and frame-start flags alongside.
// The weights and offsets come from the conversion equations; the
// pipeline structure, word length and rounding are this design's choices.
module rgb_weighted_sum
  import img_pkg::*;
#(
  parameter int unsigned COEF_FRAC = 12,
  parameter real         W_R       = 0.299,
  parameter real         W_G       = 0.587,
  parameter real         W_B       = 0.114,
  parameter int          OFFSET    = 16
) (
  input  logic   clk,
  input  rgb_t   rgb,
  output pixel_t y
);

  localparam int unsigned ACC_W = COEF_FRAC + 14;

  localparam int CR = coef(W_R, COEF_FRAC);
  localparam int CG = coef(W_G, COEF_FRAC);
  localparam int CB = coef(W_B, COEF_FRAC);
  // Offset and the rounding half-LSB, both in the fixed-point scale.
  localparam longint BIAS = (longint'(OFFSET) <<< COEF_FRAC) + (longint'(1) <<< (COEF_FRAC - 1));

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t pr, pg, pb;   // stage 1
  acc_t sum;          // stage 2
  acc_t whole;

  always_ff @(posedge clk) begin
    pr  <= acc_t'(signed'({1'b0, rgb.r})) * acc_t'(CR);
    pg  <= acc_t'(signed'({1'b0, rgb.g})) * acc_t'(CG);
    pb  <= acc_t'(signed'({1'b0, rgb.b})) * acc_t'(CB);
    sum <= pr + pg + pb + acc_t'(BIAS);
  end

  assign whole = sum >>> COEF_FRAC;

  always_ff @(posedge clk) begin
    if (whole < 0)        y <= '0;
    else if (whole > 255) y <= 8'hFF;
    else                  y <= pixel_t'(whole);
  end

endmodule
