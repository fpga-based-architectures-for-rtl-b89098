// Shared types and constants of the two streaming image cores.
//
// Both cores move one pixel per clock cycle as 8-bit unsigned samples,
// flagged by a frame-start bit (fs) and a valid bit (val). The colour
// weights are the real numbers of the colour-space and grey-level
// equations; coef() turns each into a signed fixed-point integer with
// COEF_FRAC fractional bits, rounded to nearest. The word length is this
// design's choice; the weights themselves are the standard ones.
package img_pkg;

  typedef logic [7:0] pixel_t;

  typedef struct packed {
    pixel_t r;
    pixel_t g;
    pixel_t b;
  } rgb_t;

  typedef struct packed {
    pixel_t y;
    pixel_t cb;
    pixel_t cr;
  } ycbcr_t;

  // Real weight -> signed fixed-point integer, rounded to nearest.
  function automatic int coef(real w, int unsigned frac);
    real s;
    s = w * (2.0 ** frac);
    return (s >= 0.0) ? int'($floor(s + 0.5)) : -int'($floor(-s + 0.5));
  endfunction

  // Colour-space conversion weights (Y, Cb, Cr rows; R, G, B columns).
  localparam real Y_R  =  0.299, Y_G  =  0.587, Y_B  =  0.114;
  localparam real CB_R = -0.169, CB_G = -0.331, CB_B =  0.5;
  localparam real CR_R =  0.5,   CR_G = -0.419, CR_B = -0.081;
  localparam int  Y_OFS = 16, C_OFS = 128;

  // Grey-level (intensity) weights.
  localparam real I_R = 0.2989, I_G = 0.5870, I_B = 0.1140;

endpackage
