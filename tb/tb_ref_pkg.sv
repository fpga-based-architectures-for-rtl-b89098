// Reference models for the image-core testbenches.
//
// Written independently of the RTL: the colour equations are evaluated in
// double precision (clamp(round(x)) is the ideal 8-bit result, and the
// fixed-point RTL may differ from it by one code near a rounding tie), and
// the Sobel reference works on whole frames held in arrays, indexing the
// 3x3 neighbourhood directly instead of streaming through line memories.
package tb_ref_pkg;

  function automatic int clamp8(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic int round_clamp(real x);
    return clamp8(int'($floor(x + 0.5)));
  endfunction

  // Ideal colour-space results.
  function automatic real y_real (int r, int g, int b); return  0.299*r + 0.587*g + 0.114*b + 16.0;  endfunction
  function automatic real cb_real(int r, int g, int b); return -0.169*r - 0.331*g + 0.5*b   + 128.0; endfunction
  function automatic real cr_real(int r, int g, int b); return  0.5*r   - 0.419*g - 0.081*b + 128.0; endfunction
  function automatic real i_real (int r, int g, int b); return  0.2989*r + 0.5870*g + 0.1140*b;      endfunction

  // |a - b| <= 1
  function automatic bit near(int a, int b);
    return (a - b <= 1) && (b - a <= 1);
  endfunction

  // Sobel magnitude at (r, c) of a frame stored row-major in img (width w,
  // height h); 0 on the border, clamped to 255.
  function automatic int sobel_ref(const ref int img[], input int w, input int h, input int r, input int c);
    int gx, gy, ax, ay;
    if (r == 0 || c == 0 || r == h - 1 || c == w - 1) return 0;
    gx = img[(r-1)*w + c-1] + 2*img[r*w + c-1] + img[(r+1)*w + c-1]
       - img[(r-1)*w + c+1] - 2*img[r*w + c+1] - img[(r+1)*w + c+1];
    gy = img[(r-1)*w + c-1] + 2*img[(r-1)*w + c] + img[(r-1)*w + c+1]
       - img[(r+1)*w + c-1] - 2*img[(r+1)*w + c] - img[(r+1)*w + c+1];
    ax = gx < 0 ? -gx : gx;
    ay = gy < 0 ? -gy : gy;
    return clamp8(ax + ay);
  endfunction

  // Grey level as the edge detector computes it: weights rounded to
  // 'frac' fractional bits, sum rounded half-up, clamped to 0..255.
  function automatic int gray_fixed(int r, int g, int b, int frac);
    longint s;
    int     q;
    s = longint'($floor(0.2989 * (2.0 ** frac) + 0.5)) * r
      + longint'($floor(0.5870 * (2.0 ** frac) + 0.5)) * g
      + longint'($floor(0.1140 * (2.0 ** frac) + 0.5)) * b
      + (longint'(1) << (frac - 1));
    q = int'(s >>> frac);
    return clamp8(q);
  endfunction

endpackage
