// Sobel gradient magnitude of one 3x3 window.
//
//        | +1  0 -1 |            | +1 +2 +1 |
//   Gx = | +2  0 -2 | * I   Gy = |  0  0  0 | * I   G = |Gx| + |Gy|
//        | +1  0 -1 |            | -1 -2 -1 |
//
// The kernels and the |Gx|+|Gy| magnitude are those of the edge detector
// this core reproduces. G ranges 0..2040 and is clamped to 255 to fit the
// 8-bit output (this design's choice). zero forces the result to 0; the
// edge detector uses it for pixels on the image border.
//
// Interface: win[row][col], row 0 is the upper line, col 0 the left column.
// Timing: free-running 2-stage pipeline, mag is the result for the win
// and zero presented 2 cycles earlier; one window per cycle.
module sobel_kernel
  import img_pkg::*;
(
  input  logic                 clk,
  input  pixel_t [2:0][2:0]    win,
  input  logic                 zero,
  output pixel_t               mag
);

  typedef logic signed [11:0] grad_t;

  function automatic grad_t px(pixel_t p);
    return grad_t'({1'b0, p});
  endfunction

  grad_t gx, gy, ax, ay;
  logic  zero_q;
  logic [12:0] g;

  always_ff @(posedge clk) begin
    gx <= (px(win[0][0]) + 2 * px(win[1][0]) + px(win[2][0]))
        - (px(win[0][2]) + 2 * px(win[1][2]) + px(win[2][2]));
    gy <= (px(win[0][0]) + 2 * px(win[0][1]) + px(win[0][2]))
        - (px(win[2][0]) + 2 * px(win[2][1]) + px(win[2][2]));
    zero_q <= zero;
  end

  assign ax = (gx < 0) ? -gx : gx;
  assign ay = (gy < 0) ? -gy : gy;
  assign g  = 13'(ax) + 13'(ay);

  always_ff @(posedge clk) begin
    if (zero_q)        mag <= '0;
    else if (g > 255)  mag <= 8'hFF;
    else               mag <= pixel_t'(g);
  end

endmodule
