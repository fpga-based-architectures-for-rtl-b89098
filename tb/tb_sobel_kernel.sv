// Self-checking test of sobel_kernel: random windows (some uniform, some
// with hard edges that exceed 255) applied one per cycle; each magnitude
// is compared with |Gx| + |Gy| computed here, clamped to 255, two cycles
// later; zero must force 0.
module tb_sobel_kernel;
  import img_pkg::*;

  localparam int N = 3000;

  logic              clk = 1'b0;
  pixel_t [2:0][2:0] win;
  logic              zero;
  pixel_t            mag;
  int                checks = 0, failures = 0, clamps = 0, zeros = 0;
  int                exp_q[$];

  sobel_kernel dut (.clk, .win, .zero, .mag);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_mag(pixel_t [2:0][2:0] w, logic z);
    int k[3][3];
    int gx, gy;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) k[r][c] = int'(w[r][c]);
    gx = (k[0][0] + 2*k[1][0] + k[2][0]) - (k[0][2] + 2*k[1][2] + k[2][2]);
    gy = (k[0][0] + 2*k[0][1] + k[0][2]) - (k[2][0] + 2*k[2][1] + k[2][2]);
    if (z) return 0;
    gx = gx < 0 ? -gx : gx;
    gy = gy < 0 ? -gy : gy;
    return (gx + gy > 255) ? 255 : gx + gy;
  endfunction

  initial begin
    for (int i = 0; i < N + 2; i++) begin
      automatic int mode = $urandom_range(3);
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          case (mode)
            0: win[r][c] = pixel_t'(i);                          // uniform
            1: win[r][c] = (c == 0) ? 8'hFF : 8'h00;             // vertical edge
            2: win[r][c] = pixel_t'($urandom_range(20) + 100);   // weak texture
            default: win[r][c] = pixel_t'($urandom);
          endcase
      zero = ($urandom_range(9) == 0);
      exp_q.push_back(ref_mag(win, zero));
      @(posedge clk); #1;
      if (i >= 1) begin
        // window presented before edge i-1 is visible after edge i
        automatic int e = exp_q.pop_front();
        checks++;
        if (int'(mag) != e) begin
          failures++;
          if (failures < 10) $display("mag %0d expected %0d", mag, e);
        end
        if (e == 255) clamps++;
      end
      if (zero) zeros++;
    end
    checks++; if (clamps == 0 || zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
