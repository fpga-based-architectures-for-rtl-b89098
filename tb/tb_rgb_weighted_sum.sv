// Self-checking test of rgb_weighted_sum with the luma weights and offset
// 16: random and corner pixels, one per cycle; every result is compared
// with the double-precision value (within one code) 3 cycles later, and
// a clamp above 255 must occur.
module tb_rgb_weighted_sum;
  import img_pkg::*;
  import tb_ref_pkg::*;

  localparam int LATENCY = 3;
  localparam int N = 2000;

  logic   clk = 1'b0;
  rgb_t   rgb;
  pixel_t y;
  int     checks = 0, failures = 0, exact = 0, clamps = 0;

  rgb_weighted_sum #(.COEF_FRAC(12), .W_R(0.299), .W_G(0.587), .W_B(0.114), .OFFSET(16)) dut (.clk, .rgb, .y);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rgb_t hist[$];

  initial begin
    for (int i = 0; i < N + LATENCY - 1; i++) begin
      if (i < 8)       rgb = '{r: (i % 2 == 1) ? 8'hFF : 8'h00, g: ((i / 2) % 2 == 1) ? 8'hFF : 8'h00, b: (i >= 4) ? 8'hFF : 8'h00};
      else             rgb = rgb_t'($urandom);
      hist.push_back(rgb);
      @(posedge clk);
      #1;
      if (i >= LATENCY - 1) begin
        rgb_t p;
        int exp_v;
        // the pixel driven LATENCY cycles ago (this edge is the 3rd to see it)
        p = hist[i - LATENCY + 1];
        exp_v = round_clamp(y_real(int'(p.r), int'(p.g), int'(p.b)));
        checks++;
        if (!near(int'(y), exp_v)) begin
          failures++;
          if (failures < 10) $display("mismatch: rgb=%h y=%0d exp=%0d", p, y, exp_v);
        end
        if (int'(y) == exp_v) exact++;
        if (y_real(int'(p.r), int'(p.g), int'(p.b)) > 255.5) clamps++;
      end
    end
    checks++;
    if (clamps == 0) failures++;
    checks++;
    if (exact < (N * 9) / 10) begin
      failures++;
      $display("only %0d of %0d exact", exact, N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
