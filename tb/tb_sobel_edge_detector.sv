// Self-checking test of sobel_edge_detector on 12 x 8 RGB frames.
//
// Two random colour frames (the second with strong vertical colour
// edges) are streamed, the first with random idle cycles. The expected
// output is built here from whole frames: each pixel's grey level (the
// fixed-point intensity, checked against the double-precision equation
// to within one code), then the Sobel magnitude. Output order, frame
// length, fs_out and the 7-cycle latency after input k+W+1 are checked.
module tb_sobel_edge_detector;
  import img_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 12, H = 8, NF = 2, NPIX = W * H;

  logic   clk = 1'b0, rst = 1'b1;
  pixel_t r_in = '0, g_in = '0, b_in = '0, pixel_out;
  logic   fs_in = 1'b0, val_in = 1'b0, fs_out, val_out;
  int     checks = 0, failures = 0, cycle = 0;
  rgb_t   src[NF][NPIX];
  int     gimg[NF][];
  int     t_in[NF][NPIX];
  int     out_f = -1, out_k = 0, n_clamp = 0, n_edge = 0;

  sobel_edge_detector #(.IMG_WIDTH(W), .IMG_HEIGHT(H)) dut (
    .clk, .rst, .pixel_in_R(r_in), .pixel_in_G(g_in), .pixel_in_B(b_in),
    .fs_in, .val_in, .pixel_out, .fs_out, .val_out
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL: %s", msg);
  endtask

  always @(posedge clk) begin
    #1;
    if (!rst && val_out) begin
      int e;
      if (fs_out) begin
        if (out_f >= 0) begin checks++; if (out_k != NPIX) fail("short frame"); end
        out_f++; out_k = 0;
      end
      if (out_f < 0 || out_f >= NF) fail("output outside a frame");
      else begin
        e = sobel_ref(gimg[out_f], W, H, out_k / W, out_k % W);
        checks++;
        if (int'(pixel_out) != e) fail($sformatf("f%0d k%0d: %0d expected %0d", out_f, out_k, pixel_out, e));
        if (out_k + W + 1 < NPIX) begin
          checks++;
          if (cycle - t_in[out_f][out_k + W + 1] != 6) fail($sformatf("latency %0d", cycle - t_in[out_f][out_k + W + 1] + 1));
        end
        if (e == 255) n_clamp++;
        if (e > 0)    n_edge++;
        out_k++;
      end
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      gimg[f] = new[NPIX];
      for (int k = 0; k < NPIX; k++) begin
        if (f == 1) src[f][k] = ((k % W) < W / 2) ? rgb_t'(24'h102030) : rgb_t'(24'hF0E0D0);
        else        src[f][k] = rgb_t'($urandom);
        gimg[f][k] = gray_fixed(int'(src[f][k].r), int'(src[f][k].g), int'(src[f][k].b), 12);
        checks++;
        if (!near(gimg[f][k], round_clamp(i_real(int'(src[f][k].r), int'(src[f][k].g), int'(src[f][k].b)))))
          fail("grey model off the equation");
      end
    end
    repeat (3) @(posedge clk);
    #2 rst = 0;
    for (int f = 0; f < NF; f++) begin
      for (int k = 0; k < NPIX; k++) begin
        while (f == 0 && k != 0 && $urandom_range(3) == 0) begin
          val_in = 0; fs_in = 0;
          @(posedge clk); #2;
        end
        {r_in, g_in, b_in} = src[f][k]; val_in = 1; fs_in = (k == 0);
        @(posedge clk); #2;
        t_in[f][k] = cycle;
      end
      val_in = 0; fs_in = 0;
      repeat (5) @(posedge clk); #2;
    end
    repeat (W + 20) @(posedge clk);
    checks++; if (out_f != NF - 1 || out_k != NPIX) fail($sformatf("ended at frame %0d pixel %0d", out_f, out_k));
    checks++; if (n_clamp == 0 || n_edge == 0) fail("no edges / clamps");
    $display("edges=%0d clamps=%0d", n_edge, n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
