// Self-checking test of sobel_core on 8 x 6 frames.
//
// Three random grey frames are streamed: the first with random idle
// cycles, the second straight after it with no gap, the third after a
// pause. Every output pixel is compared with a whole-frame Sobel
// reference (border 0, clamp 255), frames are delimited by fs_out and
// must hold exactly W*H pixels, regular outputs must leave 4 cycles after
// input k+W+1, and the flushed tail must follow the last input pixel
// within W+1+4 cycles. Borders, clamping, flushes, gaps and a
// back-to-back frame must all occur.
module tb_sobel_core;
  import img_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 8, H = 6, NF = 3, NPIX = W * H;

  logic   clk = 1'b0, rst = 1'b1;
  pixel_t gray_in = '0, pixel_out;
  logic   fs_in = 1'b0, val_in = 1'b0, fs_out, val_out;
  int     checks = 0, failures = 0, cycle = 0;
  int     img[NF][];
  int     t_in[NF][NPIX];
  int     out_f = -1, out_k = 0;
  int     n_border = 0, n_clamp = 0, n_flush = 0, n_gap = 0, n_b2b = 0;

  sobel_core #(.IMG_WIDTH(W), .IMG_HEIGHT(H)) dut (
    .clk, .rst, .gray_in, .fs_in, .val_in, .pixel_out, .fs_out, .val_out
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

  // monitor
  always @(posedge clk) begin
    #1;
    if (!rst && val_out) begin
      int r, c, e;
      if (fs_out) begin
        if (out_f >= 0) begin
          checks++;
          if (out_k != NPIX) fail($sformatf("frame %0d had %0d pixels", out_f, out_k));
        end
        out_f++;
        out_k = 0;
      end
      if (out_f < 0 || out_f >= NF) fail("output outside a frame");
      else begin
        r = out_k / W; c = out_k % W;
        e = sobel_ref(img[out_f], W, H, r, c);
        checks++;
        if (int'(pixel_out) != e) fail($sformatf("f%0d (%0d,%0d): %0d expected %0d", out_f, r, c, pixel_out, e));
        if (out_k + W + 1 < NPIX) begin
          checks++;
          if (cycle - t_in[out_f][out_k + W + 1] != 3)
            fail($sformatf("latency of pixel %0d: %0d", out_k, cycle - t_in[out_f][out_k + W + 1]));
        end else begin
          n_flush++;
          checks++;
          if (cycle - t_in[out_f][NPIX - 1] > W + 1 + 3) fail("flush too slow");
        end
        if (r == 0 || c == 0 || r == H - 1 || c == W - 1) n_border++;
        if (e == 255) n_clamp++;
        out_k++;
      end
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      img[f] = new[NPIX];
      foreach (img[f][k]) img[f][k] = (f == 1) ? ((k % W < W / 2) ? 20 : 230) + $urandom_range(5) : $urandom_range(255);
    end
    repeat (3) @(posedge clk);
    #2 rst = 0;
    for (int f = 0; f < NF; f++) begin
      if (f == 2) begin val_in = 0; repeat (30) @(posedge clk); #2; end
      if (f == 1) n_b2b++;
      for (int k = 0; k < NPIX; k++) begin
        while (f != 1 && k != 0 && $urandom_range(3) == 0) begin
          val_in = 0; fs_in = 0; gray_in = pixel_t'($urandom);
          n_gap++;
          @(posedge clk); #2;
        end
        gray_in = pixel_t'(img[f][k]); val_in = 1; fs_in = (k == 0);
        @(posedge clk); #2;
        t_in[f][k] = cycle;
      end
    end
    val_in = 0; fs_in = 0;
    repeat (W + 20) @(posedge clk);
    checks++;
    if (out_f != NF - 1 || out_k != NPIX) fail($sformatf("ended at frame %0d pixel %0d", out_f, out_k));
    checks++; if (n_border == 0) fail("no border pixel");
    checks++; if (n_clamp == 0)  fail("no clamped magnitude");
    checks++; if (n_flush != NF * (W + 1)) fail($sformatf("flushed %0d", n_flush));
    checks++; if (n_gap == 0)    fail("no input gap");
    checks++; if (n_b2b == 0)    fail("no back-to-back frame");
    $display("border=%0d clamp=%0d flush=%0d gaps=%0d b2b=%0d", n_border, n_clamp, n_flush, n_gap, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
