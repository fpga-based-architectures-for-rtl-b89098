// Shared body of the image_proc_top testbenches. The including module
// declares W, H (frame size the top was built for), NF (frames), GAPS
// (random idle cycles on the first frame), CHECK_MECH (require every
// mechanism to occur) and instantiates the top as `dut`.
//
// Both cores are fed at the same time from the same frames: the colour
// converter's every output is checked against the double-precision colour
// equations (within one code) with its 3-cycle latency; the edge
// detector's output frames are checked pixel by pixel against a
// whole-frame grey-level plus Sobel reference with its latency of
// W+1 pixels plus 7 cycles, and the flushed tail of each frame.

  logic   clk = 1'b0, rst = 1'b1;
  rgb_t   csc_pixel_in = '0, sobel_pixel_in = '0;
  logic   csc_fs_in = 1'b0, csc_val_in = 1'b0, sobel_fs_in = 1'b0, sobel_val_in = 1'b0;
  ycbcr_t csc_pixel_out;
  pixel_t sobel_pixel_out;
  logic   csc_fs_out, csc_val_out, sobel_fs_out, sobel_val_out;

  localparam int NPIX = W * H;

  int   checks = 0, failures = 0, cycle = 0;
  rgb_t src[NF][];
  int   gimg[NF][];
  int   t_in[NF][];
  int   out_f = -1, out_k = 0;
  int   n_csc = 0, n_csc_clamp = 0, n_sob_clamp = 0, n_border = 0, n_flush = 0, n_gap = 0, n_b2b = 0;

  typedef struct { rgb_t p; int t; bit fs; } csc_item_t;
  csc_item_t csc_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL: %s", msg);
  endtask

  // colour-space converter monitor
  always @(posedge clk) begin
    #1;
    if (!rst && csc_val_out) begin
      csc_item_t it;
      int r, g, b;
      if (csc_q.size() == 0) fail("unexpected CSC output");
      else begin
        it = csc_q.pop_front();
        r = int'(it.p.r); g = int'(it.p.g); b = int'(it.p.b);
        checks += 5;
        if (!near(int'(csc_pixel_out.y),  round_clamp(y_real(r, g, b))))  fail($sformatf("Y for %h", it.p));
        if (!near(int'(csc_pixel_out.cb), round_clamp(cb_real(r, g, b)))) fail($sformatf("Cb for %h", it.p));
        if (!near(int'(csc_pixel_out.cr), round_clamp(cr_real(r, g, b)))) fail($sformatf("Cr for %h", it.p));
        if (cycle - it.t != 2) fail("CSC latency");
        if (csc_fs_out != it.fs) fail("CSC fs_out");
        if (y_real(r, g, b) > 255.4 || cb_real(r, g, b) > 255.4 || cr_real(r, g, b) > 255.4) n_csc_clamp++;
        n_csc++;
      end
    end
  end

  // edge detector monitor
  always @(posedge clk) begin
    #1;
    if (!rst && sobel_val_out) begin
      int e, r, c;
      if (sobel_fs_out) begin
        if (out_f >= 0) begin checks++; if (out_k != NPIX) fail("short Sobel frame"); end
        out_f++; out_k = 0;
      end
      if (out_f < 0 || out_f >= NF) fail("Sobel output outside a frame");
      else begin
        r = out_k / W; c = out_k % W;
        e = sobel_ref(gimg[out_f], W, H, r, c);
        checks++;
        if (int'(sobel_pixel_out) != e) fail($sformatf("f%0d (%0d,%0d): %0d expected %0d", out_f, r, c, sobel_pixel_out, e));
        checks++;
        if (out_k + W + 1 < NPIX) begin
          if (cycle - t_in[out_f][out_k + W + 1] != 6) fail("Sobel latency");
        end else begin
          n_flush++;
          if (cycle - t_in[out_f][NPIX - 1] > W + 1 + 6) fail("Sobel flush too slow");
        end
        if (e == 255) n_sob_clamp++;
        if (r == 0 || c == 0 || r == H - 1 || c == W - 1) n_border++;
        out_k++;
      end
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      src[f] = new[NPIX];
      gimg[f] = new[NPIX];
      t_in[f] = new[NPIX];
      for (int k = 0; k < NPIX; k++) begin
        case (f % 3)
          0: src[f][k] = rgb_t'($urandom);
          1: src[f][k] = (((k % W) / 4 + (k / W) / 4) % 2 == 0) ? rgb_t'(24'h0000FF) : rgb_t'(24'hFFFFFF);
          default: src[f][k] = rgb_t'({8'(k % W * 4), 8'(k / W * 4), 8'(k * 3)});
        endcase
        gimg[f][k] = gray_fixed(int'(src[f][k].r), int'(src[f][k].g), int'(src[f][k].b), 12);
      end
    end
    repeat (3) @(posedge clk);
    #2 rst = 0;
    for (int f = 0; f < NF; f++) begin
      if (f == 1) n_b2b++;          // frame 1 follows frame 0 with no gap
      if (f == 2) begin
        csc_val_in = 0; sobel_val_in = 0;
        repeat (20) @(posedge clk); #2;
      end
      for (int k = 0; k < NPIX; k++) begin
        while (GAPS && f == 0 && k != 0 && $urandom_range(4) == 0) begin
          csc_val_in = 0; csc_fs_in = 0; sobel_val_in = 0; sobel_fs_in = 0;
          csc_pixel_in = rgb_t'($urandom); sobel_pixel_in = rgb_t'($urandom);
          n_gap++;
          @(posedge clk); #2;
        end
        csc_pixel_in = src[f][k];   csc_val_in = 1;   csc_fs_in = (k == 0);
        sobel_pixel_in = src[f][k]; sobel_val_in = 1; sobel_fs_in = (k == 0);
        @(posedge clk); #2;
        t_in[f][k] = cycle;
        csc_q.push_back('{p: src[f][k], t: cycle, fs: (k == 0)});
      end
    end
    csc_val_in = 0; csc_fs_in = 0; sobel_val_in = 0; sobel_fs_in = 0;
    repeat (W + 30) @(posedge clk);
    checks++; if (csc_q.size() != 0 || n_csc != NF * NPIX) fail("CSC outputs missing");
    checks++; if (out_f != NF - 1 || out_k != NPIX) fail($sformatf("Sobel ended at frame %0d pixel %0d", out_f, out_k));
    checks++; if (n_flush != NF * (W + 1)) fail("Sobel flush count");
    if (CHECK_MECH) begin
      checks++; if (n_csc_clamp == 0) fail("no CSC clamp");
      checks++; if (n_sob_clamp == 0) fail("no Sobel clamp");
      checks++; if (n_border == 0)    fail("no border pixel");
      checks++; if (n_gap == 0)       fail("no input gap");
      checks++; if (n_b2b == 0)       fail("no back-to-back frame");
    end
    $display("csc_pixels=%0d csc_clamps=%0d sobel_clamps=%0d border=%0d flush=%0d gaps=%0d back_to_back=%0d",
             n_csc, n_csc_clamp, n_sob_clamp, n_border, n_flush, n_gap, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
