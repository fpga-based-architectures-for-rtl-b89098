// Self-checking test of csc_rgb2ycbcr: a frame of random and corner
// pixels with random gaps in val_in. Every output pixel is checked against
// the double-precision colour equations (within one code), in order, with
// fs_out on the first; its latency must be 3 cycles and the flag outputs
// must stay low in gaps. Clamping of Y and of Cb must have occurred.
module tb_csc_rgb2ycbcr;
  import img_pkg::*;
  import tb_ref_pkg::*;

  localparam int LATENCY = 3;
  localparam int N = 3000;

  logic   clk = 1'b0, rst = 1'b1;
  pixel_t r_in, g_in, b_in, yout, cbout, crout;
  logic   fs_in, val_in, fs_out, val_out;
  int     checks = 0, failures = 0, cycle = 0;
  int     y_clamps = 0, c_clamps = 0, gaps = 0, n_out = 0;

  csc_rgb2ycbcr dut (
    .clk, .rst, .pixel_in_R(r_in), .pixel_in_G(g_in), .pixel_in_B(b_in),
    .fs_in, .val_in, .yout, .Cbout(cbout), .Crout(crout), .fs_out, .val_out
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { rgb_t p; int t; bit fs; } item_t;
  item_t q[$];

  task automatic check(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  // monitor: runs after each edge
  always @(posedge clk) begin
    #1;
    if (!rst && val_out) begin
      item_t it;
      int ey, ecb, ecr;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        it  = q.pop_front();
        ey  = round_clamp(y_real (int'(it.p.r), int'(it.p.g), int'(it.p.b)));
        ecb = round_clamp(cb_real(int'(it.p.r), int'(it.p.g), int'(it.p.b)));
        ecr = round_clamp(cr_real(int'(it.p.r), int'(it.p.g), int'(it.p.b)));
        checks += 3;
        if (!near(int'(yout), ey))   begin failures++; $display("Y  %0d vs %0d for %h", yout,  ey,  it.p); end
        if (!near(int'(cbout), ecb)) begin failures++; $display("Cb %0d vs %0d for %h", cbout, ecb, it.p); end
        if (!near(int'(crout), ecr)) begin failures++; $display("Cr %0d vs %0d for %h", crout, ecr, it.p); end
        // sampled at edge it.t, visible after edge it.t + LATENCY - 1
        check("latency", cycle - it.t, LATENCY - 1);
        check("fs_out", int'(fs_out), int'(it.fs));
        if (y_real(int'(it.p.r), int'(it.p.g), int'(it.p.b)) > 255.5) y_clamps++;
        if (cb_real(int'(it.p.r), int'(it.p.g), int'(it.p.b)) > 255.4 ||
            cr_real(int'(it.p.r), int'(it.p.g), int'(it.p.b)) > 255.4) c_clamps++;
        n_out++;
      end
    end else if (!rst) begin
      check("fs_out in gap", int'(fs_out), 0);
    end
  end

  initial begin
    fs_in = 0; val_in = 0; r_in = 0; g_in = 0; b_in = 0;
    repeat (3) @(posedge clk);
    #2 rst = 0;
    for (int i = 0; i < N; i++) begin
      rgb_t p;
      if ($urandom_range(3) == 0) begin
        val_in = 0; fs_in = 0;
        r_in = pixel_t'($urandom); g_in = pixel_t'($urandom); b_in = pixel_t'($urandom);
        gaps++;
        @(posedge clk); #2;
        continue;
      end
      case (i)
        1: p = '{r: 8'hFF, g: 8'hFF, b: 8'hFF};
        2: p = '{r: 8'h00, g: 8'h00, b: 8'hFF};
        3: p = '{r: 8'hFF, g: 8'h00, b: 8'h00};
        4: p = '{r: 8'h00, g: 8'h00, b: 8'h00};
        default: p = rgb_t'($urandom);
      endcase
      r_in = p.r; g_in = p.g; b_in = p.b;
      val_in = 1; fs_in = (i == 0);
      @(posedge clk);
      #2;
      q.push_back('{p: p, t: cycle, fs: (i == 0)});
    end
    val_in = 0; fs_in = 0;
    repeat (10) @(posedge clk);
    check("all outputs delivered", q.size(), 0);
    checks++; if (y_clamps == 0) begin failures++; $display("no Y clamp seen"); end
    checks++; if (c_clamps == 0) begin failures++; $display("no Cb/Cr clamp seen"); end
    checks++; if (gaps == 0 || n_out == 0) failures++;
    $display("outputs=%0d gaps=%0d y_clamps=%0d c_clamps=%0d", n_out, gaps, y_clamps, c_clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
