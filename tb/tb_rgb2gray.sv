// Self-checking test of rgb2gray: random and corner pixels with random
// gaps in val_in; each output is compared in order with the
// double-precision intensity (within one code), with a latency of 3
// cycles and fs_out on the first pixel.
module tb_rgb2gray;
  import img_pkg::*;
  import tb_ref_pkg::*;

  localparam int LATENCY = 3;
  localparam int N = 3000;

  logic   clk = 1'b0, rst = 1'b1;
  rgb_t   rgb;
  pixel_t gray;
  logic   fs_in, val_in, fs_out, val_out;
  int     checks = 0, failures = 0, cycle = 0, n_out = 0, exact = 0;

  rgb2gray dut (.clk, .rst, .rgb, .fs_in, .val_in, .gray, .fs_out, .val_out);

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

  always @(posedge clk) begin
    #1;
    if (!rst && val_out) begin
      item_t it;
      int e;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        it = q.pop_front();
        e  = round_clamp(i_real(int'(it.p.r), int'(it.p.g), int'(it.p.b)));
        checks++;
        if (!near(int'(gray), e)) begin failures++; $display("I %0d vs %0d for %h", gray, e, it.p); end
        if (int'(gray) == e) exact++;
        checks++;
        if (cycle - it.t != LATENCY - 1) begin failures++; $display("latency %0d", cycle - it.t + 1); end
        checks++;
        if (fs_out != it.fs) begin failures++; $display("fs_out wrong"); end
        n_out++;
      end
    end
  end

  initial begin
    fs_in = 0; val_in = 0; rgb = '0;
    repeat (3) @(posedge clk);
    #2 rst = 0;
    for (int i = 0; i < N; i++) begin
      rgb_t p;
      if ($urandom_range(4) == 0) begin
        val_in = 0; fs_in = 0; rgb = rgb_t'($urandom);
        @(posedge clk); #2;
        continue;
      end
      case (i)
        1: p = '{r: 8'hFF, g: 8'hFF, b: 8'hFF};
        2: p = '{r: 8'h00, g: 8'h00, b: 8'h00};
        3: p = '{r: 8'h00, g: 8'hFF, b: 8'h00};
        default: p = rgb_t'($urandom);
      endcase
      rgb = p; val_in = 1; fs_in = (i == 0);
      @(posedge clk);
      #2;
      q.push_back('{p: p, t: cycle, fs: (i == 0)});
    end
    val_in = 0; fs_in = 0;
    repeat (10) @(posedge clk);
    checks++; if (q.size() != 0) failures++;
    checks++; if (exact < (n_out * 9) / 10) begin failures++; $display("exact %0d/%0d", exact, n_out); end
    $display("outputs=%0d exact=%0d", n_out, exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
