// Self-checking test of line_buffer with an 8-pixel line: pushes five
// lines of distinct pixel values with random idle cycles, and after each
// push checks that top, mid and bot are the pixels two lines above, one
// line above and at the pushed position, and that they hold while idle.
module tb_line_buffer;
  import img_pkg::*;

  localparam int W = 8;
  localparam int LINES = 5;

  logic           clk = 1'b0;
  logic           wr_en = 1'b0;
  logic [2:0]     col = '0;
  pixel_t         pix_in = '0, top, mid, bot;
  int             checks = 0, failures = 0;
  int             img[LINES * W];

  line_buffer #(.IMG_WIDTH(W)) dut (.clk, .wr_en, .col, .pix_in, .top, .mid, .bot);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect3(int k);
    checks++;
    if (int'(bot) != img[k]) begin failures++; $display("bot at %0d: %0d", k, bot); end
    if (k >= W) begin
      checks++;
      if (int'(mid) != img[k - W]) begin failures++; $display("mid at %0d: %0d", k, mid); end
    end
    if (k >= 2 * W) begin
      checks++;
      if (int'(top) != img[k - 2 * W]) begin failures++; $display("top at %0d: %0d", k, top); end
    end
  endtask

  initial begin
    foreach (img[k]) img[k] = (k * 37 + 11) % 256;
    @(posedge clk); #2;
    for (int k = 0; k < LINES * W; k++) begin
      wr_en = 1; col = 3'(k % W); pix_in = pixel_t'(img[k]);
      @(posedge clk); #2;
      wr_en = 0;
      expect3(k);
      if ($urandom_range(2) == 0) begin
        pix_in = pixel_t'($urandom);
        col    = 3'($urandom);
        @(posedge clk); #2;
        expect3(k);   // outputs hold while idle
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
