// Full-size test of image_proc_top with its default parameters
// (512 x 512 frames): a random colour frame with idle cycles, then a
// blue/white checkerboard frame straight after it, through both cores;
// every output pixel is checked as in tb_image_proc_top, and clamping,
// borders, flushes, gaps and the back-to-back frame must each occur.
// See top_tb_body.svh.
module tb_image_proc_top_full;
  import img_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 512, H = 512, NF = 2;
  localparam bit GAPS = 1'b1, CHECK_MECH = 1'b1;

  image_proc_top dut (.*);

  initial begin
    repeat (3 * NF * W * H) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "top_tb_body.svh"
endmodule
