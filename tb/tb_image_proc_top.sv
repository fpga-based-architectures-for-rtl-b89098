// End-to-end test of image_proc_top at a reduced frame size (16 x 10):
// three frames through both cores at once (random pixels with idle
// cycles; a blue/white checkerboard straight after, with no gap; a
// gradient after a pause). Every output of both cores is checked, and
// clamping in both cores, image borders, the end-of-frame flush, input
// gaps and a back-to-back frame must each occur. See top_tb_body.svh.
module tb_image_proc_top;
  import img_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 16, H = 10, NF = 3;
  localparam bit GAPS = 1'b1, CHECK_MECH = 1'b1;

  image_proc_top #(.IMG_WIDTH(W), .IMG_HEIGHT(H)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "top_tb_body.svh"
endmodule
