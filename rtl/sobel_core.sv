// Streaming 3x3 Sobel edge detector on a grey-level raster.
//
// Pixels arrive in raster order, IMG_WIDTH per line, IMG_HEIGHT lines per
// frame, one per cycle at most (val_in), the first of a frame flagged by
// fs_in. The output is one edge-magnitude pixel per input pixel, in the
// same raster order and centred on it: output pixel k is computed when
// input pixel k + IMG_WIDTH + 1 (its lower-right neighbour) arrives.
//
// How it works:
//   - a position counter follows the input raster (fs_in restarts it);
//   - line_buffer supplies the column of three pixels ending at the input;
//   - a 3x3 window register shifts that column in on every input pixel;
//   - an output position counter marks border pixels (first/last row and
//     column), whose magnitude is forced to 0 because their window would
//     reach outside the image;
//   - sobel_kernel computes |Gx| + |Gy|.
// The last IMG_WIDTH + 1 output pixels of a frame (rest of the second to
// last line, and the last line) are all border pixels; they are emitted
// on their own, one per cycle, straight after the last input pixel
// (flush), so each frame in yields a complete frame out without waiting
// for the next one. A new frame may start immediately: its first output
// comes IMG_WIDTH + 1 pixels later, after the flush has finished.
//
// Timing: output pixel k leaves (val_out) 4 cycles after input pixel
// k + IMG_WIDTH + 1 entered; fs_out flags output pixel 0. Synchronous
// active-high reset clears counters and flags (not the line memories).
// The Sobel operator follows the source; windowing, border zeroing,
// latency and the flush are this design's choices.
module sobel_core
  import img_pkg::*;
#(
  parameter int unsigned IMG_WIDTH  = 512,
  parameter int unsigned IMG_HEIGHT = 512
) (
  input  logic   clk,
  input  logic   rst,
  input  pixel_t gray_in,
  input  logic   fs_in,
  input  logic   val_in,
  output pixel_t pixel_out,
  output logic   fs_out,
  output logic   val_out
);

  localparam int unsigned COL_W = (IMG_WIDTH  > 1) ? $clog2(IMG_WIDTH)  : 1;
  localparam int unsigned ROW_W = (IMG_HEIGHT > 1) ? $clog2(IMG_HEIGHT) : 1;
  localparam int unsigned FLUSH = IMG_WIDTH + 1;
  localparam int unsigned FL_W  = $clog2(FLUSH + 1);

  typedef logic [COL_W-1:0] col_t;
  typedef logic [ROW_W-1:0] row_t;

  localparam col_t LAST_COL = col_t'(IMG_WIDTH - 1);
  localparam row_t LAST_ROW = row_t'(IMG_HEIGHT - 1);

  // ---------------- input position ----------------
  col_t nxt_col, cur_col;
  row_t nxt_row, cur_row;

  assign cur_col = fs_in ? '0 : nxt_col;
  assign cur_row = fs_in ? '0 : nxt_row;

  always_ff @(posedge clk) begin
    if (rst) begin
      nxt_col <= '0;
      nxt_row <= '0;
    end else if (val_in) begin
      if (cur_col == LAST_COL) begin
        nxt_col <= '0;
        nxt_row <= (cur_row == LAST_ROW) ? '0 : cur_row + 1'b1;
      end else begin
        nxt_col <= cur_col + 1'b1;
        nxt_row <= cur_row;
      end
    end
  end

  // ---------------- stage 1: line buffers ----------------
  pixel_t col_top, col_mid, col_bot;

  line_buffer #(.IMG_WIDTH(IMG_WIDTH)) u_lines (
    .clk, .wr_en(val_in), .col(cur_col), .pix_in(gray_in),
    .top(col_top), .mid(col_mid), .bot(col_bot)
  );

  logic s1_shift, s1_emit, s1_first, s1_last;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_shift <= 1'b0;
      s1_emit  <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
    end else begin
      s1_shift <= val_in;
      // input index >= IMG_WIDTH + 1: an output pixel is due
      s1_emit  <= val_in && (cur_row >= row_t'(2) || (cur_row == row_t'(1) && cur_col != '0));
      s1_first <= val_in && cur_row == row_t'(1) && cur_col == col_t'(1);
      s1_last  <= val_in && cur_row == LAST_ROW && cur_col == LAST_COL;
    end
  end

  // ---------------- stage 2: window, output position, flush ----------------
  pixel_t [2:0][2:0] win;
  logic [FL_W-1:0]   flush_cnt;
  logic              flushing, s2_emit;
  col_t              o_col;
  row_t              o_row;

  assign flushing = (flush_cnt != '0);

  always_ff @(posedge clk) begin
    if (s1_shift) begin
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= col_top;
      win[1][2] <= col_mid;
      win[2][2] <= col_bot;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      flush_cnt <= '0;
      s2_emit   <= 1'b0;
      o_col     <= '0;
      o_row     <= '0;
    end else begin
      if (s1_last)       flush_cnt <= FL_W'(FLUSH);
      else if (flushing) flush_cnt <= flush_cnt - 1'b1;

      s2_emit <= s1_emit || flushing;
      if (s1_emit || flushing) begin
        if (s1_first) begin
          o_col <= '0;
          o_row <= '0;
        end else if (o_col == LAST_COL) begin
          o_col <= '0;
          o_row <= (o_row == LAST_ROW) ? '0 : o_row + 1'b1;
        end else begin
          o_col <= o_col + 1'b1;
        end
      end
    end
  end

  logic border;
  assign border = (o_row == '0) || (o_row == LAST_ROW) ||
                  (o_col == '0) || (o_col == LAST_COL);

  // ---------------- stages 3-4: gradient magnitude ----------------
  sobel_kernel u_kernel (.clk, .win, .zero(border), .mag(pixel_out));

  logic [1:0] val_d, fs_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      val_d <= '0;
      fs_d  <= '0;
    end else begin
      val_d <= {val_d[0], s2_emit};
      fs_d  <= {fs_d[0],  s2_emit && o_row == '0 && o_col == '0};
    end
  end

  assign val_out = val_d[1];
  assign fs_out  = fs_d[1];

  // A flushed border pixel and a regular output never compete for a slot.
  a_no_flush_overlap: assert property (@(posedge clk) disable iff (rst)
    !(s1_emit && flushing));

endmodule
