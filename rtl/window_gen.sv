// 3x3 pixel window generator.
//
// Takes a binary image as a raster stream, one pixel per `in_valid` clock,
// columns fastest, and presents the 3x3 neighbourhood of each pixel in the
// same order. Two line buffers of COLS bits hold the two rows above the
// incoming pixel; each input pushes a 3-pixel column into a 3x3 shift
// window, whose middle is the pixel COLS+1 positions behind the input.
// Neighbours outside the image read as white (0), so border pixels are
// thinned as if the image sat on a white background.
//
// Timing: `start` (one clock, before the first pixel) clears the position
// counters. The window of pixel k is valid (`out_valid`) in the clock after
// input pixel k+COLS+1 is accepted, so a frame of ROWS*COLS pixels needs
// COLS+1 further inputs (any value; they only ever land outside the image
// and are masked) to flush the last window. `out_last` marks the window of pixel
// (ROWS-1, COLS-1). The source names this block and its job; the line-buffer
// structure and the white border are this design's choices.
module window_gen
  import thin_pkg::*;
#(
  parameter int unsigned ROWS = thin_pkg::IMG_ROWS,
  parameter int unsigned COLS = thin_pkg::IMG_COLS,
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          in_valid,
  input  logic          in_pix,
  output logic          out_valid,
  output window_t       out_win,
  output logic [RW-1:0] out_row,
  output logic [CW-1:0] out_col,
  output logic          out_last
);

  // Column of the incoming pixel, and how many inputs came in so far
  // (saturating at COLS+1, the point from which windows are complete).
  localparam int unsigned FW = $clog2(COLS + 2);
  logic [CW-1:0] in_col;
  logic [FW-1:0] fill;
  logic          primed;
  assign primed = (fill == FW'(COLS + 1));

  logic lb_top [COLS];   // row two above the input
  logic lb_mid [COLS];   // row one above the input
  logic [2:0] w_top, w_mid, w_bot;   // [0] left, [1] centre, [2] right

  // Position of the pixel whose window is presented next.
  logic [RW-1:0] c_row;
  logic [CW-1:0] c_col;
  logic          c_last;
  logic          c_en;
  assign c_en = in_valid && primed;

  pixel_counter #(.ROWS(ROWS), .COLS(COLS)) u_centre (
    .clk, .rst_n, .clr(start), .en(c_en),
    .row(c_row), .col(c_col), .last(c_last)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_col <= '0;
      fill   <= '0;
    end else if (start) begin
      in_col <= '0;
      fill   <= '0;
    end else if (in_valid) begin
      in_col <= (in_col == CW'(COLS - 1)) ? '0 : in_col + 1'b1;
      if (!primed) fill <= fill + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb_top[in_col] <= lb_mid[in_col];
      lb_mid[in_col] <= in_pix;
      w_top <= {lb_top[in_col], w_top[2:1]};
      w_mid <= {lb_mid[in_col], w_mid[2:1]};
      w_bot <= {in_pix,         w_bot[2:1]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= c_en && !start;
      if (c_en) begin
        out_row  <= c_row;
        out_col  <= c_col;
        out_last <= c_last;
      end
    end
  end

  // Mask neighbours that fall outside the image.
  logic m_top, m_bot, m_left, m_right;
  always_comb begin
    m_top   = (out_row != '0);
    m_bot   = (out_row != RW'(ROWS - 1));
    m_left  = (out_col != '0);
    m_right = (out_col != CW'(COLS - 1));
    out_win.pc = w_mid[1];
    out_win.p7 = w_top[0] && m_top && m_left;
    out_win.p6 = w_top[1] && m_top;
    out_win.p5 = w_top[2] && m_top && m_right;
    out_win.p8 = w_mid[0] && m_left;
    out_win.p4 = w_mid[2] && m_right;
    out_win.p1 = w_bot[0] && m_bot && m_left;
    out_win.p2 = w_bot[1] && m_bot;
    out_win.p3 = w_bot[2] && m_bot && m_right;
  end

endmodule
