// Test of the 3x3 window generator on random 5 x 7 images. Streams two
// frames (with random input gaps in the second), flushing each with
// COLS+1 random pixels, which must never show in a window, and compares
// every window with the neighbourhood cut from the image (outside = white). Checks the window count, the position
// outputs, `out_last`, and the latency: window k appears the clock after
// input k+COLS+1.
module tb_window_gen;
  import thin_pkg::*;
  import zs_ref_pkg::*;
  localparam int ROWS = 5, COLS = 7, NPIX = ROWS*COLS;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_pix = 0;
  logic out_valid, out_last;
  window_t out_win;
  logic [2:0] out_row, out_col;

  window_gen #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk, .rst_n, .start, .in_valid, .in_pix,
    .out_valid, .out_win, .out_row, .out_col, .out_last);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  img_t img;
  int n_in, n_out, last_in_cycle, cycle;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // check every presented window
  always @(negedge clk) if (rst_n && out_valid) begin
    window_t e;
    int r, c;
    r = n_out / COLS; c = n_out % COLS;
    e.p7 = px(img, ROWS, COLS, r-1, c-1); e.p6 = px(img, ROWS, COLS, r-1, c);
    e.p5 = px(img, ROWS, COLS, r-1, c+1); e.p8 = px(img, ROWS, COLS, r, c-1);
    e.pc = px(img, ROWS, COLS, r, c);     e.p4 = px(img, ROWS, COLS, r, c+1);
    e.p1 = px(img, ROWS, COLS, r+1, c-1); e.p2 = px(img, ROWS, COLS, r+1, c);
    e.p3 = px(img, ROWS, COLS, r+1, c+1);
    checks++;
    if (out_win !== e || out_row !== 3'(r) || out_col !== 3'(c)
        || out_last !== (n_out == NPIX-1)) begin
      failures++;
      $display("window %0d: got %09b (%0d,%0d) expected %09b (%0d,%0d)",
               n_out, out_win, out_row, out_col, e, r, c);
    end
    checks++;   // latency: one clock after input n_out+COLS+1
    if (last_in_cycle != cycle - 1 || n_in != n_out + COLS + 2) begin
      failures++;
      $display("window %0d latency wrong (inputs %0d)", n_out, n_in);
    end
    n_out++;
  end

  task automatic frame(input bit gaps);
    img = new[NPIX];
    foreach (img[i]) img[i] = 1'($urandom);
    n_in = 0; n_out = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (n_in < NPIX + COLS + 1) begin
      if (gaps && $urandom_range(0, 2) == 0) begin
        in_valid = 0;
      end else begin
        in_valid = 1;
        in_pix = (n_in < NPIX) ? img[n_in] : 1'($urandom);
      end
      @(posedge clk);
      if (in_valid) begin n_in++; last_in_cycle = cycle; end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_out != NPIX) begin
      failures++;
      $display("frame gave %0d windows", n_out);
    end
  endtask

  initial begin
    cycle = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(0);
    frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
