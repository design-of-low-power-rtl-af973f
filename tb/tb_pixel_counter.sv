// Test of the 2-D raster counter at 3 rows x 5 columns: walks two full
// frames with random enable gaps, checks every position, the `last` flag
// and the wrap, then checks that `clr` returns to (0,0) mid-frame.
module tb_pixel_counter;
  localparam int ROWS = 3, COLS = 5;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [1:0] row;
  logic [2:0] col;
  logic last;
  int checks = 0, failures = 0;
  int er = 0, ec = 0;

  pixel_counter #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .rst_n, .clr, .en, .row, .col, .last);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pos();
    checks++;
    if (row !== 2'(er) || col !== 3'(ec) || last !== (er == ROWS-1 && ec == COLS-1)) begin
      failures++;
      $display("at (%0d,%0d) got (%0d,%0d) last=%0b", er, ec, row, col, last);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_pos();
    for (int k = 0; k < 2*ROWS*COLS + 3; k++) begin
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (en) begin
        ec++;
        if (ec == COLS) begin ec = 0; er = (er + 1) % ROWS; end
      end
      check_pos();
    end
    en = 1; clr = 1;
    @(posedge clk); #1;
    en = 0; clr = 0; er = 0; ec = 0;
    check_pos();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
