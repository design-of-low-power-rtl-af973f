// 2-D raster address counter (the "160x192 counter" of the thinning
// processor).
//
// Counts column 0..COLS-1 and, at the end of each row, row 0..ROWS-1, then
// wraps to (0,0). `clr` returns to (0,0) and has priority over `en`; `en`
// advances one position per clock. `last` is high while the counter sits on
// the final position (ROWS-1, COLS-1). Both are synchronous; reset is
// active-low and asynchronous. The raster order (columns fastest) is this
// design's choice.
module pixel_counter #(
  parameter int unsigned ROWS = thin_pkg::IMG_ROWS,
  parameter int unsigned COLS = thin_pkg::IMG_COLS,
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  output logic [RW-1:0] row,
  output logic [CW-1:0] col,
  output logic          last
);

  logic row_end;
  assign row_end = (col == CW'(COLS - 1));
  assign last    = row_end && (row == RW'(ROWS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0;
      col <= '0;
    end else if (clr) begin
      row <= '0;
      col <= '0;
    end else if (en) begin
      if (row_end) begin
        col <= '0;
        row <= last ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

endmodule
