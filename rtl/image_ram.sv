// Binary image memory: ROWS*COLS one-bit words, one read and one write
// port.
//
// Read is synchronous: `rdata` shows mem[raddr] one clock after `re`. A
// write with `we` lands at the clock edge. Reading and writing the same
// address in one cycle returns the old value. The thinning processor reads
// the image in raster order on the read port and clears erased pixels on
// the write port in the same pass. The memory is outside the thinning
// logic, as in the source, which counts the processor's gates without it;
// its organisation (1-bit words, two ports, flat address row*COLS+col) is
// this design's choice. The array is not reset: everything is written
// before it is read.
module image_ram #(
  parameter int unsigned ROWS = thin_pkg::IMG_ROWS,
  parameter int unsigned COLS = thin_pkg::IMG_COLS,
  localparam int unsigned DEPTH = ROWS * COLS,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic          rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wdata
);

  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
