// Fingerprint sensor with on-chip thinning.
//
// One `start` pulse runs the whole front end of the verification flow:
// the sensor controller captures a binary fingerprint image from the
// charge-sharing pixel array into the image memory (ridge = 1), then the
// thinning processor reduces every ridge to a one-pixel-wide skeleton in
// the same memory. The host processor, which keeps the rest of the
// algorithm (minutiae extraction and matching), then reads the skeleton
// through `host_addr`/`host_rdata` (synchronous read, one clock latency,
// only while `busy` is low).
//
// The pixel array is modelled by one behavioural pixel cell that is
// evaluated for the addressed pixel: the finger outside the chip is
// represented by `finger_contact`, which the environment drives for the
// pixel at (`sense_row`, `sense_col`) while capturing. The other blocks
// are synthesizable.
//
// Timing at 160x192: capture 4*ROWS*COLS = 122,880 clocks, one clock to
// hand the memory over, then 61,768 clocks per thinning iteration. `done`
// pulses for one clock at the end.
// The split into sensor, memory and thinning processor follows the
// source's system diagram; the sequencing and the host port are this
// design's choices.
module fingerprint_system #(
  parameter int unsigned ROWS     = thin_pkg::IMG_ROWS,
  parameter int unsigned COLS     = thin_pkg::IMG_COLS,
  parameter int unsigned MAX_ITER = 32,
  localparam int unsigned AW = $clog2(ROWS * COLS),
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          capturing,
  output logic          thinning,
  output logic          done,
  // finger on the sensor
  output logic [RW-1:0] sense_row,
  output logic [CW-1:0] sense_col,
  input  logic          finger_contact,
  // results
  output logic [31:0]   ridges,
  output logic [7:0]    iterations,
  output logic [31:0]   erased1,
  output logic [31:0]   erased2,
  output logic          converged,
  // host read port
  input  logic [AW-1:0] host_addr,
  output logic          host_rdata
);

  // ---- sensor -------------------------------------------------------------
  logic          cap_done, cap_busy;
  logic          phi1, sw1, sa_en, pix;
  logic          cap_we, cap_wdata;
  logic [AW-1:0] cap_waddr;

  sensor_ctrl #(.ROWS(ROWS), .COLS(COLS)) u_sensor_ctrl (
    .clk, .rst_n, .start(start && !busy), .busy(cap_busy), .done(cap_done),
    .ridges, .row(sense_row), .col(sense_col),
    .phi1, .sw1, .sa_en, .pix_in(pix),
    .mem_we(cap_we), .mem_waddr(cap_waddr), .mem_wdata(cap_wdata)
  );

  sense_pixel u_pixel (
    .phi1, .sw1, .sa_en, .contact(finger_contact), .pix,
    .static_on()
  );

  // ---- thinning -------------------------------------------------------------
  logic          thin_busy, thin_done;
  logic          thin_re, thin_we, thin_wdata;
  logic [AW-1:0] thin_raddr, thin_waddr;
  logic          ram_rdata;

  thinning_processor #(.ROWS(ROWS), .COLS(COLS), .MAX_ITER(MAX_ITER)) u_thin (
    .clk, .rst_n, .start(cap_done), .busy(thin_busy), .done(thin_done),
    .converged, .iterations, .erased1, .erased2,
    .mem_re(thin_re), .mem_raddr(thin_raddr), .mem_rdata(ram_rdata),
    .mem_we(thin_we), .mem_waddr(thin_waddr), .mem_wdata(thin_wdata)
  );

  // ---- image memory, shared in time ----------------------------------------
  image_ram #(.ROWS(ROWS), .COLS(COLS)) u_ram (
    .clk,
    .re(thin_busy ? thin_re : 1'b1),
    .raddr(thin_busy ? thin_raddr : host_addr),
    .rdata(ram_rdata),
    .we(cap_busy ? cap_we : thin_we),
    .waddr(cap_busy ? cap_waddr : thin_waddr),
    .wdata(cap_busy ? cap_wdata : thin_wdata)
  );
  assign host_rdata = ram_rdata;

  // cap_done starts the thinning processor; `thinning` covers that
  // hand-over clock, so `busy` stays high from capture to `done`.
  assign capturing = cap_busy;
  assign thinning  = thin_busy || cap_done;
  assign busy      = cap_busy || thinning;
  assign done      = thin_done;

  // The two users of the memory never overlap.
  assert property (@(posedge clk) disable iff (!rst_n) !(cap_busy && thin_busy));

endmodule
