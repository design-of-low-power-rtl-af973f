// Test of the sensor read-out controller at 6 x 5 pixels with the pixel
// cell model and an image memory. A finger pattern is presented on
// `contact` for the addressed pixel; the test checks the phase sequence of
// every pixel (PRE, UG, SENSE, EVAL, one clock each), the stored image, the
// ridge count, and the frame time of 4*ROWS*COLS clocks. Two frames with
// different patterns are captured.
module tb_sensor_ctrl;
  import zs_ref_pkg::*;
  localparam int ROWS = 6, COLS = 5, NPIX = ROWS*COLS, AW = $clog2(NPIX);

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, phi1, sw1, sa_en, pix, contact, we, wdata, rdata;
  logic [31:0] ridges;
  logic [2:0] row, col;
  logic [AW-1:0] waddr, raddr;
  logic re;
  int checks = 0, failures = 0, seq_err = 0;
  int pat;

  sensor_ctrl #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk, .rst_n, .start, .busy, .done, .ridges, .row, .col,
    .phi1, .sw1, .sa_en, .pix_in(pix),
    .mem_we(we), .mem_waddr(waddr), .mem_wdata(wdata));
  sense_pixel u_pix (.phi1, .sw1, .sa_en, .contact, .pix, .static_on());
  image_ram #(.ROWS(ROWS), .COLS(COLS)) u_ram (
    .clk, .re, .raddr, .rdata, .we, .waddr, .wdata);

  function automatic bit pattern(input int p, r, c);
    return (p == 0) ? bit'(((r + 2*c) % 4) < 2) : bit'(((r * c) % 3) == 1);
  endfunction

  assign contact = pattern(pat, int'(row), int'(col));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase sequence checker: the encoded phase must follow PRE,UG,SENSE,EVAL
  int ph_prev = 0;
  always @(negedge clk) if (rst_n) begin
    int ph;
    ph = phi1 ? 1 : (sa_en ? 4 : (sw1 ? 3 : (busy ? 2 : 0)));
    if (phi1 && (sw1 || sa_en)) seq_err++;
    if (ph != 0 && ph_prev != 0 && !(ph == ph_prev % 4 + 1)) seq_err++;
    ph_prev = ph;
  end

  task automatic frame(input int p);
    int t0, t1, nr;
    pat = p;
    @(negedge clk); start = 1;
    @(posedge clk); t0 = int'($time / 10);
    @(negedge clk); start = 0;
    wait (done);
    t1 = int'($time / 10);
    checks++;
    if (t1 - t0 != 4 * NPIX) begin failures++; $display("frame took %0d clocks", t1 - t0); end
    nr = 0;
    for (int a = 0; a < NPIX; a++) begin
      @(negedge clk); re = 1; raddr = AW'(a);
      @(posedge clk); #1;
      checks++;
      nr += int'(pattern(p, a / COLS, a % COLS));
      if (rdata !== pattern(p, a / COLS, a % COLS)) begin
        failures++;
        $display("pixel %0d stored %0b", a, rdata);
      end
    end
    re = 0;
    checks++;
    if (int'(ridges) != nr) begin failures++; $display("ridges %0d expected %0d", ridges, nr); end
  endtask

  initial begin
    re = 0; raddr = 0; pat = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(0);
    frame(1);
    checks++;
    if (seq_err != 0) begin failures++; $display("%0d phase sequence errors", seq_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
