// End-to-end test of the fingerprint front end at its full 160 x 192 size.
//
// A finger-like ridge pattern (zs_ref_pkg::finger) is presented on
// `finger_contact` for whichever pixel the sensor addresses. After one
// `start` the test checks the capture time (4 clocks per pixel), the ridge
// count, the thinning time (one hand-over clock, then
// 2*(ROWS*COLS+COLS+4) clocks per iteration), the
// iteration and erase counts and the convergence flag against the
// reference model, and reads the whole skeleton back through the host port
// to compare it pixel by pixel. It counts how often each mechanism
// happened - ridge and valley pixels sensed, pixels erased by stage 1 and
// by stage 2, thinning iterations, stop on convergence - and fails if one
// never did.
module tb_fingerprint_system;
  import zs_ref_pkg::*;
  localparam int ROWS = thin_pkg::IMG_ROWS, COLS = thin_pkg::IMG_COLS;
  localparam int NPIX = ROWS*COLS, AW = $clog2(NPIX);

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, capturing, thinning, done, converged, host_rdata, finger_contact;
  logic [$clog2(ROWS)-1:0] sense_row;
  logic [$clog2(COLS)-1:0] sense_col;
  logic [31:0] ridges, erased1, erased2;
  logic [7:0] iterations;
  logic [AW-1:0] host_addr;

  fingerprint_system dut (
    .clk, .rst_n, .start, .busy, .capturing, .thinning, .done,
    .sense_row, .sense_col, .finger_contact,
    .ridges, .iterations, .erased1, .erased2, .converged,
    .host_addr, .host_rdata);

  always #12.5 clk = ~clk;   // 40 MHz

  int checks = 0, failures = 0;
  img_t finger_img, ref_img;
  bit   contact_map [NPIX];

  assign finger_contact = contact_map[int'(sense_row) * COLS + int'(sense_col)];

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int r_it, r_e1, r_e2, n_ridge, t_start, t_cap, t_done, mismatches, n_black;
    bit r_conv;
    finger_img = new[NPIX];
    n_ridge = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        finger_img[r*COLS + c] = finger(ROWS, COLS, r, c);
        contact_map[r*COLS + c] = finger_img[r*COLS + c];
        n_ridge += int'(finger_img[r*COLS + c]);
      end
    ref_img = finger_img;
    r_it = thin(ref_img, ROWS, COLS, 32, r_e1, r_e2, r_conv);
    host_addr = '0;

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(posedge clk); t_start = cyc + 1;
    @(negedge clk); start = 0;
    wait (!capturing);
    t_cap = cyc;
    wait (done);
    t_done = cyc;
    @(negedge clk);

    check(t_cap - t_start == 4 * NPIX,
          $sformatf("capture took %0d clocks, expected %0d", t_cap - t_start, 4 * NPIX));
    check(t_done - t_cap == 1 + r_it * 2 * (NPIX + COLS + 4),
          $sformatf("thinning took %0d clocks, expected %0d", t_done - t_cap,
                    1 + r_it * 2 * (NPIX + COLS + 4)));
    check(int'(ridges) == n_ridge, $sformatf("ridges %0d expected %0d", ridges, n_ridge));
    check(int'(iterations) == r_it, $sformatf("iterations %0d expected %0d", iterations, r_it));
    check(int'(erased1) == r_e1, $sformatf("stage 1 erased %0d expected %0d", erased1, r_e1));
    check(int'(erased2) == r_e2, $sformatf("stage 2 erased %0d expected %0d", erased2, r_e2));
    check(converged == r_conv, "converged flag");
    check(!busy, "idle after done");

    mismatches = 0; n_black = 0;
    for (int a = 0; a < NPIX; a++) begin
      host_addr = AW'(a);
      @(posedge clk); #1;
      n_black += int'(host_rdata);
      if (host_rdata != ref_img[a]) mismatches++;
      @(negedge clk);
    end
    checks += NPIX;
    failures += mismatches;
    if (mismatches != 0) $display("FAIL: %0d skeleton pixels differ", mismatches);

    $display("capture %0d clocks, thinning %0d clocks (%0d iterations, %0d per iteration)",
             t_cap - t_start, t_done - t_cap, iterations, 2 * (NPIX + COLS + 4));
    $display("mechanisms: ridge pixels %0d, valley pixels %0d, stage-1 erasures %0d, stage-2 erasures %0d, iterations %0d, convergence stops %0d",
             ridges, NPIX - int'(ridges), erased1, erased2, iterations, int'(converged));
    $display("skeleton: %0d black pixels of %0d ridge pixels", n_black, n_ridge);
    check(ridges > 0, "no ridge pixel sensed");
    check(int'(ridges) < NPIX, "no valley pixel sensed");
    check(erased1 > 0, "stage 1 never erased");
    check(erased2 > 0, "stage 2 never erased");
    check(iterations > 1, "fewer than two iterations");
    check(converged, "never stopped on convergence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
