// Test of the thinning processor on a 24 x 20 image.
//
// The image memory is modelled here (one-clock synchronous read). Three
// runs: a finger-like pattern thinned to convergence, a random image with
// thick blobs, and the finger pattern again on a second instance built with
// MAX_ITER = 1. Each final image, the iteration count, the erase counts of
// the two stages and the `converged` flag are compared with the reference
// model of zs_ref_pkg. `done` must rise exactly
// iterations * 2 * (ROWS*COLS + COLS + 4) clocks after the edge that takes
// `start`, and writes may only clear pixels that are black.
module tb_thinning_processor;
  import zs_ref_pkg::*;
  localparam int ROWS = 24, COLS = 20, NPIX = ROWS*COLS, AW = $clog2(NPIX);
  localparam int PASS_CYCLES = NPIX + COLS + 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, bad_writes = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // two processors, each with its own memory model
  logic          start [2];
  logic          busy [2], done [2], conv [2];
  logic [7:0]    iters [2];
  logic [31:0]   e1 [2], e2 [2];
  logic          re [2], we [2], wdata [2], rdata [2];
  logic [AW-1:0] raddr [2], waddr [2];
  bit            mem [2][NPIX];

  thinning_processor #(.ROWS(ROWS), .COLS(COLS)) dut0 (
    .clk, .rst_n, .start(start[0]), .busy(busy[0]), .done(done[0]),
    .converged(conv[0]), .iterations(iters[0]), .erased1(e1[0]), .erased2(e2[0]),
    .mem_re(re[0]), .mem_raddr(raddr[0]), .mem_rdata(rdata[0]),
    .mem_we(we[0]), .mem_waddr(waddr[0]), .mem_wdata(wdata[0]));

  thinning_processor #(.ROWS(ROWS), .COLS(COLS), .MAX_ITER(1)) dut1 (
    .clk, .rst_n, .start(start[1]), .busy(busy[1]), .done(done[1]),
    .converged(conv[1]), .iterations(iters[1]), .erased1(e1[1]), .erased2(e2[1]),
    .mem_re(re[1]), .mem_raddr(raddr[1]), .mem_rdata(rdata[1]),
    .mem_we(we[1]), .mem_waddr(waddr[1]), .mem_wdata(wdata[1]));

  for (genvar d = 0; d < 2; d++) begin : g_mem
    always_ff @(posedge clk) begin
      if (re[d]) rdata[d] <= mem[d][raddr[d]];
      if (we[d]) begin
        if (int'(waddr[d]) >= NPIX || !mem[d][waddr[d]] || wdata[d]) begin
          bad_writes++;
          $display("dut%0d: bad write addr %0d data %0b", d, waddr[d], wdata[d]);
        end
        mem[d][waddr[d]] <= wdata[d];
      end
    end
  end

  task automatic run(input int d, input img_t img, input int max_iter, input string name);
    img_t ref_img;
    int r_e1, r_e2, r_it, t0, t1;
    bit r_conv;
    for (int i = 0; i < NPIX; i++) mem[d][i] = img[i];
    ref_img = img;
    r_it = thin(ref_img, ROWS, COLS, max_iter, r_e1, r_e2, r_conv);
    @(negedge clk); start[d] = 1;
    @(posedge clk); t0 = int'($time / 10);
    @(negedge clk); start[d] = 0;
    wait (done[d]);
    t1 = int'($time / 10);
    @(negedge clk);
    checks += 6;
    if (int'(iters[d]) != r_it) begin failures++; $display("%s: iterations %0d, expected %0d", name, iters[d], r_it); end
    if (int'(e1[d]) != r_e1)    begin failures++; $display("%s: stage 1 erased %0d, expected %0d", name, e1[d], r_e1); end
    if (int'(e2[d]) != r_e2)    begin failures++; $display("%s: stage 2 erased %0d, expected %0d", name, e2[d], r_e2); end
    if (conv[d] !== r_conv)     begin failures++; $display("%s: converged %0b", name, conv[d]); end
    if (busy[d])                begin failures++; $display("%s: still busy", name); end
    if (t1 - t0 != r_it * 2 * PASS_CYCLES) begin
      failures++;
      $display("%s: took %0d clocks, expected %0d", name, t1 - t0, r_it * 2 * PASS_CYCLES);
    end
    for (int i = 0; i < NPIX; i++) begin
      checks++;
      if (mem[d][i] != ref_img[i]) begin
        failures++;
        if (failures < 10) $display("%s: pixel (%0d,%0d) is %0b", name, i / COLS, i % COLS, mem[d][i]);
      end
    end
    $display("%s: %0d iterations, erased %0d + %0d, converged %0b, %0d clocks",
             name, iters[d], e1[d], e2[d], conv[d], t1 - t0);
  endtask

  initial begin
    img_t img;
    start[0] = 0; start[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    img = new[NPIX];
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) img[r*COLS + c] = finger(ROWS, COLS, r, c);
    run(0, img, 32, "finger");
    // thick random blobs: a pixel is black when most of a random 3x3 area is
    for (int i = 0; i < NPIX; i++) img[i] = ($urandom_range(0, 99) < 60);
    begin
      img_t s;
      int k;
      s = img;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          k = 0;
          for (int dr = -1; dr <= 1; dr++)
            for (int dc = -1; dc <= 1; dc++) k += px(s, ROWS, COLS, r+dr, c+dc);
          img[r*COLS + c] = (k >= 5);
        end
    end
    run(0, img, 32, "blobs");
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) img[r*COLS + c] = finger(ROWS, COLS, r, c);
    run(1, img, 1, "one iteration");
    checks++;
    if (conv[1]) begin failures++; $display("MAX_ITER run should stop unconverged"); end
    checks++;
    failures += bad_writes;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
