// Zhang-Suen thinning processor.
//
// Thins a binary image held in an external one-bit memory (image_ram) to
// one-pixel-wide lines. One ZS iteration is two passes over the whole
// image: a pass with thinning stage 1 and then a pass with thinning stage 2.
// In each pass the 2-D address counter reads the image in raster order, one
// pixel per clock, the 3x3 window generator rebuilds every pixel's
// neighbourhood from two line buffers, and the active stage decides whether
// the centre pixel is erased. Erased pixels are cleared in the same memory
// during the pass. This is safe because the window generator works only on
// the copy in its line buffers, which holds the image as it was when the
// pass began, so every decision of a pass sees the same input, as the
// parallel ZS algorithm requires. Iterations repeat until one erases no
// pixel or MAX_ITER iterations have run.
//
// Interface: pulse `start` while idle; `busy` stays high until the
// one-clock `done`. `converged` then tells whether the last iteration erased
// nothing, `iterations` how many ran, and `erased1`/`erased2` how many pixels
// the two stages erased in total. Memory ports: synchronous read with one
// clock of latency, write at the clock edge.
//
// Timing: a pass takes ROWS*COLS + COLS + 4 clocks (image, line-buffer
// flush, memory and window latency, one restart clock), so one iteration
// takes 2*(ROWS*COLS + COLS + 4) = 61,768 clocks at 160x192, and `done`
// rises iterations*2*(ROWS*COLS + COLS + 4) clocks after the clock edge
// that takes `start`. The block
// structure (counter, window generator, two stages) and the ZS conditions
// follow the source; the in-place update, the stop rule and the status
// outputs are this design's choices.
module thinning_processor
  import thin_pkg::*;
#(
  parameter int unsigned ROWS     = thin_pkg::IMG_ROWS,
  parameter int unsigned COLS     = thin_pkg::IMG_COLS,
  parameter int unsigned MAX_ITER = 32,
  localparam int unsigned AW = $clog2(ROWS * COLS),
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned SW = $clog2(ROWS + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          converged,
  output logic [7:0]    iterations,
  output logic [31:0]   erased1,
  output logic [31:0]   erased2,
  // image memory
  output logic          mem_re,
  output logic [AW-1:0] mem_raddr,
  input  logic          mem_rdata,
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output logic          mem_wdata
);

  typedef enum logic [1:0] {S_IDLE, S_RESTART, S_PASS} state_t;
  state_t state;
  logic   step2;        // 0: stage-1 pass, 1: stage-2 pass
  logic   iter_erased;  // some pixel erased in the current iteration

  // ---- raster scan: ROWS image rows plus two flush rows ------------------
  logic [SW-1:0] scan_row;
  logic [CW-1:0] scan_col;
  logic          scan_last_unused;
  logic          scanning;
  logic          pass_start;

  assign scanning   = (state == S_PASS);
  assign pass_start = (state == S_RESTART);

  pixel_counter #(.ROWS(ROWS + 2), .COLS(COLS)) u_scan (
    .clk, .rst_n, .clr(pass_start), .en(scanning),
    .row(scan_row), .col(scan_col), .last(scan_last_unused)
  );

  logic in_image;
  assign in_image  = (scan_row < SW'(ROWS));
  assign mem_re    = scanning && in_image;
  assign mem_raddr = AW'(scan_row) * AW'(COLS) + AW'(scan_col);

  // memory latency: pixel arrives one clock after its address
  logic rd_valid, rd_in_image;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid    <= 1'b0;
      rd_in_image <= 1'b0;
    end else begin
      rd_valid    <= scanning;
      rd_in_image <= scanning && in_image;
    end
  end

  // ---- 3x3 window and the two stages --------------------------------------
  logic          w_valid, w_last;
  window_t       w_win;
  logic [RW-1:0] w_row;
  logic [CW-1:0] w_col;

  window_gen #(.ROWS(ROWS), .COLS(COLS)) u_win (
    .clk, .rst_n, .start(pass_start),
    .in_valid(rd_valid), .in_pix(rd_in_image && mem_rdata),
    .out_valid(w_valid), .out_win(w_win),
    .out_row(w_row), .out_col(w_col), .out_last(w_last)
  );

  logic erase1, erase2, keep1_unused, keep2_unused, erase;
  zs_stage1 u_stage1 (.win(w_win), .erase(erase1), .pix_out(keep1_unused));
  zs_stage2 u_stage2 (.win(w_win), .erase(erase2), .pix_out(keep2_unused));
  assign erase = step2 ? erase2 : erase1;

  logic hit;
  assign hit       = scanning && w_valid && erase;
  assign mem_we    = hit;
  assign mem_waddr = AW'(w_row) * AW'(COLS) + AW'(w_col);
  assign mem_wdata = 1'b0;

  logic pass_end;
  assign pass_end = scanning && w_valid && w_last;

  // ---- control -------------------------------------------------------------
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      step2       <= 1'b0;
      iter_erased <= 1'b0;
      done        <= 1'b0;
      converged   <= 1'b0;
      iterations  <= '0;
      erased1     <= '0;
      erased2     <= '0;
    end else begin
      done <= 1'b0;
      if (hit) begin
        iter_erased <= 1'b1;
        if (step2) erased2 <= erased2 + 1;
        else       erased1 <= erased1 + 1;
      end
      unique case (state)
        S_IDLE: if (start) begin
          state       <= S_RESTART;
          step2       <= 1'b0;
          iter_erased <= 1'b0;
          converged   <= 1'b0;
          iterations  <= '0;
          erased1     <= '0;
          erased2     <= '0;
        end
        S_RESTART: state <= S_PASS;
        S_PASS: if (pass_end) begin
          if (!step2) begin
            step2 <= 1'b1;
            state <= S_RESTART;
          end else begin
            step2       <= 1'b0;
            iter_erased <= 1'b0;
            iterations  <= iterations + 1'b1;
            if (!(iter_erased || hit)) begin
              converged <= 1'b1;
              done      <= 1'b1;
              state     <= S_IDLE;
            end else if (32'(iterations) + 1 >= MAX_ITER) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              state <= S_RESTART;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // An erase is only ever issued for a pixel that is black.
  assert property (@(posedge clk) disable iff (!rst_n) hit |-> w_win.pc);

endmodule
