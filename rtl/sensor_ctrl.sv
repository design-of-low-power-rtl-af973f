// Sensor read-out controller.
//
// Scans the ROWS x COLS pixel array in raster order with a 2-D address
// counter and runs each addressed pixel through the phases of the
// charge-sharing cell, one clock each (25 ns at 40 MHz):
//   PRE    phi1 = 1                      precharge
//   UG     phi1 = 0, sw1 = 0             charge sharing, unit-gain buffer
//   SENSE  sw1 = 1                       attenuator / 3T inverter sensing
//   EVAL   sw1 = 1, sa_en = 1            comparator decides
// At the end of EVAL the cell's binary output `pix_in` is written to the
// image memory at row*COLS+col, so a frame takes 4*ROWS*COLS clocks.
// `start` (while idle) begins a frame; `busy` is high until the one-clock
// `done`; `ridges` counts the black pixels of the frame.
// The phase order and the signals phi1, SW1 and SA_en come from the
// source; one clock per phase, the raster order and the memory layout are
// this design's choices.
module sensor_ctrl #(
  parameter int unsigned ROWS = thin_pkg::IMG_ROWS,
  parameter int unsigned COLS = thin_pkg::IMG_COLS,
  localparam int unsigned AW = $clog2(ROWS * COLS),
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [31:0]   ridges,
  // addressed pixel and its phase signals
  output logic [RW-1:0] row,
  output logic [CW-1:0] col,
  output logic          phi1,
  output logic          sw1,
  output logic          sa_en,
  input  logic          pix_in,
  // image memory write port
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output logic          mem_wdata
);

  typedef enum logic [2:0] {P_IDLE, P_PRE, P_UG, P_SENSE, P_EVAL} phase_t;
  phase_t phase;

  logic last, adv;
  assign adv = (phase == P_EVAL);

  pixel_counter #(.ROWS(ROWS), .COLS(COLS)) u_cnt (
    .clk, .rst_n, .clr(start && phase == P_IDLE), .en(adv),
    .row, .col, .last
  );

  assign busy  = (phase != P_IDLE);
  assign phi1  = (phase == P_PRE);
  assign sw1   = (phase == P_SENSE) || (phase == P_EVAL);
  assign sa_en = (phase == P_EVAL);

  assign mem_we    = adv;
  assign mem_waddr = AW'(row) * AW'(COLS) + AW'(col);
  assign mem_wdata = pix_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= P_IDLE;
      done   <= 1'b0;
      ridges <= '0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        P_IDLE:  if (start) begin
          phase  <= P_PRE;
          ridges <= '0;
        end
        P_PRE:   phase <= P_UG;
        P_UG:    phase <= P_SENSE;
        P_SENSE: phase <= P_EVAL;
        P_EVAL: begin
          ridges <= ridges + 32'(pix_in);
          if (last) begin
            phase <= P_IDLE;
            done  <= 1'b1;
          end else begin
            phase <= P_PRE;
          end
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

endmodule
