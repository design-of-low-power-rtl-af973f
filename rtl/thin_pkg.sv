// Shared types and functions of the Zhang-Suen (ZS) thinning datapath.
//
// A pixel is one bit: 1 is black (ridge), 0 is white (valley). The 3x3
// window around the centre pixel Pc uses the neighbour numbering
//
//      P7 P6 P5
//      P8 Pc P4
//      P1 P2 P3
//
// so that P1..P8 run once around the centre. N(Pc) is the number of black
// neighbours and S(Pc) the number of 1->0 changes met when walking
// P1,P2,...,P8 and back to P1. Both ZS sub-iterations share the test
// "Pc black, 2 <= N <= 6, S == 1"; they differ only in two product terms,
// which live in zs_stage1 and zs_stage2.
//
// The default image size, 160 columns by 192 rows, is the sensor format of
// the design. Which of the two numbers is the row length is not fixed by
// the source; 160 pixels per row is this design's choice.
package thin_pkg;

  localparam int unsigned IMG_COLS = 160;
  localparam int unsigned IMG_ROWS = 192;

  // 3x3 neighbourhood, one bit per position.
  typedef struct packed {
    logic p8, p7, p6, p5, p4, p3, p2, p1;
    logic pc;
  } window_t;

  // N(Pc): number of black neighbours, 0..8.
  function automatic logic [3:0] black_neighbours(input window_t w);
    return 4'(w.p1) + 4'(w.p2) + 4'(w.p3) + 4'(w.p4)
         + 4'(w.p5) + 4'(w.p6) + 4'(w.p7) + 4'(w.p8);
  endfunction

  // S(Pc): number of 1->0 changes around the cyclic sequence P1..P8,P1.
  function automatic logic [3:0] one_to_zero(input window_t w);
    logic [8:0] ring;
    logic [3:0] s;
    ring = {w.p1, w.p8, w.p7, w.p6, w.p5, w.p4, w.p3, w.p2, w.p1};
    s = '0;
    for (int i = 0; i < 8; i++)
      if (ring[i] && !ring[i+1]) s = s + 4'd1;
    return s;
  endfunction

  // Test common to both sub-iterations.
  function automatic logic zs_common(input window_t w);
    logic [3:0] n;
    n = black_neighbours(w);
    return w.pc && (n >= 4'd2) && (n <= 4'd6) && (one_to_zero(w) == 4'd1);
  endfunction

endpackage
