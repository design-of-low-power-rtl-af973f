// Thinning stage 2: erase decision of the second ZS sub-iteration.
//
// Combinational. For the 3x3 window `win` (numbering in thin_pkg) the
// centre pixel is erased when
//     2 <= N(Pc) <= 6,  S(Pc) == 1,  P2*P4*P8 == 0  and  P2*P4*P6 == 0.
// With P6 above, P4 right, P2 below and P8 left of the centre, the two
// product terms remove pixels on the south and east borders of a ridge,
// the complement of stage 1. The conditions are the source's own; the
// one-bit interface is this design's choice.
module zs_stage2
  import thin_pkg::*;
(
  input  window_t win,
  output logic    erase,
  output logic    pix_out
);

  always_comb begin
    erase   = zs_common(win) && !(win.p2 && win.p4 && win.p8)
                             && !(win.p2 && win.p4 && win.p6);
    pix_out = win.pc && !erase;
  end

endmodule
