// Thinning stage 1: erase decision of the first ZS sub-iteration.
//
// Combinational. For the 3x3 window `win` (numbering in thin_pkg) the
// centre pixel is erased when
//     2 <= N(Pc) <= 6,  S(Pc) == 1,  P2*P6*P8 == 0  and  P4*P6*P8 == 0.
// With P6 above, P4 right, P2 below and P8 left of the centre, the two
// product terms remove pixels on the west and north borders of a ridge.
// The conditions are the source's own; the one-bit interface (`erase`,
// plus the surviving pixel value `pix_out`) is this design's choice.
module zs_stage1
  import thin_pkg::*;
(
  input  window_t win,
  output logic    erase,
  output logic    pix_out
);

  always_comb begin
    erase   = zs_common(win) && !(win.p2 && win.p6 && win.p8)
                             && !(win.p4 && win.p6 && win.p8);
    pix_out = win.pc && !erase;
  end

endmodule
