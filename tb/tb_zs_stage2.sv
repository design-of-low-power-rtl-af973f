// Exhaustive test of thinning stage 2: all 512 3x3 windows are applied and
// the erase decision and surviving pixel are compared with the compass-
// based reference of zs_ref_pkg. Also checks that the stage erases some
// windows and keeps others, and that the known one-pixel line end is kept.
module tb_zs_stage2;
  import thin_pkg::*;
  import zs_ref_pkg::*;

  window_t win;
  logic    erase_o, pix_o;
  int      checks = 0, failures = 0, n_erased = 0;

  zs_stage2 dut (.win(win), .erase(erase_o), .pix_out(pix_o));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit nb[9];
    bit exp_e;
    for (int v = 0; v < 512; v++) begin
      for (int i = 0; i < 9; i++) nb[i] = v[i];
      win.p7 = nb[0]; win.p6 = nb[1]; win.p5 = nb[2];
      win.p8 = nb[3]; win.pc = nb[4]; win.p4 = nb[5];
      win.p1 = nb[6]; win.p2 = nb[7]; win.p3 = nb[8];
      #1;
      exp_e = erase(nb, 2);
      checks += 2;
      if (erase_o !== exp_e) begin
        failures++;
        if (failures < 10) $display("window %03x: erase %0b expected %0b", v, erase_o, exp_e);
      end
      if (pix_o !== (nb[4] && !exp_e)) failures++;
      n_erased += int'(exp_e);
    end
    checks++;
    if (n_erased == 0 || n_erased == 256) failures++;
    $display("stage 2 erases %0d of 512 windows", n_erased);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
