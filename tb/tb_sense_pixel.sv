// Test of the pixel cell model: runs the precharge, unit-gain, sensing and
// evaluate phases for a sequence of ridge/valley contacts and checks the
// binary output (ridge = 1), that it holds between decisions, and that the
// static-current flag is set only from sensing to the decision. The
// charge-sharing levels, VDD*(Cp2+Cf)/(Cp1+Cp2+Cf) = 1925 mV on a ridge and
// 1320 mV over a valley (a 0.6 V difference), are checked from outside by
// four more cells whose inverter threshold sits 5 mV either side of them.
module tb_sense_pixel;
  logic phi1 = 0, sw1 = 0, sa_en = 0, contact = 0;
  logic pix, static_on;
  int checks = 0, failures = 0;

  sense_pixel dut (.phi1, .sw1, .sa_en, .contact, .pix, .static_on);

  logic pr_lo, pr_hi, pv_lo, pv_hi;
  sense_pixel #(.VTH_INV_MV(1920)) u_r_lo (.phi1, .sw1, .sa_en, .contact, .pix(pr_lo), .static_on());
  sense_pixel #(.VTH_INV_MV(1930)) u_r_hi (.phi1, .sw1, .sa_en, .contact, .pix(pr_hi), .static_on());
  sense_pixel #(.VTH_INV_MV(1315)) u_v_lo (.phi1, .sw1, .sa_en, .contact, .pix(pv_lo), .static_on());
  sense_pixel #(.VTH_INV_MV(1325)) u_v_hi (.phi1, .sw1, .sa_en, .contact, .pix(pv_hi), .static_on());

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one pixel read-out, 25 ns per phase
  task automatic sense(input bit c);
    contact = c;
    phi1 = 1; #25;
    phi1 = 0; #25;
    check(static_on == 0, "no static current before sensing");
    sw1 = 1; #25;
    check(static_on == 1, "static current while sensing");
    sa_en = 1; #1;
    check(static_on == 0, "static current cut after decision");
    check(pix == c, $sformatf("output %0b for contact %0b", pix, c));
    #24;
    sw1 = 0; sa_en = 0;
    contact = !c; #25;
    check(pix == c, "output held until next decision");
  endtask

  initial begin
    bit pattern[12] = '{1, 0, 0, 1, 1, 0, 1, 0, 1, 1, 0, 0};
    #10;
    foreach (pattern[i]) sense(pattern[i]);
    sense(1);   // ridge: 1925 mV lies between 1920 and 1930
    check(pr_lo == 1 && pr_hi == 0, "ridge level between 1920 and 1930 mV");
    sense(0);   // valley: 1320 mV lies between 1315 and 1325
    check(pv_lo == 1 && pv_hi == 0, "valley level between 1315 and 1325 mV");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
