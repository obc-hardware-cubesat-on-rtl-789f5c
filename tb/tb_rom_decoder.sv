// tb_rom_decoder: exhaustive check of the PROM/flash byte-device selects.
// All 16 combinations of CS0#, A18, A0 and BHE# are applied; the expected
// selects come from the rule "PROM when CS0# low and A18 low, flash when
// CS0# low and A18 high; low device needs A0 = 0, high device BHE# = 0".
module tb_rom_decoder;
  logic cs0_n, a18, a0, bhe_n;
  logic prom_lb_n, prom_ub_n, flash_lb_n, flash_ub_n;
  int checks = 0, failures = 0;

  rom_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic sel_rom, exp_plb, exp_pub, exp_flb, exp_fub;
      {cs0_n, a18, a0, bhe_n} = 4'(v);
      #1;
      sel_rom = (cs0_n == 1'b0);
      exp_plb = !(sel_rom && !a18 && !a0);
      exp_pub = !(sel_rom && !a18 && !bhe_n);
      exp_flb = !(sel_rom &&  a18 && !a0);
      exp_fub = !(sel_rom &&  a18 && !bhe_n);
      checks++;
      if ({prom_lb_n, prom_ub_n, flash_lb_n, flash_ub_n} !== {exp_plb, exp_pub, exp_flb, exp_fub}) begin
        failures++;
        $display("FAIL v=%b got %b exp %b", 4'(v),
                 {prom_lb_n, prom_ub_n, flash_lb_n, flash_ub_n}, {exp_plb, exp_pub, exp_flb, exp_fub});
      end
      // never more than one ROM type at a time
      checks++;
      if (!((prom_lb_n & prom_ub_n) | (flash_lb_n & flash_ub_n))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
