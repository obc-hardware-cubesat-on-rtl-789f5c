// tb_psu_boot_supervisor: boot-ROM selection and watchdog, with short timer
// settings (BOOT 20, WDT 30, OFF 10 ticks, one tick every 4 clocks).
// Scenario and expected behaviour, worked out from the algorithm:
//   1. power-on: MCU on, PROM selected;
//   2. no kick: after 20 ticks boot_failed, BootSelect -> flash, MCU off for
//      10 ticks, then on again;
//   3. no kick again: back to PROM;
//   4. kick: running; kicks every 20 ticks keep it running for 200 ticks;
//   5. sel_flash: BootSelect -> flash while running;
//   6. kicks stop: after 30 ticks wdt_expired, MCU off 10 ticks, on again
//      with flash still selected;
//   7. that flash boot fails: back to PROM.
module tb_psu_boot_supervisor;
  logic clk, rst_n, tick = 0, kick = 0, sel_flash = 0;
  logic mcu_power, mcu_rstin_n, boot_sel, boot_failed, wdt_expired;
  int checks = 0, failures = 0;
  int unsigned n_fail = 0, n_wdt = 0, ticks = 0;

  psu_boot_supervisor #(.BOOT_TICKS(20), .WDT_TICKS(30), .OFF_TICKS(10)) dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // tick every 4 clocks
  int unsigned div = 0;
  always @(posedge clk) begin
    div  <= (div == 3) ? 0 : div + 1;
    tick <= (div == 3);
    if (tick) ticks <= ticks + 1;
    if (boot_failed) n_fail <= n_fail + 1;
    if (wdt_expired) n_wdt <= n_wdt + 1;
  end

  task automatic wait_ticks(int unsigned n);
    int unsigned t0 = ticks;
    while (ticks - t0 < n) @(posedge clk);
  endtask

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at tick %0d", what, ticks); end
  endtask

  task automatic do_kick();
    @(negedge clk) kick = 1; @(negedge clk) kick = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check("powered at start", mcu_power && mcu_rstin_n);
    check("PROM at start", boot_sel == 1'b0);
    wait_ticks(18);
    check("still booting at 18 ticks", mcu_power && n_fail == 0);
    wait_ticks(3);
    check("boot timeout after 20 ticks", n_fail == 1);
    check("switched to flash", boot_sel == 1'b1);
    check("MCU off", !mcu_power && !mcu_rstin_n);
    wait_ticks(8);
    check("still off at 8 ticks", !mcu_power);
    wait_ticks(3);
    check("on again after 10 ticks", mcu_power);
    wait_ticks(21);
    check("second timeout", n_fail == 2 && boot_sel == 1'b0);
    wait_ticks(11);
    check("on again, PROM", mcu_power && boot_sel == 1'b0);
    do_kick();   // good boot
    for (int i = 0; i < 10; i++) begin
      wait_ticks(20);
      do_kick();
    end
    check("kept alive by kicks", mcu_power && n_wdt == 0 && n_fail == 2);
    @(negedge clk) sel_flash = 1; @(negedge clk) sel_flash = 0;
    check("flash selected for next boot", boot_sel == 1'b1);
    wait_ticks(28);
    check("no expiry before 30 ticks", n_wdt == 0 && mcu_power);
    wait_ticks(3);
    check("watchdog expired", n_wdt == 1 && !mcu_power);
    check("restart keeps flash", boot_sel == 1'b1);
    wait_ticks(11);
    check("restarted", mcu_power);
    wait_ticks(21);
    check("flash boot failed, back to PROM", n_fail == 3 && boot_sel == 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
