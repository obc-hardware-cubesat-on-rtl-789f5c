// tb_obc_top: end-to-end test of the whole design at its full size.
// The testbench plays the microcontroller, eight 256k x 16 RAM chips and the
// camera (1280 x 1024 pixels, 44 MCLK row blanking, 1028 row times of
// integration, MCLK = clock / 8, i.e. 12.5 MHz for a 100 MHz clock).
// One complete operation of each part:
//   - MCU word and byte accesses to all eight RAM chips, PROM/flash selects
//     including the flash program command writes (AAAA to 0x555, 5555 to
//     0x2AA, A0A0 to 0x555 in the flash half of the CS0 window);
//   - one full picture: every one of the 1,310,720 pixels is compared in
//     RAM1..RAM5, RAM6..RAM8 stay untouched, the row time is 1324 MCLK and
//     the picture (SYNC to finish) takes about 217 ms;
//   - PSU supervisor with its default timers: failed PROM boot, switch to
//     flash, good boot, watchdog service, flash selection, watchdog restart;
//   - ECC: bytes encoded, corrupted with two errors per half, corrected; a
//     triple error is flagged.
// Every mechanism is counted and must have happened at least once.
module tb_obc_top;
  import obc_pkg::*;
  localparam int unsigned CW    = CAM_COUNT_W;
  localparam int unsigned AW    = CW - 3;
  localparam int unsigned PIX   = PIXELS_PER_ROW;
  localparam int unsigned NROWS = ROWS;
  localparam int unsigned INTR  = 1028;
  localparam int unsigned BLANK = 44;
  localparam int unsigned CPM   = 8;    // clocks per MCLK

  logic clk, rst_n;
  logic [4:0] cs_n = '1;
  logic a0 = 1, a18 = 0, a19 = 0, bhe_n = 1, rw_mcu_n = 1, cce = 0, cclr = 0;
  logic hclk, vclk, sync, trigger = 0, cam_busy;
  logic [9:0] cam_data;
  logic prom_lb_n, prom_ub_n, flash_lb_n, flash_ub_n, ram_lb_n, ram_ub_n, rw_n, cam_addr_oe, finish;
  logic [RAM_CHIPS-1:0] ram_cs_n;
  logic [AW-1:0] cam_addr, mcu_addr = '0, bus_addr;
  logic [15:0] mcu_wdata = '0, bus_data, rdata_all;
  logic [15:0] rdata [RAM_CHIPS];
  bus_owner_e bus_owner;
  int checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // PSU and ECC sides
  logic psu_rst_n = 0, tick = 0, wdt_kick = 0, sel_flash = 0;
  logic mcu_power, mcu_rstin_n, boot_sel, boot_failed, wdt_expired;
  logic [7:0] ecc_wr_data = '0, ecc_rd_data;
  logic [29:0] ecc_wr_code, ecc_rd_code = '0;
  logic [2:0] ecc_rd_corrected;
  logic ecc_rd_uncorrectable;

  obc_top dut (.*);

  camera_model #(.PIX(PIX), .ROWS(NROWS), .BLANK(BLANK), .INT_ROWS(INTR), .CLK_PER_MCLK(CPM)) cam (
    .clk, .trigger, .hclk, .vclk, .sync, .data(cam_data), .busy(cam_busy));

  // the parallel bus: the camera side drives it while the FPGA owns the address lines
  assign bus_addr = cam_addr_oe ? cam_addr : mcu_addr;
  assign bus_data = (bus_owner == BUS_CAMERA) ? {6'b0, cam_data} : mcu_wdata;

  for (genvar i = 0; i < RAM_CHIPS; i++) begin : g_ram
    sram_model #(.AW(AW)) ram (
      .clk, .cs_n(ram_cs_n[i]), .we_n(rw_n), .oe_n(1'b0), .lb_n(ram_lb_n), .ub_n(ram_ub_n),
      .addr(bus_addr), .wdata(bus_data), .rdata(rdata[i]));
  end
  always_comb begin
    rdata_all = '0;
    for (int i = 0; i < RAM_CHIPS; i++) rdata_all |= rdata[i];
  end

  // ------------------------------------------------------------- mechanisms
  int unsigned n_byte_only = 0, n_chip_switch = 0, n_row_gap = 0, n_word_en = 0, n_finish = 0;
  int unsigned n_acc = 0, t_first_acc = 0, t_last_acc = 0, cyc = 0, n_cam_cs_lost = 0;
  logic [RAM_CHIPS-1:0] cam_cs_prev = '1;
  logic vclk_prev = 1'b1, finish_prev = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_fpga.acc) begin
      n_acc <= n_acc + 1;
      if (n_acc == 0) t_first_acc <= cyc;
      t_last_acc <= cyc;
    end
    if (bus_owner == BUS_CAMERA) begin
      if (ram_cs_n != cam_cs_prev && cam_cs_prev != '1 && ram_cs_n != '1) n_chip_switch <= n_chip_switch + 1;
      cam_cs_prev <= ram_cs_n;
      if (!ram_lb_n && !ram_ub_n && a0 && bhe_n) n_word_en <= n_word_en + 1;
      if (vclk && !vclk_prev && n_acc > 0) n_row_gap <= n_row_gap + 1;
      if (!rw_mcu_n) n_cam_cs_lost <= n_cam_cs_lost + 1;
    end
    vclk_prev <= vclk;
    if (finish && !finish_prev) n_finish <= n_finish + 1;
    finish_prev <= finish;
  end

  // flash / PROM write strobes seen by the ROM devices (both byte devices)
  int unsigned n_flash_wr = 0, n_prom_wr = 0;
  logic rw_prev = 1'b1;
  always @(posedge clk) begin
    if (!rw_n && rw_prev && !flash_lb_n && !flash_ub_n) n_flash_wr <= n_flash_wr + 1;
    if (!rw_n && rw_prev && (!prom_lb_n || !prom_ub_n)) n_prom_wr <= n_prom_wr + 1;
    rw_prev <= rw_n;
  end

  // ------------------------------------------------------------- PSU side
  int unsigned n_boot_fail = 0, n_wdt = 0, n_flash_boot = 0, ticks = 0, tdiv = 0;
  logic psu_done = 1'b0;
  always @(posedge clk) begin
    tdiv <= (tdiv == 15) ? 0 : tdiv + 1;
    tick <= (tdiv == 15);
    if (tick) ticks <= ticks + 1;
    if (boot_failed) n_boot_fail <= n_boot_fail + 1;
    if (wdt_expired) n_wdt <= n_wdt + 1;
  end
  task automatic wait_ticks(int unsigned n);
    int unsigned t0 = ticks;
    while (ticks - t0 < n) @(posedge clk);
  endtask
  task automatic pulse_kick();
    @(negedge clk) wdt_kick = 1; @(negedge clk) wdt_kick = 0;
  endtask
  initial begin
    repeat (3) @(posedge clk);
    psu_rst_n = 1;
    // the PROM boot "fails" (no kick): after 5000 ticks flash is selected
    wait_ticks(4990);
    check("PSU: PROM boot still running", mcu_power && !boot_sel && n_boot_fail == 0);
    wait_ticks(20);
    check("PSU: boot failed, flash selected, MCU off", n_boot_fail == 1 && boot_sel && !mcu_power);
    wait_ticks(3010);
    check("PSU: MCU on again from flash", mcu_power && boot_sel);
    n_flash_boot++;
    pulse_kick();                                      // the flash boot succeeds
    for (int i = 0; i < 5; i++) begin wait_ticks(9000); pulse_kick(); end
    check("PSU: kept alive", mcu_power && n_wdt == 0);
    @(negedge clk) sel_flash = 1; @(negedge clk) sel_flash = 0;
    wait_ticks(10010);
    check("PSU: watchdog restart", n_wdt == 1 && !mcu_power && boot_sel);
    wait_ticks(3010);
    check("PSU: restarted", mcu_power);
    psu_done = 1'b1;
  end

  // ------------------------------------------------------------- ECC side
  int unsigned n_ecc_fix = 0, n_ecc_detect = 0;
  logic ecc_done = 1'b0;
  initial begin
    logic [29:0] code;
    repeat (10) @(posedge clk);
    for (int b = 0; b < 256; b += 17) begin
      @(negedge clk) ecc_wr_data = 8'(b);
      #1 code = ecc_wr_code;
      ecc_rd_code = code ^ 30'h0000_0011 ^ 30'h0201_0000;  // two errors in each half
      #1;
      check("ECC corrects 2+2 errors", ecc_rd_data == 8'(b) && ecc_rd_corrected == 3'd4 && !ecc_rd_uncorrectable);
      if (ecc_rd_corrected != 0) n_ecc_fix++;
      ecc_rd_code = code ^ 30'h0000_0007;                    // three errors in the low half
      #1;
      check("ECC flags 3 errors", ecc_rd_uncorrectable);
      if (ecc_rd_uncorrectable) n_ecc_detect++;
    end
    ecc_done = 1'b1;
  end

  // ------------------------------------------------------------- MCU model
  task automatic mcu_cycle(int cs, logic sel19, logic sel18, logic [AW-1:0] wa, logic ba0, logic bhen,
                           logic wr, logic [15:0] wd);
    @(negedge clk);
    cs_n = '1; cs_n[cs] = 1'b0; a19 = sel19; a18 = sel18; mcu_addr = wa; a0 = ba0; bhe_n = bhen;
    mcu_wdata = wd;
    @(negedge clk);
    if (wr) rw_mcu_n = 1'b0;
    repeat (4) @(negedge clk);
    rw_mcu_n = 1'b1;
    @(negedge clk);
  endtask

  task automatic mcu_release();
    @(negedge clk);
    cs_n = '1; a0 = 1'b1; bhe_n = 1'b1; rw_mcu_n = 1'b1;
  endtask

  task automatic ram_write(int chip, logic [AW-1:0] wa, logic [15:0] wd, logic ba0 = 0, logic bhen = 0);
    mcu_cycle(chip / 2 + 1, 1'(chip % 2), 1'b0, wa, ba0, bhen, 1'b1, wd);
    mcu_release();
  endtask

  task automatic ram_read(int chip, logic [AW-1:0] wa, output logic [15:0] rd);
    @(negedge clk);
    cs_n = '1; cs_n[chip / 2 + 1] = 1'b0; a19 = 1'(chip % 2); mcu_addr = wa; a0 = 0; bhe_n = 0;
    @(negedge clk);
    rd = rdata_all;
    mcu_release();
  endtask

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [9:0] pixel_value(int unsigned r, int unsigned c);
    return 10'((r * 37) ^ (c * 5) ^ (r >> 3) ^ (c << 4));
  endfunction

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rd;
    int unsigned t_trig, t_fin, exp_pic;
    rst_n = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;

    // ---- MCU word access to every RAM chip
    for (int c = 0; c < RAM_CHIPS; c++) begin
      ram_write(c, AW'(3), 16'(16'h1000 * c + 16'h0a5));
      ram_write(c, AW'(40), 16'(16'h0111 * (c + 1)));
    end
    for (int c = 0; c < RAM_CHIPS; c++) begin
      ram_read(c, AW'(3), rd);
      check($sformatf("word read chip %0d", c), rd == 16'(16'h1000 * c + 16'h0a5));
      check($sformatf("write count chip %0d", c), g_ram[0].ram.writes == 2 || c != 0);
    end
    for (int c = 0; c < RAM_CHIPS; c++) begin
      ram_read(c, AW'(40), rd);
      check($sformatf("word read 40 chip %0d", c), rd == 16'(16'h0111 * (c + 1)));
    end
    // ---- byte writes into RAM7, word 40 (0x0777)
    ram_write(6, AW'(40), 16'h00cc, 1'b0, 1'b1);   // low byte only
    n_byte_only++;
    ram_write(6, AW'(40), 16'hee00, 1'b1, 1'b0);   // high byte only
    n_byte_only++;
    ram_read(6, AW'(40), rd);
    check("byte writes", rd == 16'heecc);

    // ---- ROM selects
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      cs_n = 5'b11110; {a18, a0, bhe_n} = 3'(v);
      #1;
      check($sformatf("rom select %b", 3'(v)),
            {prom_lb_n, prom_ub_n, flash_lb_n, flash_ub_n} ==
            {a18 | a0, a18 | bhe_n, !a18 | a0, !a18 | bhe_n});
      check("no RAM with CS0", ram_cs_n == '1);
    end
    mcu_release();
    // flash program command: three command writes, then the data word
    mcu_cycle(0, 1'b0, 1'b1, AW'(17'h0555), 1'b0, 1'b0, 1'b1, 16'haaaa); mcu_release();
    mcu_cycle(0, 1'b0, 1'b1, AW'(17'h02aa), 1'b0, 1'b0, 1'b1, 16'h5555); mcu_release();
    mcu_cycle(0, 1'b0, 1'b1, AW'(17'h0555), 1'b0, 1'b0, 1'b1, 16'ha0a0); mcu_release();
    mcu_cycle(0, 1'b0, 1'b1, AW'(17'h1234), 1'b0, 1'b0, 1'b1, 16'hbeef); mcu_release();
    check("four flash word writes", n_flash_wr == 4 && n_prom_wr == 0);

    // ---- picture transfer
    @(negedge clk) cclr = 1;
    @(negedge clk) cclr = 0; cce = 1; trigger = 1;   // MCU: arm, trigger, go idle
    @(negedge clk) trigger = 0;
    t_trig = cyc;
    wait (finish === 1'b1);
    t_fin = cyc;
    repeat (20) @(posedge clk);
    check("finish high", finish);
    // trigger -> SYNC after 3 MCLK, 1 MCLK SYNC, integration, 1024 rows
    // (the last without its blanking), strobe latency of a few clocks
    exp_pic = (4 + (INTR + NROWS) * (PIX + BLANK) - BLANK) * CPM;
    $display("picture time %0d cycles = %0d us at 100 MHz (expected about %0d)", t_fin - t_trig,
             (t_fin - t_trig) / 100, exp_pic);
    check("picture time about 217 ms", (t_fin - t_trig) + 16 >= exp_pic && (t_fin - t_trig) <= exp_pic + 16);
    check("camera released bus", bus_owner == BUS_MCU && !cam_addr_oe);
    check("one pulse per pixel", n_acc == PIX * NROWS);
    check("row period and transfer time",
          t_last_acc - t_first_acc == (NROWS - 1) * (PIX + BLANK) * CPM + (PIX - 1) * CPM);
    for (int unsigned r = 0; r < NROWS; r++)
      for (int unsigned c = 0; c < PIX; c++) begin
        int unsigned n, chip, w;
        logic [15:0] got;
        n    = r * PIX + c;
        chip = n >> AW;
        w    = n % (1 << AW);
        case (chip)
          0: got = g_ram[0].ram.mem[w];
          1: got = g_ram[1].ram.mem[w];
          2: got = g_ram[2].ram.mem[w];
          3: got = g_ram[3].ram.mem[w];
          default: got = g_ram[4].ram.mem[w];
        endcase
        checks++;
        if (got !== {6'b0, pixel_value(r, c)}) begin
          failures++;
          if (failures < 10) $display("FAIL pixel r%0d c%0d chip%0d w%0d: %h exp %h", r, c, chip, w, got, pixel_value(r, c));
        end
      end
    check("RAM6 untouched", g_ram[5].ram.mem[40] == 16'h0666 && g_ram[5].ram.mem[3] == 16'h50a5);
    check("RAM5 last word is the last pixel", g_ram[4].ram.mem[(1 << AW) - 1] == {6'b0, pixel_value(NROWS - 1, PIX - 1)});
    check("RAM7 untouched", g_ram[6].ram.mem[40] == 16'heecc);
    check("RAM8 untouched", g_ram[7].ram.mem[40] == 16'h0888);
    // MCU reads the picture through the decoder: a pixel of row r2 sits in RAM2
    begin
      int unsigned r2;
      r2 = (1 << AW) / PIX + 1;
      ram_read(1, AW'(r2 * PIX + 7 - (1 << AW)), rd);
      check("MCU reads pixel back", rd == {6'b0, pixel_value(r2, 7)});
    end
    // clear for the next picture: the counter and the enable flag re-arm
    @(negedge clk) cclr = 1;
    @(negedge clk) cclr = 0; cce = 0;
    @(posedge clk); #1;
    check("cleared", !finish && dut.u_fpga.count == '0 && bus_owner == BUS_MCU);

    wait (psu_done && ecc_done);
    // ---- mechanisms
    check("boot failure happened", n_boot_fail >= 1);
    check("boot from flash happened", n_flash_boot >= 1);
    check("watchdog restart happened", n_wdt >= 1);
    check("ECC correction happened", n_ecc_fix > 0);
    check("ECC detection happened", n_ecc_detect > 0);
    check("flash command writes happened", n_flash_wr == 4);
    check("byte-only writes happened", n_byte_only == 2);
    check("camera switched chips 4 times", n_chip_switch == 4);
    check("row gaps", n_row_gap >= NROWS - 1);
    check("word enable override", n_word_en > 0);
    check("finish rose once", n_finish == 1);
    check("MCU kept off the bus", n_cam_cs_lost == 0);
    $display("mechanisms: boot_fail=%0d flash_boot=%0d wdt=%0d ecc_fix=%0d ecc_detect=%0d flash_wr=%0d",
             n_boot_fail, n_flash_boot, n_wdt, n_ecc_fix, n_ecc_detect, n_flash_wr);
    $display("mechanisms: byte_only=%0d chip_switch=%0d row_gap=%0d word_en=%0d finish=%0d",
             n_byte_only, n_chip_switch, n_row_gap, n_word_en, n_finish);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
