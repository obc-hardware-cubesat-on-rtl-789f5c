// tb_flash_program: programming the flash through the decoding FPGA, the
// way the on-board software updates its application code. Four byte-wide
// devices hang on the CS0 window: PROM low/high byte (A18 = 0) and flash
// low/high byte (A18 = 1). The testbench plays the MCU and, for each of 64
// words, writes the command sequence with doubled data (AAAA to 0x555,
// 5555 to 0x2AA, A0A0 to 0x555) and then the data word, all in the flash
// half of the window. It then reads the words back through the decoder and
// checks that:
//   - every word reads back as written, both bytes;
//   - each flash device programmed exactly 64 bytes, the PROM devices none;
//   - a data write without the command sequence programs nothing;
//   - a byte write (BHE# high) reaches only the low-byte device.
module tb_flash_program;
  import obc_pkg::*;
  logic clk, rst_n;
  logic [4:0] cs_n = '1;
  logic a0 = 1, a18 = 0, a19 = 0, bhe_n = 1, rw_mcu_n = 1;
  logic prom_lb_n, prom_ub_n, flash_lb_n, flash_ub_n, ram_lb_n, ram_ub_n, rw_n, cam_addr_oe, finish;
  logic [RAM_CHIPS-1:0] ram_cs_n;
  logic [17:0] cam_addr;
  bus_owner_e bus_owner;
  logic [16:0] mcu_addr = '0;
  logic [15:0] mcu_wdata = '0, rdata;
  logic [7:0]  r_plb, r_pub, r_flb, r_fub;
  logic        rd_n = 1'b1;
  int checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  obc_fpga dut (.*, .cce(1'b0), .cclr(1'b0), .hclk(1'b0), .vclk(1'b1), .sync(1'b0));

  flash_model prom_lo  (.clk, .ce_n(prom_lb_n),  .we_n(rw_n), .oe_n(rd_n), .addr(mcu_addr), .wdata(mcu_wdata[7:0]),  .rdata(r_plb));
  flash_model prom_hi  (.clk, .ce_n(prom_ub_n),  .we_n(rw_n), .oe_n(rd_n), .addr(mcu_addr), .wdata(mcu_wdata[15:8]), .rdata(r_pub));
  flash_model flash_lo (.clk, .ce_n(flash_lb_n), .we_n(rw_n), .oe_n(rd_n), .addr(mcu_addr), .wdata(mcu_wdata[7:0]),  .rdata(r_flb));
  flash_model flash_hi (.clk, .ce_n(flash_ub_n), .we_n(rw_n), .oe_n(rd_n), .addr(mcu_addr), .wdata(mcu_wdata[15:8]), .rdata(r_fub));
  assign rdata = {r_pub | r_fub, r_plb | r_flb};

  task automatic rom_write(logic sel_flash, logic [16:0] wa, logic [15:0] wd, logic bhen = 1'b0);
    @(negedge clk);
    cs_n = 5'b11110; a18 = sel_flash; mcu_addr = wa; mcu_wdata = wd; a0 = 1'b0; bhe_n = bhen;
    @(negedge clk) rw_mcu_n = 1'b0;
    repeat (3) @(negedge clk);
    rw_mcu_n = 1'b1;
    @(negedge clk) cs_n = '1; a0 = 1'b1; bhe_n = 1'b1;
  endtask

  task automatic rom_read(logic sel_flash, logic [16:0] wa, output logic [15:0] rd);
    @(negedge clk);
    cs_n = 5'b11110; a18 = sel_flash; mcu_addr = wa; a0 = 1'b0; bhe_n = 1'b0; rd_n = 1'b0;
    @(negedge clk) rd = rdata;
    rd_n = 1'b1; cs_n = '1; a0 = 1'b1; bhe_n = 1'b1;
  endtask

  task automatic program_word(logic [16:0] wa, logic [15:0] wd);
    rom_write(1'b1, 17'h555, 16'haaaa);
    rom_write(1'b1, 17'h2aa, 16'h5555);
    rom_write(1'b1, 17'h555, 16'ha0a0);
    rom_write(1'b1, wa, wd);
  endtask

  function automatic logic [15:0] image_word(int i);
    return 16'((i * 16'h9e37) ^ (i << 3) ^ 16'h1234);
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rd;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) program_word(17'h1000 + 17'(i), image_word(i));
    for (int i = 0; i < 64; i++) begin
      rom_read(1'b1, 17'h1000 + 17'(i), rd);
      check($sformatf("flash word %0d", i), rd == image_word(i));
    end
    check("flash devices programmed 64 bytes each", flash_lo.programmed == 64 && flash_hi.programmed == 64);
    check("PROM untouched", prom_lo.programmed == 0 && prom_hi.programmed == 0 &&
                            prom_lo.step == 0 && prom_hi.step == 0);
    rom_read(1'b0, 17'h1000, rd);
    check("PROM still erased", rd == 16'hffff);
    // a data write with no command sequence does nothing
    rom_write(1'b1, 17'h2000, 16'h0000);
    rom_read(1'b1, 17'h2000, rd);
    check("unlocked write rejected", rd == 16'hffff);
    // byte programming: only the low-byte device sees the cycle
    rom_write(1'b1, 17'h555, 16'h00aa, 1'b1);
    rom_write(1'b1, 17'h2aa, 16'h0055, 1'b1);
    rom_write(1'b1, 17'h555, 16'h00a0, 1'b1);
    rom_write(1'b1, 17'h3000, 16'h0042, 1'b1);
    rom_read(1'b1, 17'h3000, rd);
    check("byte program low device only", rd == 16'hff42);
    check("high device unchanged count", flash_hi.programmed == 64 && flash_lo.programmed == 65);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
