// obc_top: glue hardware of the CubeSat on-board computer.
//
// Three independent parts stand side by side:
//   - obc_fpga, the decoding and camera-control FPGA on the OBC board. It
//     turns the microcontroller's chip-select lines and address bits into
//     the PROM, flash and RAM selects and the RAM byte enables, and during a
//     picture it streams camera pixels into five RAM chips by direct memory
//     access (address counter, chip selects, per-pixel write strobe) and
//     raises finish to wake the microcontroller.
//   - psu_boot_supervisor, the boot-ROM selection and external-watchdog
//     function of the power supply unit, which powers, resets and chooses the
//     boot ROM of the microcontroller;
//   - bch_byte_codec, the double-error-correcting (15,5) BCH code that
//     protects bytes stored in the radiation-sensitive RAM (two 15-bit
//     words per byte). The design runs this code as microcontroller
//     software; here it is a combinational encoder/decoder pair.
// The microcontroller, memories and camera are external chips; their
// signals are the ports of this module. Both parts use the same clock here;
// the supervisor counts its own slow tick.
module obc_top
  import obc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // microcontroller bus
  input  logic [4:0]           cs_n,
  input  logic                 a0,
  input  logic                 a18,
  input  logic                 a19,
  input  logic                 bhe_n,
  input  logic                 rw_mcu_n,
  input  logic                 cce,
  input  logic                 cclr,
  // camera
  input  logic                 hclk,
  input  logic                 vclk,
  input  logic                 sync,
  // memories
  output logic                 prom_lb_n,
  output logic                 prom_ub_n,
  output logic                 flash_lb_n,
  output logic                 flash_ub_n,
  output logic [RAM_CHIPS-1:0] ram_cs_n,
  output logic                 ram_lb_n,
  output logic                 ram_ub_n,
  output logic                 rw_n,
  output logic [RAM_ADDR_W-1:0] cam_addr,
  output logic                 cam_addr_oe,
  output bus_owner_e           bus_owner,
  output logic                 finish,
  // power supply unit side
  input  logic                 psu_rst_n,
  input  logic                 tick,
  input  logic                 wdt_kick,
  input  logic                 sel_flash,
  output logic                 mcu_power,
  output logic                 mcu_rstin_n,
  output logic                 boot_sel,
  output logic                 boot_failed,
  output logic                 wdt_expired,
  // error-correcting code
  input  logic [7:0]           ecc_wr_data,
  output logic [29:0]          ecc_wr_code,
  input  logic [29:0]          ecc_rd_code,
  output logic [7:0]           ecc_rd_data,
  output logic [2:0]           ecc_rd_corrected,
  output logic                 ecc_rd_uncorrectable
);

  obc_fpga u_fpga (
    .clk, .rst_n, .cs_n, .a0, .a18, .a19, .bhe_n, .rw_mcu_n, .cce, .cclr,
    .hclk, .vclk, .sync,
    .prom_lb_n, .prom_ub_n, .flash_lb_n, .flash_ub_n, .ram_cs_n,
    .ram_lb_n, .ram_ub_n, .rw_n, .cam_addr, .cam_addr_oe, .bus_owner, .finish
  );

  psu_boot_supervisor u_psu (
    .clk, .rst_n(psu_rst_n), .tick, .kick(wdt_kick), .sel_flash,
    .mcu_power, .mcu_rstin_n, .boot_sel, .boot_failed, .wdt_expired
  );

  bch_byte_codec u_ecc (
    .wr_data(ecc_wr_data), .wr_code(ecc_wr_code),
    .rd_code(ecc_rd_code), .rd_data(ecc_rd_data),
    .rd_corrected(ecc_rd_corrected), .rd_uncorrectable(ecc_rd_uncorrectable)
  );

endmodule
