// obc_fpga: the glue-logic FPGA of the on-board computer.
//
// One antifuse FPGA holds all logic between the microcontroller (MCU), the
// memories and the camera:
//   - decoding logic (DCL): PROM/flash selects in the CS0 window
//     (rom_decoder), RAM1..RAM8 selects from CS1..CS4 and A19 (ram_decoder)
//     and the RAM byte enables (byte_enable);
//   - camera control logic (CCL): the per-pixel RAM write strobe and the
//     address-counter clock (cam_write_pulse), the 21-bit image address
//     counter (cam_addr_counter) and the camera chip-select decoder with the
//     finish signal (cam_cs_decoder).
// Taking a picture is direct memory access: the MCU releases the parallel
// bus (it runs from its on-chip XRAM in idle mode), the camera drives the
// data bus, the FPGA drives the RAM address lines A1..A18 from its counter,
// selects the RAM chip and strobes R/W#. When five RAM chips are full,
// finish goes high; it is wired to the MCU's EX7IN interrupt and wakes it.
//
// The MCU and camera write strobes are merged with an AND (both active low),
// so either can write and the RAMs read when neither does.
// cam_addr_oe tells the board which side drives A1..A18: it is high while a
// transfer is in progress (bus owner is the camera). An assertion checks the
// arbitration rule that the MCU does not write while the camera owns the bus.
//
// Clocking: one clock, 8 x the camera master clock in the default setting
// (100 MHz for a 12.5 MHz MCLK). Chip selects from the MCU side are
// combinational from the bus pins, as in a PLD; camera-side outputs change
// on clock edges.
module obc_fpga
  import obc_pkg::*;
#(
  parameter int unsigned T_P_CYCLES = 2,             // camera strobe high time, clocks
  parameter int unsigned COUNT_W    = CAM_COUNT_W,   // image address counter width
  parameter int unsigned BLOCKS     = IMAGE_BLOCKS   // RAM chips filled by one image
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // MCU bus side
  input  logic [4:0]            cs_n,        // CS0#..CS4#
  input  logic                  a0,
  input  logic                  a18,
  input  logic                  a19,
  input  logic                  bhe_n,
  input  logic                  rw_mcu_n,    // MCU write strobe (WR#)
  input  logic                  cce,         // capture enable (MCU port pin)
  input  logic                  cclr,        // counter clear (MCU port pin)
  // camera
  input  logic                  hclk,
  input  logic                  vclk,
  input  logic                  sync,
  // memory side
  output logic                  prom_lb_n,
  output logic                  prom_ub_n,
  output logic                  flash_lb_n,
  output logic                  flash_ub_n,
  output logic [RAM_CHIPS-1:0]  ram_cs_n,    // RAM1#..RAM8#
  output logic                  ram_lb_n,
  output logic                  ram_ub_n,
  output logic                  rw_n,        // write strobe to all RAM chips
  output logic [COUNT_W-4:0]    cam_addr,    // word address onto bus A1..A(COUNT_W-3)
  output logic                  cam_addr_oe, // FPGA drives the address lines
  output bus_owner_e            bus_owner,
  output logic                  finish       // image complete, to MCU EX7IN
);
  logic                 cam_we_n, acc, active;
  logic [COUNT_W-1:0]   count;
  logic [RAM_CHIPS-1:0] cam_sel_n;

  rom_decoder u_rom_dec (
    .cs0_n(cs_n[0]), .a18, .a0, .bhe_n,
    .prom_lb_n, .prom_ub_n, .flash_lb_n, .flash_ub_n
  );

  ram_decoder u_ram_dec (
    .cs_n(cs_n[4:1]), .a19, .cam_sel_n, .ram_cs_n
  );

  byte_enable u_byte_en (
    .a0, .bhe_n, .word_en(active), .ram_lb_n, .ram_ub_n
  );

  cam_write_pulse #(.T_P_CYCLES(T_P_CYCLES)) u_pulse (
    .clk, .rst_n, .hclk, .vclk, .sync, .cce, .cclr, .finish,
    .cam_we_n, .acc, .active
  );

  cam_addr_counter #(.WIDTH(COUNT_W)) u_counter (
    .clk, .rst_n, .clr(cclr), .acc, .count
  );

  cam_cs_decoder #(.BLOCKS(BLOCKS)) u_cam_dec (
    .blk(count[COUNT_W-1 -: 3]), .enable(active), .cam_sel_n, .finish
  );

  assign rw_n        = rw_mcu_n & cam_we_n;
  assign cam_addr    = count[COUNT_W-4:0];
  assign cam_addr_oe = active;
  assign bus_owner   = active ? BUS_CAMERA : BUS_MCU;

  // Bus arbitration rule: the MCU is idle and off the bus during a transfer.
  property p_mcu_quiet_during_transfer;
    @(posedge clk) (rst_n && active) |-> rw_mcu_n;
  endproperty
  a_mcu_quiet: assert property (p_mcu_quiet_during_transfer)
    else $error("MCU write strobe active while the camera owns the bus");

endmodule
