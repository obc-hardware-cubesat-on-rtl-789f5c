// rom_decoder: chip-select decoding for the PROM and flash inside the CS0 window.
//
// The microcontroller's CS0 window covers both ROM types. Address bit A18
// splits it: A18 = 0 selects the one-time-programmable PROM (boot code),
// A18 = 1 selects the flash (updatable software). Each ROM type is built
// from two byte-wide devices, one carrying the low byte and one the high
// byte of the 16-bit bus, so the select is split again with the byte
// controls of the bus: A0 = 0 enables the low-byte device and BHE# = 0 the
// high-byte device. A word access (A0 = 0, BHE# = 0) enables both.
//
// Interface: all selects are active low, purely combinational (a PLD/FPGA
// gate level function, no clock).
//   prom_n  = CS0# | A18        (PROM select, as in the design's equations)
//   flash_n = CS0# | ~A18       (flash select)
// The split into byte devices with A0/BHE# is this implementation's reading
// of the low/high byte enable lines that the decoder drives for each ROM.
module rom_decoder (
  input  logic cs0_n,       // CS0# from the MCU chip-select unit
  input  logic a18,         // MCU address bit 18
  input  logic a0,          // MCU address bit 0 (low byte disable when 1)
  input  logic bhe_n,       // byte high enable from the MCU, active low
  output logic prom_lb_n,   // PROM low-byte device select
  output logic prom_ub_n,   // PROM high-byte device select
  output logic flash_lb_n,  // flash low-byte device select
  output logic flash_ub_n   // flash high-byte device select
);
  logic prom_n, flash_n;

  always_comb begin
    prom_n     = cs0_n | a18;
    flash_n    = cs0_n | ~a18;
    prom_lb_n  = prom_n  | a0;
    prom_ub_n  = prom_n  | bhe_n;
    flash_lb_n = flash_n | a0;
    flash_ub_n = flash_n | bhe_n;
  end
endmodule
