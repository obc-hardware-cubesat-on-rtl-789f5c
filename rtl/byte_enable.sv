// byte_enable: upper/lower byte enables of the 16-bit static RAMs.
//
// The RAM chips have separate active-low enables for the low byte (LB#) and
// the high byte (UB#). For a microcontroller access the low byte is enabled
// when address bit A0 is 0 and the high byte when BHE# is 0, so byte and word
// accesses both work on the 16-bit bus. While the camera control logic
// streams pixels into RAM it asserts word_en: a pixel is a 10-bit value
// stored as a whole word, so both bytes are enabled regardless of A0/BHE#
// (the microcontroller has released the bus then).
//
// Combinational, no clock.
module byte_enable (
  input  logic a0,        // MCU address bit 0
  input  logic bhe_n,     // MCU byte high enable, active low
  input  logic word_en,   // from the camera control logic: force a word access
  output logic ram_lb_n,  // RAM lower byte enable, active low
  output logic ram_ub_n   // RAM upper byte enable, active low
);
  always_comb begin
    ram_lb_n = a0    & ~word_en;
    ram_ub_n = bhe_n & ~word_en;
  end
endmodule
