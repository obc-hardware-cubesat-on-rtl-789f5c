// ram_decoder: chip selects of the eight static RAM chips.
//
// The microcontroller maps its chip-select lines CS1..CS4 onto four 1 MB
// windows; each window holds two 512 kB RAM chips (18 word-address bits on
// bus lines A1..A18), and address bit A19 picks the chip inside the window:
// CSk# with A19 = 0 selects RAM(2k-1), with A19 = 1 selects RAM(2k).
// The camera control logic can select a RAM chip too, through its own
// active-low chip-select lines. The two sources are merged with an AND of
// the active-low signals, so a chip is selected when either source selects it.
//
// Interface: ram_cs_n[i] drives RAM(i+1); index 0 is RAM1. Combinational.
module ram_decoder
  import obc_pkg::*;
(
  input  logic [4:1]           cs_n,       // CS1#..CS4# from the MCU
  input  logic                 a19,        // MCU address bit 19
  input  logic [RAM_CHIPS-1:0] cam_sel_n,  // camera chip selects, RAM1..RAM8
  output logic [RAM_CHIPS-1:0] ram_cs_n    // RAM1#..RAM8#
);
  logic [RAM_CHIPS-1:0] mcu_sel_n;

  always_comb begin
    for (int k = 1; k <= 4; k++) begin
      mcu_sel_n[2*k-2] = cs_n[k] | a19;
      mcu_sel_n[2*k-1] = cs_n[k] | ~a19;
    end
    ram_cs_n = mcu_sel_n & cam_sel_n;
  end
endmodule
