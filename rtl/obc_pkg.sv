// obc_pkg: constants and types shared by the on-board-computer glue logic.
//
// The numbers follow the memory system and camera of the design: a 16-bit
// data bus, eight 256k x 16 static RAM chips (512 kB each) paired under the
// chip-select lines CS1..CS4, two byte-wide ROM devices per ROM type under
// CS0, and a 1280 x 1024 pixel image of 10-bit samples stored one pixel per
// 16-bit RAM word. An image of 1280 * 1024 = 5 * 2^18 words fills exactly
// five RAM chips, which is why the camera address counter is 21 bits wide
// and the transfer ends when its top three bits reach 5.
package obc_pkg;

  // Memory organisation
  localparam int unsigned RAM_CHIPS     = 8;   // RAM1..RAM8
  localparam int unsigned RAM_ADDR_W    = 18;  // word address inside one RAM chip (bus A1..A18)
  localparam int unsigned ROM_ADDR_W    = 17;  // byte address inside one ROM device (bus A1..A17)
  localparam int unsigned MCU_CS_LINES  = 5;   // CS0..CS4 from the microcontroller
  localparam int unsigned DATA_W        = 16;

  // Camera image and transfer
  localparam int unsigned PIXELS_PER_ROW = 1280;  // vcwd, active window width
  localparam int unsigned ROWS           = 1024;
  localparam int unsigned ROW_BLANK_MCLK = 44;    // t_row = (vcwd + 44) * t_MCLK
  localparam int unsigned PIXEL_W        = 10;
  localparam int unsigned CAM_COUNT_W    = 21;    // address counter width
  localparam int unsigned IMAGE_BLOCKS   = 5;     // RAM chips filled by one image

  // Who owns the parallel bus
  typedef enum logic {
    BUS_MCU    = 1'b0,
    BUS_CAMERA = 1'b1
  } bus_owner_e;

endpackage
