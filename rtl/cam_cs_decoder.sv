// cam_cs_decoder: camera-side RAM chip selects and the end-of-image signal.
//
// The top three bits of the camera address counter (counter bits 18..20)
// number the RAM chip being filled. While the decoder is enabled (a picture
// transfer is in progress) block b selects RAM(b+1), for the blocks that
// an image occupies. One image is 1280 x 1024 words = 5 x 2^18, exactly five
// RAM chips, so when the counter steps into the sixth block (bits 20..18 =
// 101) the transfer is complete and finish goes high. finish holds the
// write strobe inactive and wakes the microcontroller through its external
// interrupt input.
//
// Combinational. Selects are active low; finish is active high.
module cam_cs_decoder
  import obc_pkg::*;
#(
  parameter int unsigned BLOCKS = IMAGE_BLOCKS  // RAM chips one image fills
) (
  input  logic [2:0]           blk,        // counter bits 20..18
  input  logic                 enable,     // decoder enable: transfer in progress
  output logic [RAM_CHIPS-1:0] cam_sel_n,  // camera chip selects RAM1..RAM8
  output logic                 finish      // image complete
);
  always_comb begin
    cam_sel_n = '1;
    if (enable && (32'(blk) < BLOCKS))
      cam_sel_n[blk] = 1'b0;
    finish = (32'(blk) == BLOCKS);
  end
endmodule
