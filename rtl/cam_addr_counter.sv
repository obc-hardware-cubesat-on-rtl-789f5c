// cam_addr_counter: address counter for the camera-to-RAM transfer.
//
// A 21-bit binary counter advanced by one for every pixel written. The low
// 18 bits are the word address inside a RAM chip (they drive bus lines
// A1..A18 while the camera owns the bus) and bits 18..20 number the RAM chip.
// In the board-level design the counter is clocked directly by the
// address-counter clock ACC; here the whole FPGA runs on one clock and ACC
// is a one-cycle count enable, so the counter steps on the clock edge that
// follows the ACC pulse. clr (the counter-clear input, CCLR) returns it to 0.
// The counter stops when ACC stops; it is not meant to wrap.
module cam_addr_counter
  import obc_pkg::*;
#(
  parameter int unsigned WIDTH = CAM_COUNT_W
) (
  input  logic             clk,
  input  logic             rst_n,  // asynchronous reset, active low
  input  logic             clr,    // synchronous clear (CCLR)
  input  logic             acc,    // count enable, one cycle per pixel
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (acc) count <= count + 1'b1;
  end
endmodule
