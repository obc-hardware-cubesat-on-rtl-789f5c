// flash_model: behavioural model of one byte-wide 128 kB flash / PROM device
// (M29F010B-style command interface). Simulation only.
//
// Reads: with CE# and OE# low the addressed byte is on rdata.
// Writes are sampled like sram_model: a write cycle completes on the rising
// edge of WE# (or CE#) with the values of the cycle before. The device only
// programs after the unlock sequence AA to 0x555, 55 to 0x2AA, A0 to 0x555;
// the next write then programs its byte (bits can only go from 1 to 0).
// Any other write resets the sequence. An erased device reads 0xFF.
module flash_model (
  input  logic        clk,
  input  logic        ce_n,
  input  logic        we_n,
  input  logic        oe_n,
  input  logic [16:0] addr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata
);
  logic [7:0]  mem [2**17];
  logic        ce_q = 1'b1, we_q = 1'b1;
  logic [16:0] addr_q = '0;
  logic [7:0]  data_q = '0;
  int unsigned step = 0, programmed = 0, rejected = 0;

  initial for (int i = 0; i < 2**17; i++) mem[i] = 8'hff;

  always @(posedge clk) begin
    if (!ce_q && !we_q && (we_n || ce_n)) begin
      case (step)
        0: step <= (addr_q == 17'h555 && data_q == 8'haa) ? 1 : 0;
        1: step <= (addr_q == 17'h2aa && data_q == 8'h55) ? 2 : 0;
        2: step <= (addr_q == 17'h555 && data_q == 8'ha0) ? 3 : 0;
        default: begin
          mem[addr_q] <= mem[addr_q] & data_q;
          programmed  <= programmed + 1;
          step        <= 0;
        end
      endcase
      if (step == 0 && !(addr_q == 17'h555 && data_q == 8'haa)) rejected <= rejected + 1;
    end
    ce_q <= ce_n; we_q <= we_n; addr_q <= addr; data_q <= wdata;
  end

  assign rdata = (!ce_n && !oe_n) ? mem[addr] : 8'h00;
endmodule
