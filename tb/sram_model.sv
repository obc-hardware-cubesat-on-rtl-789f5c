// sram_model: behavioural model of one 256k x 16 asynchronous static RAM
// chip with chip select, write strobe, output enable and byte enables
// (TC554161-style pins). Simulation only.
//
// The model samples its pins on a fast clock. A write happens at the rising
// edge of WE# (or of CS# while WE# is low) using the address, data and byte
// enables present in the cycle before the edge, which is when a real chip
// latches them. Reads are combinational: with CS# and OE# low the enabled
// bytes of the addressed word appear on rdata (others read as 0).
// Counts of completed writes are kept for the testbench.
module sram_model #(
  parameter int unsigned AW = 18
) (
  input  logic          clk,
  input  logic          cs_n,
  input  logic          we_n,
  input  logic          oe_n,
  input  logic          lb_n,
  input  logic          ub_n,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   wdata,
  output logic [15:0]   rdata
);
  logic [15:0] mem [2**AW];
  logic        cs_q = 1'b1, we_q = 1'b1, lb_q = 1'b1, ub_q = 1'b1;
  logic [AW-1:0] addr_q = '0;
  logic [15:0] data_q = '0;
  int unsigned writes = 0;

  initial for (int i = 0; i < 2**AW; i++) mem[i] = 16'hdead;

  always @(posedge clk) begin
    if (!cs_q && !we_q && (we_n || cs_n)) begin
      if (!lb_q) mem[addr_q][7:0]  <= data_q[7:0];
      if (!ub_q) mem[addr_q][15:8] <= data_q[15:8];
      writes <= writes + 1;
    end
    cs_q <= cs_n; we_q <= we_n; lb_q <= lb_n; ub_q <= ub_n;
    addr_q <= addr; data_q <= wdata;
  end

  always_comb begin
    rdata = '0;
    if (!cs_n && !oe_n) begin
      if (!lb_n) rdata[7:0]  = mem[addr][7:0];
      if (!ub_n) rdata[15:8] = mem[addr][15:8];
    end
  end
endmodule
