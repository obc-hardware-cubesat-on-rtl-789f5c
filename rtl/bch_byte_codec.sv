// bch_byte_codec: byte-wide double-error-correcting code for memory words.
//
// A byte is protected as two 5-bit pieces, each coded into a 15-bit (15,5)
// BCH word, so every stored byte occupies 2 x 15 = 30 bits. The low piece is
// data[4:0]; the high piece is data[7:5] padded with two zero bits on top.
// Each 15-bit half is decoded on its own, so up to two bit errors in each
// half are corrected. After correction the two pad bits must be zero; a
// decoded word with a pad bit set is reported as uncorrectable.
//
// Interface: the encoder and the decoder are independent combinational
// paths (write side and read side of a memory).
module bch_byte_codec
  import bch_pkg::*;
(
  input  logic [7:0]  wr_data,        // byte to protect
  output logic [29:0] wr_code,        // {high word, low word}
  input  logic [29:0] rd_code,        // stored 30-bit code, possibly corrupted
  output logic [7:0]  rd_data,        // corrected byte
  output logic [2:0]  rd_corrected,   // bits corrected in both halves together
  output logic        rd_uncorrectable
);
  logic [4:0] lo_d, hi_d;
  logic [1:0] lo_n, hi_n;
  logic       lo_bad, hi_bad;

  bch_15_5_encoder u_enc_lo (.data(wr_data[4:0]),        .codeword(wr_code[14:0]));
  bch_15_5_encoder u_enc_hi (.data({2'b00, wr_data[7:5]}), .codeword(wr_code[29:15]));

  bch_15_5_decoder u_dec_lo (.received(rd_code[14:0]),  .data(lo_d), .n_corrected(lo_n), .uncorrectable(lo_bad));
  bch_15_5_decoder u_dec_hi (.received(rd_code[29:15]), .data(hi_d), .n_corrected(hi_n), .uncorrectable(hi_bad));

  assign rd_data          = {hi_d[2:0], lo_d};
  assign rd_corrected     = 3'(lo_n) + 3'(hi_n);
  assign rd_uncorrectable = lo_bad | hi_bad | (hi_d[4:3] != 2'b00);
endmodule
