// bch_15_5_encoder: systematic encoder of the (15,5) BCH code.
//
// The 5 data bits become the top coefficients of the code polynomial
// (bits 14..10) and the 10 parity bits (9..0) are the remainder of
// d(x) * x^10 divided by the generator g(x), so the codeword is a multiple
// of g(x). This is the same linear map as multiplying the data vector by
// the code's 5 x 15 generator matrix. Combinational.
module bch_15_5_encoder
  import bch_pkg::*;
(
  input  logic [K-1:0] data,
  output logic [N-1:0] codeword
);
  always_comb begin
    logic [N-1:0] rem;
    rem = {data, 10'b0};
    for (int i = N - 1; i >= 10; i--)
      if (rem[i]) rem[i -: 11] = rem[i -: 11] ^ GEN_POLY;
    codeword = {data, rem[9:0]};
  end
endmodule
