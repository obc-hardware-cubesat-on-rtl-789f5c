// bch_15_5_decoder: two-error-correcting decoder of the (15,5) BCH code.
//
// Three steps, all combinational:
//   1. Syndromes S1..S6: the received word evaluated at alpha^1..alpha^6
//      (a product with the 6 x 15 Vandermonde matrix of the powers of alpha).
//      For a binary code S2 = S1^2 and S4 = S1^4, so S1, S3 and S5 carry the
//      information.
//   2. Error-locator polynomial L(x) = 1 + L1 x + L2 x^2 of degree at most 2:
//      L1 = S1, L2 = (S3 + S1^3) / S1. This closed form gives the same
//      polynomial as running Euclid's algorithm on the syndromes when at most
//      two errors occurred.
//   3. Roots: L(x) is evaluated by Horner's rule at alpha^-j for every bit
//      position j; a root marks bit j as wrong and it is flipped.
// The corrected word is checked again (S1 = S3 = S5 = 0); if it is not a
// codeword, or the syndromes cannot come from two errors, uncorrectable is
// set and the received data bits are passed on unchanged.
module bch_15_5_decoder
  import bch_pkg::*;
(
  input  logic [N-1:0] received,
  output logic [K-1:0] data,
  output logic [1:0]   n_corrected,   // bits flipped (0..2)
  output logic         uncorrectable  // more than two errors detected
);
  always_comb begin
    gf16_t s1, s3, s5, l1, l2, v;
    logic [N-1:0] err, fixed;
    int unsigned nroots;
    logic bad;

    s1 = syndrome(received, 1);
    s3 = syndrome(received, 3);
    s5 = syndrome(received, 5);
    bad = 1'b0;
    err = '0;

    if (s1 == '0 && s3 == '0 && s5 == '0) begin
      l1 = '0;
      l2 = '0;
    end else if (s1 == '0) begin
      l1  = '0;
      l2  = '0;
      bad = 1'b1;
    end else begin
      l1 = s1;
      l2 = gf_mul(s3 ^ gf_mul(s1, gf_mul(s1, s1)), gf_inv(s1));
    end

    nroots = 0;
    for (int unsigned j = 0; j < N; j++) begin
      gf16_t xj;
      xj = gf_alpha_pow(N - j);                  // alpha^-j
      v  = gf_mul(gf_mul(l2, xj) ^ l1, xj) ^ 4'b0001;  // Horner: (L2 x + L1) x + 1
      if (!bad && (l1 != '0 || l2 != '0) && v == '0) begin
        err[j] = 1'b1;
        nroots++;
      end
    end

    fixed = received ^ err;
    if (syndrome(fixed, 1) != '0 || syndrome(fixed, 3) != '0 || syndrome(fixed, 5) != '0)
      bad = 1'b1;

    uncorrectable = bad;
    n_corrected   = bad ? 2'd0 : 2'(nroots);
    data          = bad ? received[N-1 -: K] : fixed[N-1 -: K];
  end
endmodule
