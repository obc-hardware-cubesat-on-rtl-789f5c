// tb_bch_byte_codec: checks the byte codec of the (15,5) BCH code.
// Reference: the testbench finds each 15-bit codeword by searching the 1024
// parity patterns for the one that makes data * x^10 + parity divisible by
// g(x) (bitwise long division), independent of the encoder's formulation.
// For all 256 bytes it checks the encoder, then the decoder with no error,
// every single-bit error, random double errors in each half, double errors
// in both halves at once, and random triple errors (must be flagged).
module tb_bch_byte_codec;
  logic [7:0]  wr_data, rd_data;
  logic [29:0] wr_code, rd_code;
  logic [2:0]  rd_corrected;
  logic        rd_uncorrectable;
  int checks = 0, failures = 0;

  bch_byte_codec dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic divisible(logic [14:0] w);
    logic [14:0] r = w;
    for (int i = 14; i >= 10; i--)
      if (r[i]) r ^= 15'(11'b101_0011_0111) << (i - 10);
    return r[9:0] == '0;
  endfunction

  function automatic logic [14:0] ref_codeword(logic [4:0] d);
    for (int p = 0; p < 1024; p++)
      if (divisible({d, 10'(p)})) return {d, 10'(p)};
    return '0;
  endfunction

  function automatic logic [29:0] ref_code(logic [7:0] b);
    return {ref_codeword({2'b00, b[7:5]}), ref_codeword(b[4:0])};
  endfunction

  function automatic logic [14:0] rand_err(int w);
    logic [14:0] e = '0;
    while ($countones(e) < w) e[$urandom_range(0, 14)] = 1'b1;
    return e;
  endfunction

  task automatic expect_ok(string what, logic [7:0] b, logic [2:0] ncorr);
    #1;
    checks++;
    if (rd_data !== b || rd_uncorrectable || rd_corrected !== ncorr) begin
      failures++;
      $display("FAIL %s byte=%h got %h corr=%0d bad=%b", what, b, rd_data, rd_corrected, rd_uncorrectable);
    end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [29:0] c;
      c = ref_code(8'(v));
      wr_data = 8'(v);
      #1;
      checks++;
      if (wr_code !== c) begin
        failures++;
        $display("FAIL encode %h: %h exp %h", v, wr_code, c);
      end
      rd_code = c;                expect_ok("clean", 8'(v), 0);
      for (int j = 0; j < 30; j++) begin
        rd_code = c ^ (30'd1 << j); expect_ok("single", 8'(v), 1);
      end
      for (int k = 0; k < 8; k++) begin
        rd_code = c ^ {15'd0, rand_err(2)}; expect_ok("double lo", 8'(v), 2);
        rd_code = c ^ {rand_err(2), 15'd0}; expect_ok("double hi", 8'(v), 2);
        rd_code = c ^ {rand_err(2), rand_err(2)}; expect_ok("double both", 8'(v), 4);
        rd_code = c ^ {rand_err(1), rand_err(2)}; expect_ok("1+2", 8'(v), 3);
        rd_code = c ^ {15'd0, rand_err(3)};
        #1;
        checks++;
        if (!rd_uncorrectable) begin
          failures++;
          $display("FAIL triple error not flagged byte=%h", v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
