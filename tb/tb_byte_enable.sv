// tb_byte_enable: exhaustive check of the RAM byte enables. Expected values:
// word_en forces both bytes on; otherwise LB# follows A0 and UB# follows BHE#.
module tb_byte_enable;
  logic a0, bhe_n, word_en, ram_lb_n, ram_ub_n;
  int checks = 0, failures = 0;

  byte_enable dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_lb, exp_ub;
      {word_en, a0, bhe_n} = 3'(v);
      #1;
      if (word_en) begin exp_lb = 1'b0; exp_ub = 1'b0; end
      else begin
        exp_lb = (a0 == 1'b1);      // odd byte address: low byte not used
        exp_ub = (bhe_n == 1'b1);
      end
      checks++;
      if (ram_lb_n !== exp_lb || ram_ub_n !== exp_ub) begin
        failures++;
        $display("FAIL we=%b a0=%b bhe_n=%b got lb=%b ub=%b", word_en, a0, bhe_n, ram_lb_n, ram_ub_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
