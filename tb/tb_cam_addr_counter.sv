// tb_cam_addr_counter: drives random count enables and clears into the
// 21-bit counter and compares it every cycle with a reference count kept in
// the testbench; also checks the carry from bit 17 into the block bits.
module tb_cam_addr_counter;
  logic clk, rst_n = 0, clr = 0, acc = 0;
  initial clk = 1'b0;
  logic [20:0] count;
  int unsigned ref_count = 0;
  int checks = 0, failures = 0;

  cam_addr_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      acc = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 499) == 0);
      @(posedge clk);
      if (clr) ref_count = 0;
      else if (acc) ref_count = ref_count + 1;
      #1;
      checks++;
      if (count !== 21'(ref_count)) begin
        failures++;
        $display("FAIL count=%0d exp=%0d", count, ref_count);
      end
    end
    // carry into the chip-number bits: load near 2^18 by counting
    @(negedge clk); clr = 1; acc = 0; @(posedge clk); #1; clr = 0;
    @(negedge clk); acc = 1;
    repeat ((1 << 18)) @(posedge clk);
    #1;
    checks++;
    if (count !== 21'h4_0000) begin
      failures++;
      $display("FAIL after 2^18 counts: %h", count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
