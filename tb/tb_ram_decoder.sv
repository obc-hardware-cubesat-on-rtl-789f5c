// tb_ram_decoder: checks the RAM1..RAM8 selects for every combination of
// CS1#..CS4# and A19, with no camera select, and for each camera select
// alone and combined with an MCU select. Expected: RAM(2k-1) for CSk# low
// with A19 = 0, RAM(2k) for A19 = 1; a camera select adds its own chip.
module tb_ram_decoder;
  import obc_pkg::*;
  logic [4:1] cs_n;
  logic       a19;
  logic [RAM_CHIPS-1:0] cam_sel_n, ram_cs_n;
  int checks = 0, failures = 0;

  ram_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [RAM_CHIPS-1:0] expected(logic [4:1] c, logic a, logic [RAM_CHIPS-1:0] cam);
    logic [RAM_CHIPS-1:0] e = '1;
    for (int k = 1; k <= 4; k++)
      if (!c[k]) e[(k-1)*2 + (a ? 1 : 0)] = 1'b0;
    return e & cam;
  endfunction

  initial begin
    for (int v = 0; v < 32; v++) begin
      for (int c = -1; c < 8; c++) begin
        {cs_n, a19} = 5'(v);
        cam_sel_n = '1;
        if (c >= 0) cam_sel_n[c] = 1'b0;
        #1;
        checks++;
        if (ram_cs_n !== expected(cs_n, a19, cam_sel_n)) begin
          failures++;
          $display("FAIL cs_n=%b a19=%b cam=%b got %b", cs_n, a19, cam_sel_n, ram_cs_n);
        end
      end
    end
    // one named case: CS3# low, A19 high -> RAM6 only
    cs_n = 4'b1011; a19 = 1'b1; cam_sel_n = '1; #1;
    checks++;
    if (ram_cs_n !== 8'b1101_1111) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
