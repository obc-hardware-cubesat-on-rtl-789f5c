// tb_cam_cs_decoder: checks the camera chip selects and finish for every
// block number, with the decoder enabled and disabled. Expected: blocks 0..4
// select RAM1..RAM5 when enabled, nothing otherwise; finish only at block 5.
module tb_cam_cs_decoder;
  import obc_pkg::*;
  logic [2:0] blk;
  logic enable, finish;
  logic [RAM_CHIPS-1:0] cam_sel_n;
  int checks = 0, failures = 0;

  cam_cs_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [RAM_CHIPS-1:0] exp_sel;
      {enable, blk} = 4'(v);
      #1;
      exp_sel = '1;
      if (enable && blk <= 3'd4) exp_sel = ~(8'd1 << blk);
      checks++;
      if (cam_sel_n !== exp_sel) begin
        failures++;
        $display("FAIL en=%b blk=%0d sel=%b", enable, blk, cam_sel_n);
      end
      checks++;
      if (finish !== (blk == 3'b101)) begin
        failures++;
        $display("FAIL finish blk=%0d", blk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
