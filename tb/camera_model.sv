// camera_model: behavioural model of the camera's output timing (KAC-1310
// based camera unit). Simulation only.
//
// Runs on the FPGA clock; one master-clock period MCLK is CLK_PER_MCLK
// clocks. HCLK toggles once per MCLK all the time (low in the first half,
// high in the second); a new pixel appears on data when HCLK falls. After a
// trigger pulse the camera gives a one-MCLK SYNC pulse, integrates for
// INT_ROWS row times with VCLK high, and then sends ROWS rows of PIX pixels.
// Each row is followed by BLANK MCLK periods with VCLK high and no valid data
// (t_row = (PIX + BLANK) * t_MCLK). The pixel value of row r, column c is
// pixel_value(r, c), a function the testbench can recompute.
module camera_model #(
  parameter int unsigned PIX          = 1280,
  parameter int unsigned ROWS         = 1024,
  parameter int unsigned BLANK        = 44,
  parameter int unsigned INT_ROWS     = 4,
  parameter int unsigned CLK_PER_MCLK = 8
) (
  input  logic       clk,
  input  logic       trigger,
  output logic       hclk,
  output logic       vclk,
  output logic       sync,
  output logic [9:0] data,
  output logic       busy
);
  function automatic logic [9:0] pixel_value(int unsigned r, int unsigned c);
    return 10'((r * 37) ^ (c * 5) ^ (r >> 3) ^ (c << 4));
  endfunction

  initial begin
    hclk = 1'b0; vclk = 1'b1; sync = 1'b0; data = 10'h155; busy = 1'b0;
  end

  // free-running HCLK
  always begin
    @(posedge clk); hclk <= 1'b0;
    repeat (CLK_PER_MCLK / 2) @(posedge clk);
    hclk <= 1'b1;
    repeat (CLK_PER_MCLK / 2 - 1) @(posedge clk);
  end

  task automatic wait_mclk(int unsigned n);
    repeat (n) begin
      @(posedge clk);
      while (hclk !== 1'b1) @(posedge clk);
      while (hclk !== 1'b0) @(posedge clk);
    end
  endtask

  always begin
    @(posedge clk);
    if (trigger) begin
      busy <= 1'b1;
      wait_mclk(3);
      sync <= 1'b1;
      wait_mclk(1);
      sync <= 1'b0;
      wait_mclk(INT_ROWS * (PIX + BLANK));
      for (int unsigned r = 0; r < ROWS; r++) begin
        vclk <= 1'b0;
        for (int unsigned c = 0; c < PIX; c++) begin
          data <= pixel_value(r, c);
          wait_mclk(1);
        end
        vclk <= 1'b1;
        data <= 10'h155;
        wait_mclk(BLANK);
      end
      busy <= 1'b0;
    end
  end
endmodule
