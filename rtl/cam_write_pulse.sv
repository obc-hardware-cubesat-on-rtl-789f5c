// cam_write_pulse: write-strobe and address-clock generator of the camera
// control logic.
//
// While a picture is transferred the camera puts one 10-bit pixel per master
// clock period (MCLK, 80 ns at 12.5 MHz) on the data bus and marks each pixel
// with its horizontal clock HCLK. The static RAM stores a word on the rising
// edge of its write strobe R/W#, which must have been low for at least 50 ns.
// The camera strobe is therefore held low for most of each pixel period and
// pulsed high for a short time t_p (at most 30 ns) once per pixel; its rising
// edge stores the pixel. The address counter clock ACC is taken from the
// same pulse so the address moves on only after R/W# has gone high.
//
// Gating: the strobe stays high (no writing)
//   - until the camera's SYNC pulse has released the enable flag, which CCLR
//     and reset set again,
//   - while VCLK is high (row change, no valid data on the bus),
//   - once finish reports that the image is complete,
//   - while the capture enable cce is low.
// The board-level version builds the short pulse from gate delays of HCLK;
// this version is synchronous: HCLK, VCLK and SYNC pass a two-flop
// synchroniser and a rising HCLK edge starts a pulse of T_P_CYCLES clocks.
// With the FPGA clock at 8 x MCLK (100 MHz, 10 ns) the defaults give
// t_p = 20 ns (<= 30 ns), t_wp = 60 ns (>= 50 ns) and a counter update 10 ns
// after R/W# rises, the margins worked out for the gate version.
//
// At the end of each row the strobe also rises when VCLK goes high; that
// edge stores one blanking word at the next address, which the first pixel
// of the next row overwrites. After the last pixel finish keeps the strobe
// high, so nothing outside the picture is written.
//
// Timing: the strobe rises 3 clocks after the HCLK rising edge reaches the
// input (2 synchroniser stages and one register), acc is high in the first
// cycle of the pulse, the counter changes one cycle after the rise, and the
// strobe falls T_P_CYCLES clocks after it rose.
module cam_write_pulse #(
  parameter int unsigned T_P_CYCLES = 2  // length of the high pulse, in clocks
) (
  input  logic clk,
  input  logic rst_n,     // asynchronous reset, active low
  input  logic hclk,      // camera horizontal (pixel) clock
  input  logic vclk,      // camera vertical clock: high between rows
  input  logic sync,      // camera SYNC pulse at the start of integration
  input  logic cce,       // capture enable from the MCU
  input  logic cclr,      // counter clear: re-arms the SYNC enable flag
  input  logic finish,    // image complete, from the chip-select decoder
  output logic cam_we_n,  // camera write strobe to RAM, active low
  output logic acc,       // address counter clock (one-cycle count enable)
  output logic active     // transfer in progress: decoder enable and word enable
);
  logic [1:0] hclk_s, vclk_s, sync_s;
  logic       hclk_d, sync_d;
  logic       blocked;                 // set until SYNC releases it
  logic [$clog2(T_P_CYCLES+1)-1:0] p_cnt;
  logic       hclk_rise, sync_rise;

  // two-flop synchronisers and edge detection
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hclk_s <= '0; vclk_s <= '1; sync_s <= '0;
      hclk_d <= 1'b0; sync_d <= 1'b0;
    end else begin
      hclk_s <= {hclk_s[0], hclk};
      vclk_s <= {vclk_s[0], vclk};
      sync_s <= {sync_s[0], sync};
      hclk_d <= hclk_s[1];
      sync_d <= sync_s[1];
    end
  end

  assign hclk_rise = hclk_s[1] & ~hclk_d;
  assign sync_rise = sync_s[1] & ~sync_d;
  assign active    = ~blocked & cce & ~finish;

  // SYNC-released enable flag
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         blocked <= 1'b1;
    else if (cclr)      blocked <= 1'b1;
    else if (sync_rise) blocked <= 1'b0;
  end

  // pulse shaping: p_cnt counts the high cycles of the strobe
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_cnt <= '0;
      acc   <= 1'b0;
    end else begin
      acc <= 1'b0;
      if (p_cnt != 0) begin
        p_cnt <= p_cnt - 1'b1;
      end else if (hclk_rise && active && !vclk_s[1]) begin
        p_cnt <= ($bits(p_cnt))'(T_P_CYCLES);
        acc   <= 1'b1;
      end
    end
  end

  // strobe: high outside a transfer, between rows, after finish and during
  // the short per-pixel pulse
  assign cam_we_n = ~active | vclk_s[1] | (p_cnt != 0);

endmodule
