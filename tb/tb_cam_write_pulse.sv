// tb_cam_write_pulse: camera write-strobe generator against a camera timing
// model. The clock is 8 x the pixel clock; each pixel is 8 cycles with HCLK
// low for 4 and high for 4. Phases check that
//   - no strobe pulse is made before SYNC, during VCLK, after finish, after
//     CCLR (until the next SYNC) or with the capture enable low,
//   - otherwise exactly one pulse per pixel is made, with one ACC each,
//   - the pulse is 2 cycles high (t_p = 20 ns at 100 MHz, <= 30 ns) and the
//     strobe is 6 cycles low between pulses (t_wp = 60 ns, >= 50 ns),
//   - the strobe rises 3 cycles after HCLK rises and ACC is high in the
//     cycle it rises.
module tb_cam_write_pulse;
  logic clk, rst_n;
  logic hclk = 0, vclk = 1, sync = 0, cce = 0, cclr = 0, finish = 0;
  logic cam_we_n, acc, active;
  int checks = 0, failures = 0;

  cam_write_pulse dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- monitor
  int unsigned cyc = 0, acc_cnt = 0, last_hclk_rise = 0;
  int unsigned hi_len = 0, lo_len = 0;
  logic        we_prev = 1'b1, hclk_prev = 1'b0, in_row_pulses = 1'b0;
  int unsigned bad_tp = 0, bad_twp = 0, bad_lat = 0, bad_acc = 0, pulses = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (hclk && !hclk_prev) last_hclk_rise <= cyc;
    hclk_prev <= hclk;
    if (acc) acc_cnt <= acc_cnt + 1;
    if (cam_we_n && !we_prev) begin         // rising edge of the strobe
      // a pixel pulse (not the VCLK/enable high level) is checked when ACC
      if (acc) begin
        pulses <= pulses + 1;
        if (cyc - last_hclk_rise != 3) bad_lat <= bad_lat + 1;
        if (in_row_pulses && lo_len != 6) bad_twp <= bad_twp + 1;
        in_row_pulses <= 1'b1;
      end
      hi_len <= 1;
    end else if (cam_we_n) hi_len <= hi_len + 1;
    if (!cam_we_n && we_prev) begin         // falling edge
      if (in_row_pulses && hi_len != 2) bad_tp <= bad_tp + 1;
      lo_len <= 1;
    end else if (!cam_we_n) lo_len <= lo_len + 1;
    if (acc && !(cam_we_n && !we_prev)) bad_acc <= bad_acc + 1;  // ACC only at the rise
    if (vclk) in_row_pulses <= 1'b0;
    we_prev <= cam_we_n;
  end

  // ----------------------------------------------------------------- driver
  task automatic pixels(int n);
    for (int i = 0; i < n; i++) begin
      @(posedge clk); hclk <= 1'b0;
      repeat (4) @(posedge clk);
      hclk <= 1'b1;
      repeat (3) @(posedge clk);
    end
  endtask

  task automatic expect_acc(string what, int unsigned base, int unsigned n);
    repeat (6) @(posedge clk);
    checks++;
    if (acc_cnt - base != n) begin
      failures++;
      $display("FAIL %s: %0d ACC pulses, expected %0d", what, acc_cnt - base, n);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned b;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    cce   <= 1;
    // before SYNC: nothing
    vclk <= 0;
    b = acc_cnt; pixels(20); expect_acc("before SYNC", b, 0);
    checks++; if (active) begin failures++; $display("FAIL active before SYNC"); end
    // SYNC releases the enable, VCLK still blocks
    @(posedge clk) vclk <= 1; sync <= 1;
    @(posedge clk) sync <= 0;
    b = acc_cnt; pixels(10); expect_acc("during VCLK", b, 0);
    checks++; if (!active) begin failures++; $display("FAIL not active after SYNC"); end
    // two rows of 50 pixels
    for (int r = 0; r < 2; r++) begin
      @(posedge clk) vclk <= 0;
      b = acc_cnt; pixels(50); expect_acc("row", b, 50);
      @(posedge clk) vclk <= 1;
      repeat (20) @(posedge clk);
    end
    // finish stops everything
    @(posedge clk) vclk <= 0; finish <= 1;
    b = acc_cnt; pixels(10); expect_acc("after finish", b, 0);
    checks++; if (active || !cam_we_n) begin failures++; $display("FAIL strobe after finish"); end
    // clear re-arms: no pulses until the next SYNC
    @(posedge clk) finish <= 0; cclr <= 1;
    @(posedge clk) cclr <= 0;
    b = acc_cnt; pixels(10); expect_acc("after CCLR", b, 0);
    @(posedge clk) sync <= 1;
    @(posedge clk) sync <= 0;
    repeat (4) @(posedge clk);
    // capture enable low blocks
    @(posedge clk) cce <= 0;
    b = acc_cnt; pixels(10); expect_acc("cce low", b, 0);
    @(posedge clk) cce <= 1;
    b = acc_cnt; pixels(30); expect_acc("cce high", b, 30);
    @(posedge clk) vclk <= 1;
    repeat (10) @(posedge clk);

    checks++; if (bad_tp  != 0) begin failures++; $display("FAIL %0d pulses not 2 cycles high", bad_tp); end
    checks++; if (bad_twp != 0) begin failures++; $display("FAIL %0d low periods not 6 cycles", bad_twp); end
    checks++; if (bad_lat != 0) begin failures++; $display("FAIL %0d pulses with wrong latency", bad_lat); end
    checks++; if (bad_acc != 0) begin failures++; $display("FAIL %0d ACC not at strobe rise", bad_acc); end
    checks++; if (pulses != 130) begin failures++; $display("FAIL %0d pixel pulses, expected 130", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
