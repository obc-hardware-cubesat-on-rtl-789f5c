// psu_boot_supervisor: boot-ROM selection and external watchdog for the MCU.
//
// The power supply unit decides which ROM the microcontroller boots from and
// restarts it when it hangs (for instance after a latch-up or single event
// upset). It drives the BootSelect pin (MCU port P6.7): 0 = boot from PROM,
// 1 = continue the boot from flash. Algorithm:
//   1. After power-on the supervisor selects the PROM and powers the MCU up.
//   2. A boot timer runs. If the MCU does not report a good boot (its first
//      watchdog command over I2C, kick) before the timer expires, the boot
//      has failed: BootSelect is inverted, the MCU is powered down for
//      OFF_TICKS and powered up again. PROM and flash are thus tried in turn
//      until one of them boots.
//   3. After a good boot the supervisor is an external watchdog: each kick
//      restarts the timer; if WDT_TICKS pass without one, the MCU is powered
//      down and restarted with the same BootSelect.
//   4. Before new software is flashed, a command (sel_flash) sets BootSelect
//      to 1, so the next restart boots from flash; if that boot fails, step 2
//      switches back to the PROM.
//
// Timing: all timers count the one-cycle strobe tick (e.g. 1 ms); the
// defaults (5 s boot time, 10 s watchdog, 3 s off) are this implementation's
// choice, where the design only speaks of "a few seconds". Commands (kick,
// sel_flash) are one-cycle pulses that the PSU's I2C slave would produce.
module psu_boot_supervisor #(
  parameter int unsigned BOOT_TICKS = 5000,   // time allowed for a boot
  parameter int unsigned WDT_TICKS  = 10000,  // watchdog period
  parameter int unsigned OFF_TICKS  = 3000    // power-off time before a restart
) (
  input  logic clk,
  input  logic rst_n,        // PSU power-on reset, active low
  input  logic tick,         // timer time base strobe
  input  logic kick,         // watchdog command from the MCU (I2C)
  input  logic sel_flash,    // command: boot from flash next time (I2C)
  output logic mcu_power,    // MCU supply switch, 1 = on
  output logic mcu_rstin_n,  // MCU hardware reset (RSTIN#), held low while off
  output logic boot_sel,     // BootSelect pin P6.7: 0 = PROM, 1 = flash
  output logic boot_failed,  // one-cycle pulse: a boot attempt timed out
  output logic wdt_expired   // one-cycle pulse: watchdog restart
);
  typedef enum logic [1:0] {
    S_OFF  = 2'd0,  // MCU unpowered, waiting OFF_TICKS
    S_BOOT = 2'd1,  // MCU powered, waiting for the first kick
    S_RUN  = 2'd2   // MCU running, watchdog active
  } state_e;

  localparam int unsigned TW = $clog2(WDT_TICKS > BOOT_TICKS ?
                                      (WDT_TICKS > OFF_TICKS ? WDT_TICKS : OFF_TICKS) :
                                      (BOOT_TICKS > OFF_TICKS ? BOOT_TICKS : OFF_TICKS)) + 1;

  state_e        state;
  logic [TW-1:0] timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_BOOT;       // power on with the PROM selected
      timer       <= '0;
      boot_sel    <= 1'b0;
      boot_failed <= 1'b0;
      wdt_expired <= 1'b0;
    end else begin
      boot_failed <= 1'b0;
      wdt_expired <= 1'b0;
      unique case (state)
        S_OFF: begin
          if (tick) timer <= timer + 1'b1;
          if (tick && 32'(timer) + 1 >= OFF_TICKS) begin
            state <= S_BOOT;
            timer <= '0;
          end
        end
        S_BOOT: begin
          if (kick) begin
            state <= S_RUN;
            timer <= '0;
          end else begin
            if (tick) timer <= timer + 1'b1;
            if (tick && 32'(timer) + 1 >= BOOT_TICKS) begin
              boot_sel    <= ~boot_sel;   // try the other ROM
              boot_failed <= 1'b1;
              state       <= S_OFF;
              timer       <= '0;
            end
          end
        end
        S_RUN: begin
          if (sel_flash) boot_sel <= 1'b1;
          if (kick) begin
            timer <= '0;
          end else begin
            if (tick) timer <= timer + 1'b1;
            if (tick && 32'(timer) + 1 >= WDT_TICKS) begin
              wdt_expired <= 1'b1;
              state       <= S_OFF;
              timer       <= '0;
            end
          end
        end
        default: state <= S_OFF;
      endcase
    end
  end

  assign mcu_power   = (state != S_OFF);
  assign mcu_rstin_n = (state != S_OFF);

endmodule
