// tb_led_ctrl: front panel at scaled clock rates (one simulated second =
// 4000 ODMB clock cycles). Checks the 4 Hz, 2 Hz and 1 Hz LEDs from their
// three clocks, the mode LEDs 7/9/11, the L1A_COUNTER LEDs, LED 12 after a
// VME command and while PB1 is held, the PB1 pulse, and the PB0 / ODMB_CTRL[8]
// reset: reset pulse length, ~3 s of blinking with six different speeds.
module tb_led_ctrl;
  import odmb_pkg::*;
  localparam int HZ = 4000, BL = 3 * HZ, B0 = 4, L12 = 400, RL = 16;
  logic clk = 0, ddu_clk = 0, pc_clk = 0, rst = 1;
  vme_cmd_t cmd;
  vme_rsp_t rsp = '0;
  logic pb0 = 0, pb1 = 0, fw_reset = 0, vme_cmd = 0, pb1_pulse, soft_rst, blinking;
  odmb_ctrl_t odmb_ctrl = '0;
  logic [4:0] l1a_counter = 0;
  logic [12:1] led, led_q;
  int tog [13];
  int rst_cycles = 0, blink_cycles = 0, pb1_pulses = 0;
  always #12.5 clk = ~clk;      // period 25
  always #6.25 ddu_clk = ~ddu_clk;
  always #8 pc_clk = ~pc_clk;
  `include "tb_common.svh"

  led_ctrl #(.CLK_HZ(HZ), .DDU_CLK_HZ(2 * HZ), .PC_CLK_HZ(HZ * 25 / 16), .BLINK_CYCLES(BL),
             .BLINK_BIT0(B0), .LED12_CYCLES(L12), .RST_LEN(RL)) dut (.*);

  initial foreach (tog[i]) tog[i] = 0;
  always @(posedge clk) begin
    led_q <= led;
    if (!rst) begin
      for (int i = 1; i <= 12; i++) if (led[i] != led_q[i]) tog[i]++;
      if (soft_rst) rst_cycles++;
      if (blinking) blink_cycles++;
      if (pb1_pulse) pb1_pulses++;
    end
  end

  initial begin
    repeat (40 * HZ) @(posedge clk);
    failures++; $display("FAIL: watchdog"); finish_tb();
  end

  task automatic clear_tog();
    foreach (tog[i]) tog[i] = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    repeat (2) @(posedge clk);
    clear_tog();
    repeat (2 * HZ) @(posedge clk);
    check(tog[1] >= 15 && tog[1] <= 17, $sformatf("LED 1 at 4 Hz: %0d toggles in 2 s", tog[1]));
    check(tog[3] >= 7 && tog[3] <= 9, $sformatf("LED 3 at 2 Hz: %0d toggles in 2 s", tog[3]));
    check(tog[5] >= 3 && tog[5] <= 5, $sformatf("LED 5 at 1 Hz: %0d toggles in 2 s", tog[5]));
    // mode LEDs
    check(led[7] && led[9] && led[11], "normal, external, real: LEDs 7, 9, 11 on");
    odmb_ctrl.ped_dcfeb = 1; #1; check(!led[7], "pedestal: LED 7 off");
    odmb_ctrl.int_trig = 1;  #1; check(!led[9], "internal triggers: LED 9 off");
    odmb_ctrl.dummy_data = 1; #1; check(!led[11], "simulated data: LED 11 off");
    for (int v = 0; v < 32; v++) begin
      l1a_counter = 5'(v); #1;
      check_eq({led[10], led[8], led[6], led[4], led[2]}, v, "L1A_COUNTER LEDs");
    end
    // LED 12
    check(!led[12], "LED 12 idle");
    @(posedge clk); vme_cmd <= 1; @(posedge clk); vme_cmd <= 0;
    repeat (L12 - 2) @(posedge clk);
    check(led[12], "LED 12 on after a VME command");
    repeat (5) @(posedge clk);
    check(!led[12], "LED 12 off again");
    pb1 <= 1; repeat (200) @(posedge clk);
    check(led[12], "LED 12 on while PB1 held");
    check_eq(pb1_pulses, 1, "one L1A request per PB1 press");
    pb1 <= 0; repeat (5) @(posedge clk);
    check(!led[12], "LED 12 off after PB1");
    // PB0 reset and blinking
    clear_tog(); rst_cycles = 0; blink_cycles = 0;
    pb0 <= 1; repeat (50) @(posedge clk); pb0 <= 0;
    repeat (BL + 100) @(posedge clk);
    check_eq(rst_cycles, RL, "reset pulse length");
    check_eq(blink_cycles, BL, "blinking lasts BLINK_CYCLES (about 3 s)");
    for (int k = 1; k <= 6; k++) begin
      int e;
      e = BL / (1 << (B0 + k - 1));
      check(tog[2 * k] >= e - 2 && tog[2 * k] <= e + 2,
            $sformatf("LED %0d blinks %0d times, expected about %0d", 2 * k, tog[2 * k], e));
    end
    // ODMB_CTRL[8] does the same
    rst_cycles = 0; blink_cycles = 0;
    @(posedge clk); fw_reset <= 1; @(posedge clk); fw_reset <= 0;
    repeat (BL + 10) @(posedge clk);
    check_eq(rst_cycles, RL, "ODMB_CTRL[8] reset pulse");
    check_eq(blink_cycles, BL, "ODMB_CTRL[8] blinking");
    finish_tb();
  end
endmodule
