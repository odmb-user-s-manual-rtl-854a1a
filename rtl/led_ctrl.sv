// led_ctrl: front-panel push buttons PB0/PB1, the firmware reset and LEDs 1-12.
//
// Push buttons are synchronised to clk with two flip-flops; a press gives a
// one-cycle pulse on its rising edge (the buttons are taken as debounced by
// the board). PB0, or ODMB_CTRL[8] (fw_reset), starts the firmware reset:
// soft_rst is high for RST_LEN cycles and clears the registers and FIFOs of
// the other blocks, and for BLINK_CYCLES (about 3 s) all twelve LEDs blink:
// LEDs 2k-1 and 2k follow bit BLINK_BIT0+k-1 of the blink down-counter, so
// six pairs blink at six speeds (about 9.5 Hz down to 0.3 Hz at 40 MHz). Otherwise:
//   LED 1   4 Hz from the DDU data clock     LED 2,4,6,8,10  L1A_COUNTER[0..4]
//   LED 3   2 Hz from the PC data clock      LED 12  on for LED12_CYCLES after a
//   LED 5   1 Hz from the ODMB clock                 VME command, and while PB1
//   LED 7   on: normal, off: pedestal (ODMB_CTRL[13])          is held
//   LED 9   on: external, off: internal triggers (ODMB_CTRL[9])
//   LED 11  on: real, off: simulated data (ODMB_CTRL[7])
// The LED assignments are the manual's. Clock rates (40, 80 and 62.5 MHz),
// the LED-12 stretch, the reset length and the blink pattern are this
// design's choices; LEDs are active high. The LED dividers stop during the
// firmware reset only through their own rst input, which is the power-on
// reset, so they keep running.
module led_ctrl
  import odmb_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 40_000_000,
  parameter int unsigned DDU_CLK_HZ   = 80_000_000,
  parameter int unsigned PC_CLK_HZ    = 62_500_000,
  parameter int unsigned BLINK_CYCLES = 3 * CLK_HZ,
  parameter int unsigned BLINK_BIT0   = 21,
  parameter int unsigned LED12_CYCLES = CLK_HZ / 10,
  parameter int unsigned RST_LEN      = 16
) (
  input  logic        clk,
  input  logic        ddu_clk,
  input  logic        pc_clk,
  input  logic        rst,
  input  logic        pb0,
  input  logic        pb1,
  input  logic        fw_reset,
  input  logic        vme_cmd,
  input  odmb_ctrl_t  odmb_ctrl,
  input  logic [4:0]  l1a_counter,
  output logic        pb1_pulse,
  output logic        soft_rst,
  output logic        blinking,
  output logic [12:1] led
);
  logic [1:0] pb0_s, pb1_s;
  logic       pb0_q, pb1_q, pb0_pulse;
  logic       led_ddu, led_pc, led_odmb;
  logic [$clog2(BLINK_CYCLES+1)-1:0] blink_cnt;
  logic [$clog2(LED12_CYCLES+1)-1:0] act_cnt;
  logic [$clog2(RST_LEN+1)-1:0]      rst_cnt;

  initial assert (BLINK_BIT0 + 5 < $bits(blink_cnt))
    else $error("led_ctrl: BLINK_BIT0 too large for BLINK_CYCLES");

  clk_blink #(.HALF_PERIOD(DDU_CLK_HZ / 8)) u_ddu  (.clk(ddu_clk), .rst, .led(led_ddu));
  clk_blink #(.HALF_PERIOD(PC_CLK_HZ / 4))  u_pc   (.clk(pc_clk),  .rst, .led(led_pc));
  clk_blink #(.HALF_PERIOD(CLK_HZ / 2))     u_odmb (.clk(clk),     .rst, .led(led_odmb));

  assign pb0_pulse = pb0_s[1] & ~pb0_q;
  assign pb1_pulse = pb1_s[1] & ~pb1_q;
  assign blinking  = (blink_cnt != '0);
  assign soft_rst  = (rst_cnt != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      pb0_s <= '0; pb1_s <= '0; pb0_q <= 1'b0; pb1_q <= 1'b0;
      blink_cnt <= '0; act_cnt <= '0; rst_cnt <= '0;
    end else begin
      pb0_s <= {pb0_s[0], pb0};
      pb1_s <= {pb1_s[0], pb1};
      pb0_q <= pb0_s[1];
      pb1_q <= pb1_s[1];
      if (pb0_pulse || fw_reset) begin
        blink_cnt <= $bits(blink_cnt)'(BLINK_CYCLES);
        rst_cnt   <= $bits(rst_cnt)'(RST_LEN);
      end else begin
        if (blink_cnt != '0) blink_cnt <= blink_cnt - 1'b1;
        if (rst_cnt != '0)   rst_cnt   <= rst_cnt - 1'b1;
      end
      if (vme_cmd)           act_cnt <= $bits(act_cnt)'(LED12_CYCLES);
      else if (act_cnt != '0) act_cnt <= act_cnt - 1'b1;
    end
  end

  always_comb begin
    led[1]  = led_ddu;
    led[3]  = led_pc;
    led[5]  = led_odmb;
    led[7]  = ~odmb_ctrl.ped_dcfeb;
    led[9]  = ~odmb_ctrl.int_trig;
    led[11] = ~odmb_ctrl.dummy_data;
    led[2]  = l1a_counter[0];
    led[4]  = l1a_counter[1];
    led[6]  = l1a_counter[2];
    led[8]  = l1a_counter[3];
    led[10] = l1a_counter[4];
    led[12] = (act_cnt != '0) | pb1_s[1];
    if (blinking)
      for (int n = 1; n <= 12; n++) led[n] = blink_cnt[BLINK_BIT0 + (n - 1) / 2];
  end

endmodule
