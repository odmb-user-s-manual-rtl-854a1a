// tb_lvmb_dev: device 8 against seven serial ADC models. Each model, while
// its chip enable is low, takes the 8-bit control byte MSB first on rising
// SCLK and then returns {control byte, 8-bit ADC number} MSB first. Checks
// ADC selection (only the selected chip enable falls), the returned result,
// the SCLK count and write duration, the power-on register and its read-back
// from the LVMB status inputs or, in dummy mode, from the register itself.
module tb_lvmb_dev;
  import odmb_pkg::*;
  localparam int SH = 2;
  logic clk = 1'b0, rst = 1'b1;
  vme_cmd_t cmd = '0;
  vme_rsp_t rsp;
  logic dummy_lvmb = 0, lvmb_sclk, lvmb_sdin, lvmb_sdout;
  logic [7:0] lvmb_pon, lvmb_pon_status = 8'hC3;
  logic [6:0] lvmb_ce;
  logic [6:0] sdo;
  int rises [7];
  logic [7:0] ctrl_rx [7];
  int ce_falls [7];
  always #5 clk = ~clk;
  `include "tb_common.svh"

  lvmb_dev #(.SCLK_HALF(SH)) dut (.*);

  assign lvmb_sdout = |(sdo & ~lvmb_ce);
  for (genvar n = 0; n < 7; n++) begin : g_adc
    logic [15:0] res;
    assign res = {ctrl_rx[n], 8'(n)};
    initial begin rises[n] = 0; ce_falls[n] = 0; sdo[n] = 0; ctrl_rx[n] = 0; end
    always @(negedge lvmb_ce[n]) begin rises[n] = 0; ce_falls[n]++; end
    always @(posedge lvmb_sclk) if (!lvmb_ce[n]) begin
      if (rises[n] < 8) ctrl_rx[n] = {ctrl_rx[n][6:0], lvmb_sdin};
      rises[n]++;
    end
    always @(negedge lvmb_sclk) if (!lvmb_ce[n])
      sdo[n] = (rises[n] >= 8 && rises[n] < 24) ? res[23 - rises[n]] : 1'b0;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); finish_tb();
  end

  initial begin
    logic [15:0] d; int c;
    logic [7:0] cb;
    repeat (3) @(posedge clk); rst <= 1'b0; @(posedge clk);
    for (int n = 0; n < 7; n++) begin
      vme_w(16'h8020, 16'(n));
      vme_r(16'h8024, d); check_eq(d, n, "ADC selection read-back");
      cb = 8'($urandom);
      vme_op(1'b1, 16'h8000, {8'hFF, cb}, d, c);
      check_eq(c, 24 * 2 * SH + 1, "control byte + 16 result bits duration");
      check_eq(rises[n], 24, "SCLK count");
      check_eq(ctrl_rx[n], cb, "ADC got the control byte");
      vme_r(16'h8004, d); check_eq(d, {cb, 8'(n)}, "ADC result");
      for (int m = 0; m < 7; m++) check_eq(ce_falls[m], (m <= n) ? 1 : 0, "only the selected ADC enabled");
      check_eq(lvmb_ce, 7'h7F, "chip enables idle high");
    end
    vme_w(16'h8020, 16'd7);
    vme_r(16'h8024, d); check_eq(d, 6, "ADC number above 6 ignored");
    vme_w(16'h8010, 16'h00A5); check_eq(lvmb_pon, 8'hA5, "power-on output");
    vme_r(16'h8018, d); check_eq(d, 16'h00C3, "power status from the LVMB");
    dummy_lvmb = 1;
    vme_r(16'h8018, d); check_eq(d, 16'h00A5, "dummy LVMB returns the register");
    finish_tb();
  end
endmodule
