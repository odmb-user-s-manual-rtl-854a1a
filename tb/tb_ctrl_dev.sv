// tb_ctrl_dev: checks device 3: ODMB_CTRL write/read with the auto-reset
// bit 8 (pulse, reads back 0), DCFEB_CTRL one-cycle pulses for each bit,
// TP_SEL, LOOPBACK, DIFFCTRL, the DONE bits and the R 3YZC path to the
// counters (a stand-in returns {8'hA5, YZ}), with one-cycle acknowledge.
module tb_ctrl_dev;
  import odmb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  vme_cmd_t cmd = '0;
  vme_rsp_t rsp;
  odmb_ctrl_t odmb_ctrl;
  dcfeb_ctrl_t dcfeb_pulse;
  logic fw_reset;
  logic [15:0] tp_sel, data_val;
  logic [2:0] loopback;
  logic [3:0] diffctrl;
  logic [7:1] dcfeb_done = 7'h55;
  logic [7:0] data_sel;
  int fw_reset_n = 0, pulse_n [8];
  always #5 clk = ~clk;
  `include "tb_common.svh"

  ctrl_dev dut (.*);
  assign data_val = {8'hA5, data_sel};

  initial foreach (pulse_n[i]) pulse_n[i] = 0;
  always @(posedge clk) begin
    if (!rst && fw_reset) fw_reset_n++;
    for (int i = 0; i < 8; i++) if (!rst && dcfeb_pulse[i]) pulse_n[i]++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); finish_tb();
  end

  initial begin
    logic [15:0] d; int c;
    repeat (3) @(posedge clk); rst <= 1'b0; @(posedge clk);
    vme_r(16'h3000, d); check_eq(d, 0, "ODMB_CTRL reset value");
    vme_op(1'b1, 16'h3000, 16'h7E3F, d, c);
    check_eq(c, 1, "write acknowledged next cycle");
    vme_r(16'h3000, d); check_eq(d, 16'h7E3F & ~16'h0100, "ODMB_CTRL read-back, bit 8 auto-reset");
    check_eq(odmb_ctrl.cal_trgen, 4'hF, "CAL_TRGEN field");
    check_eq(odmb_ctrl.kill_l1a, 1, "kill L1A field");
    check_eq(odmb_ctrl.ped_otmb, 1, "OTMB pedestal field");
    check_eq(odmb_ctrl.dummy_data, 0, "dummy data field");
    check_eq(fw_reset_n, 0, "no reset pulse without bit 8");
    vme_w(16'h3000, 16'h0100);
    repeat (2) @(posedge clk);
    check_eq(fw_reset_n, 1, "bit 8 gives one reset pulse");
    vme_r(16'h3000, d); check_eq(d, 16'h0000, "bit 8 reads back 0 after the pulse");
    for (int i = 0; i < 8; i++) begin
      vme_w(16'h3010, 16'(1 << i));
      repeat (2) @(posedge clk);
      check_eq(pulse_n[i], 1, "DCFEB_CTRL bit gives one pulse");
    end
    vme_w(16'h3010, 16'h00FF);
    repeat (2) @(posedge clk);
    for (int i = 0; i < 8; i++) check_eq(pulse_n[i], 2, "all bits pulse together");
    vme_r(16'h3010, d); check_eq(d, 0, "DCFEB_CTRL reads 0 (auto-reset)");
    vme_w(16'h3020, 16'hBEEF); vme_r(16'h3020, d); check_eq(d, 16'hBEEF, "TP_SEL");
    vme_w(16'h3100, 16'h0002); vme_r(16'h3100, d); check_eq(d, 2, "LOOPBACK");
    check_eq(loopback, 2, "LOOPBACK output");
    vme_w(16'h3110, 16'h000F); vme_r(16'h3110, d); check_eq(d, 15, "DIFFCTRL");
    check_eq(diffctrl, 15, "DIFFCTRL output");
    vme_r(16'h3120, d); check_eq(d, 16'h55, "DONE bits");
    vme_r(16'h33FC, d); check_eq(d, 16'hA53F, "R 33FC: ODMB_DATA entry 3F");
    vme_r(16'h321C, d); check_eq(d, 16'hA521, "R 321C: ODMB_DATA entry 21");
    vme_r(16'h35DC, d); check_eq(d, 16'hA55D, "R 35DC: ODMB_DATA entry 5D");
    rst <= 1'b1; @(posedge clk); rst <= 1'b0; @(posedge clk);
    vme_r(16'h3000, d); check_eq(d, 0, "reset clears ODMB_CTRL");
    finish_tb();
  end
endmodule
