// tb_config_dev: writes every configuration register of device 4 with
// random values, reads them back truncated to the widths of the register
// map, checks the config_t outputs, the firmware version at R 4024, that
// writing 4024 changes nothing and that reset clears the registers.
module tb_config_dev;
  import odmb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  vme_cmd_t cmd = '0;
  vme_rsp_t rsp;
  config_t cfg;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  config_dev dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); finish_tb();
  end

  initial begin
    logic [15:0] d, v;
    logic [15:0] addrs [10] = '{16'h4000, 16'h4004, 16'h4008, 16'h400C, 16'h4010, 16'h4014,
                                16'h4018, 16'h401C, 16'h4020, 16'h4028};
    logic [15:0] masks [10] = '{16'h003F, 16'h001F, 16'h001F, 16'h001F, 16'h001F, 16'h001F,
                                16'h000F, 16'h03FE, 16'h007F, 16'hFFFF};
    logic [15:0] val [10];
    repeat (3) @(posedge clk); rst <= 1'b0; @(posedge clk);
    vme_r(16'h4024, d); check_eq(d, 16'h0105, "firmware version of tag V01-05");
    for (int r = 0; r < 4; r++) begin
      foreach (addrs[i]) begin val[i] = 16'($urandom); vme_w(addrs[i], val[i]); end
      vme_w(16'h4024, 16'hFFFF);
      foreach (addrs[i]) begin
        vme_r(addrs[i], d);
        check_eq(d, val[i] & masks[i], $sformatf("register %04x", addrs[i]));
      end
      check_eq(cfg.lct_l1a_dly, val[0][5:0], "LCT_L1A_DLY output");
      check_eq(cfg.inj_dly, val[4][4:0], "INJ_DLY output");
      check_eq(cfg.callct_dly, val[6][3:0], "CALLCT_DLY output");
      check_eq(cfg.kill, val[7][9:1], "KILL[9:1] output");
      check_eq(cfg.crateid, val[8][6:0], "CRATEID output");
      check_eq(cfg.nwords_dummy, val[9], "dummy word count output");
      vme_r(16'h4024, d); check_eq(d, 16'h0105, "version is read-only");
    end
    rst <= 1'b1; @(posedge clk); rst <= 1'b0; @(posedge clk);
    vme_r(16'h401C, d); check_eq(d, 0, "reset clears KILL");
    finish_tb();
  end
endmodule
