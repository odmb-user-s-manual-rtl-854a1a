// tb_trigger_ctrl: random L1A, match and control inputs for many cycles
// against a reference written from the mode-bit rules: source selection
// (CCB / internal), L1A kill, pedestal modes for DCFEBs and OTMB, match kill
// and the KILL mask, test L1A / PB1 adding an L1A and matches to all DCFEBs,
// the one-cycle latency, the L1A_COUNTER and its resynchronisation.
module tb_trigger_ctrl;
  import odmb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  vme_cmd_t cmd;
  vme_rsp_t rsp = '0;
  odmb_ctrl_t odmb_ctrl = '0;
  logic [9:1] kill = '0, match_in = '0, l1a_match;
  logic ccb_l1a = 0, int_l1a = 0, test_l1a = 0, pb1 = 0, resync = 0, l1a, l1a_resync;
  logic [23:0] l1a_counter;
  int n_ped = 0, n_kill = 0, n_test = 0, n_resync = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  trigger_ctrl dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); finish_tb();
  end

  initial begin
    logic src, t, e_l1a;
    logic [9:1] e_m;
    int e_cnt = 0;
    repeat (3) @(posedge clk); rst <= 1'b0; @(posedge clk); #1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      if (cyc % 500 == 0) begin
        odmb_ctrl = odmb_ctrl_t'($urandom);
        odmb_ctrl.fw_reset = 0;
        kill = 9'($urandom);
      end
      ccb_l1a = $urandom % 3 == 0; int_l1a = $urandom % 3 == 0;
      match_in = 9'($urandom); test_l1a = $urandom % 50 == 0; pb1 = $urandom % 70 == 0;
      resync = $urandom % 400 == 0;
      // reference
      src = odmb_ctrl.int_trig ? int_l1a : ccb_l1a;
      t = test_l1a || pb1;
      e_l1a = (src && !odmb_ctrl.kill_l1a) || t;
      for (int i = 1; i <= 9; i++) begin
        logic m;
        m = match_in[i];
        if (i <= 7 && odmb_ctrl.ped_dcfeb) m = src;
        if (i == 8 && odmb_ctrl.ped_otmb) m = src;
        m = m && !kill[i] && !odmb_ctrl.kill_l1a_match;
        if (i <= 7 && t) m = 1;
        e_m[i] = m;
      end
      if (resync) e_cnt = 0; else if (e_l1a) e_cnt++;
      if (odmb_ctrl.ped_dcfeb && src) n_ped++;
      if (odmb_ctrl.kill_l1a && src) n_kill++;
      if (t) n_test++;
      if (resync) n_resync++;
      @(posedge clk); #1;
      check_eq(l1a, e_l1a, "L1A");
      check_eq(l1a_match, e_m, "L1A_MATCH");
      check_eq(l1a_resync, resync, "resync passed on");
      check_eq(l1a_counter, 24'(e_cnt), "L1A_COUNTER");
    end
    check(n_ped > 0 && n_kill > 0 && n_test > 0 && n_resync > 0, "all modes exercised");
    finish_tb();
  end
endmodule
