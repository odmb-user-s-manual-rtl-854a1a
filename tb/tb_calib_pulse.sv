// tb_calib_pulse: 40 MHz requests into the 80 MHz calibration block. For
// every INJ_DLY / EXT_DLY value 0..31 it measures the clk80 cycles from the
// request to INJPLS / EXTPLS and checks that each step of the register adds
// one 12.5 ns cycle, the pulse width, and in calibration mode the
// calibration LCT CALLCT_DLY bunch crossings (2 cycles each) after the pulse,
// and no LCT outside calibration mode.
module tb_calib_pulse;
  import odmb_pkg::*;
  logic clk = 1'b0, clk80 = 1'b0, rst = 1'b1;
  vme_cmd_t cmd;
  vme_rsp_t rsp = '0;
  logic inj_req = 0, ext_req = 0, cal_mode = 0, injpls, extpls, cal_lct;
  logic [4:0] inj_dly = 0, ext_dly = 0;
  logic [3:0] callct_dly = 0;
  int base_inj = -1, base_ext = -1;
  always #4 clk80 = ~clk80;
  always @(posedge clk80) clk <= ~clk;
  `include "tb_common.svh"

  calib_pulse #(.PULSE_LEN(2)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk80);
    failures++; $display("FAIL: watchdog"); finish_tb();
  end

  // Returns clk80 cycles from the request to the first pulse cycle, and the width.
  task automatic shot(input bit inj, output int lat, output int width, output int lct_lat);
    int n = 0;
    lat = -1; width = 0; lct_lat = -1;
    @(posedge clk);
    if (inj) inj_req <= 1; else ext_req <= 1;
    @(posedge clk);
    inj_req <= 0; ext_req <= 0;
    repeat (200) begin
      @(posedge clk80); n++;
      if ((inj ? injpls : extpls)) begin if (lat < 0) lat = n; width++; end
      if (cal_lct && lct_lat < 0) lct_lat = n;
    end
  endtask

  initial begin
    int lat, w, ll;
    repeat (4) @(posedge clk); rst <= 0; repeat (2) @(posedge clk);
    for (int d = 0; d < 32; d++) begin
      inj_dly = 5'(d); ext_dly = 5'(31 - d);
      shot(1, lat, w, ll);
      if (d == 0) base_inj = lat;
      check_eq(lat - base_inj, d, "INJPLS delay step = one 80 MHz cycle (12.5 ns)");
      check_eq(w, 2, "INJPLS width");
      check_eq(ll, -1, "no calibration LCT outside calibration mode");
      shot(0, lat, w, ll);
      if (d == 0) base_ext = lat;
      check_eq(base_ext - lat, d, "EXTPLS delay step = one 80 MHz cycle");
      check_eq(w, 2, "EXTPLS width");
    end
    check_eq(base_inj, base_ext - 31, "INJ and EXT paths have the same offset");
    cal_mode = 1; inj_dly = 3;
    for (int c = 0; c < 16; c++) begin
      callct_dly = 4'(c);
      shot(1, lat, w, ll);
      check_eq(ll - lat, 2 * c + 1, "calibration LCT CALLCT_DLY x 25 ns after the pulse");
    end
    finish_tb();
  end
endmodule
