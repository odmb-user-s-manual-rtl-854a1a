// tb_jtag_engine: drives the JTAG master directly against a TAP model. It
// checks the TMS walk (TAP reset, IR and DR scans end in Run-Test/Idle),
// the data shifted out and in, and the TCK count of every operation.
module tb_jtag_engine;
  import odmb_pkg::*;
  localparam int H = 3;
  logic clk = 1'b0, rst = 1'b1;
  vme_cmd_t cmd;
  vme_rsp_t rsp;
  logic start = 1'b0, header = 1'b0, tailer = 1'b0, busy, done, tck, tms, tdi, tdo;
  jtag_op_e op = JOP_DR;
  logic [4:0] nbits = 5'd1;
  logic [15:0] tdi_data = '0, tdo_reg;
  int tck_count = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  jtag_engine #(.TCK_HALF(H)) dut (.*);
  jtag_tap_model #(.USERCODE(32'hCAFE_1234)) tap (.tck, .tms, .tdi, .tdo);
  always @(posedge tck) tck_count++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  task automatic run(input jtag_op_e o, input int n, input bit h, input bit t,
                     input logic [15:0] d, input int exp_tck, input string what);
    int c0, cyc;
    c0 = tck_count;
    op <= o; nbits <= 5'(n); header <= h; tailer <= t; tdi_data <= d; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!done);
    check_eq(tck_count - c0, exp_tck, {what, ": TCK count"});
    check_eq(cyc, exp_tck * 2 * H + 1, {what, ": cycles"});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    run(JOP_RESET, 1, 0, 0, 0, 6, "reset");
    check_eq(tap.st, 1, "after reset: Run-Test/Idle");
    // Load a bypass instruction, then USERCODE.
    run(JOP_IR, 10, 1, 1, 16'h3FF, 16, "IR bypass");
    check_eq(tap.ir, 10'h3FF, "IR = 3FF");
    check_eq(tdo_reg[15:6], 10'b0000000001, "IR capture pattern shifted out");
    check_eq(tap.st, 1, "after IR: Run-Test/Idle");
    run(JOP_IR, 10, 1, 1, 16'h3C8, 16, "IR usercode");
    check_eq(tap.ir, 10'h3C8, "IR = 3C8");
    run(JOP_DR, 16, 1, 0, 0, 19, "DR header");
    check_eq(tdo_reg, 16'h1234, "USERCODE low half");
    check_eq(tap.st, 4, "header only: stays in Shift-DR");
    run(JOP_DR, 16, 0, 1, 0, 18, "DR tailer");
    check_eq(tdo_reg, 16'hCAFE, "USERCODE high half");
    check_eq(tap.st, 1, "after tailer: Run-Test/Idle");
    // Bypass: shifted data comes back one bit late.
    run(JOP_IR, 10, 1, 1, 16'h3FF, 16, "IR bypass 2");
    run(JOP_DR, 9, 1, 1, 16'h0155, 14, "DR bypass");
    check_eq(tdo_reg[15:7], {8'h55, 1'b0}, "bypass echoes TDI delayed by one");
    run(JOP_DR, 4, 0, 0, 16'h000F, 4, "DR no header, no tailer");
    check_eq(tap.st, 1, "no header from Run-Test/Idle: TAP stays idle");
    finish_tb();
  end
endmodule
