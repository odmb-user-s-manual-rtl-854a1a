// tb_jtag_vme: self-checking test of the DCFEB JTAG device (device 1, seven
// chains) and the ODMB JTAG device (device 2, one chain), each chain ending
// in a TAP model with its own USERCODE. It reads USERCODEs with the command
// sequence of the manual (select, IR 3C8, 16 bits with header, 16 bits with
// tailer), checks chain selection, the TAP reset command, the select
// register read-back and the command-to-acknowledge time.
module tb_jtag_vme;
  import odmb_pkg::*;
  localparam int H = 2;
  logic clk = 1'b0, rst = 1'b1;
  vme_cmd_t cmd = '0;
  vme_rsp_t rsp, rsp1, rsp2;
  logic [6:0] d_tck, d_tdo, sel1;
  logic d_tms, d_tdi, o_tck, o_tms, o_tdi, o_tdo, sel2;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  assign rsp = '{ack: rsp1.ack | rsp2.ack, data: rsp1.data | rsp2.data};

  jtag_vme #(.DEV(4'h1), .NCHAIN(7), .TCK_HALF(H)) dut1 (
    .clk, .rst, .cmd, .rsp(rsp1), .jtag_tck(d_tck), .jtag_tms(d_tms), .jtag_tdi(d_tdi),
    .jtag_tdo(d_tdo), .sel(sel1));
  jtag_vme #(.DEV(4'h2), .NCHAIN(1), .TCK_HALF(H)) dut2 (
    .clk, .rst, .cmd, .rsp(rsp2), .jtag_tck(o_tck), .jtag_tms(o_tms), .jtag_tdi(o_tdi),
    .jtag_tdo(o_tdo), .sel(sel2));

  for (genvar i = 0; i < 7; i++) begin : g_dcfeb
    jtag_tap_model #(.USERCODE(32'hD0C0_0000 + 32'h1111 * (i + 1))) tap (
      .tck(d_tck[i]), .tms(d_tms), .tdi(d_tdi), .tdo(d_tdo[i]));
  end
  jtag_tap_model #(.USERCODE(32'h0105DBDB)) tap_odmb (.tck(o_tck), .tms(o_tms), .tdi(o_tdi), .tdo(o_tdo));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  task automatic read_usercode(input logic [3:0] dev, output logic [31:0] uc);
    logic [15:0] lo, hi, d;
    int c;
    vme_op(1'b1, {dev, 12'h91C}, 16'h03C8, d, c);
    check_eq(c, 16 * 2 * H + 2, "IR shift duration (4 + 10 + 2 TCK)");
    vme_op(1'b1, {dev, 12'hF04}, 16'h0, d, c);
    check_eq(c, 19 * 2 * H + 2, "DR shift with header duration (3 + 16 TCK)");
    vme_r({dev, 12'h014}, lo);
    vme_op(1'b1, {dev, 12'hF08}, 16'h0, d, c);
    check_eq(c, 18 * 2 * H + 2, "DR shift with tailer duration (16 + 2 TCK)");
    vme_r({dev, 12'h014}, hi);
    uc = {hi, lo};
  endtask

  initial begin
    logic [31:0] uc;
    logic [15:0] d;
    int c;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);
    // Device 1: no DCFEB selected after reset.
    vme_r(16'h1024, d);
    check_eq(d, 16'h0000, "DCFEB select after reset");
    for (int i = 0; i < 7; i++) begin
      vme_w(16'h1020, 16'(1 << i));
      vme_r(16'h1024, d);
      check_eq(d, 16'(1 << i), "DCFEB select read-back");
      vme_op(1'b1, 16'h1018, 16'hFFFF, d, c);
      check_eq(c, 6 * 2 * H + 2, "TAP reset duration (6 TCK)");
      read_usercode(4'h1, uc);
      check_eq(uc, 32'hD0C0_0000 + 32'h1111 * (i + 1), "DCFEB USERCODE");
    end
    // Only the selected DCFEB saw the IR update of the last read.
    check_eq(g_dcfeb[6].tap.ir_updates, 1, "selected TAP got one IR update");
    check_eq(g_dcfeb[0].tap.ir_updates, 1, "deselected TAP got no further IR update");
    check_eq(g_dcfeb[6].tap.dr_updates, 1, "tailer passed through Update-DR");
    // Device 2: ODMB's own USERCODE, firmware V01-05.
    vme_w(16'h2018, 16'h0);
    read_usercode(4'h2, uc);
    check_eq(uc, FW_USERCODE, "ODMB USERCODE");
    // Short shift: 8 bits of a register land in the top of the TDO register.
    vme_w(16'h2704, 16'h0);
    vme_r(16'h2014, d);
    check_eq(d[15:8], FW_USERCODE[7:0], "8-bit shift lands in TDO[15:8]");
    vme_w(16'h2708, 16'h0);
    // Unknown command is acknowledged with zero data.
    vme_r(16'h2030, d);
    check_eq(d, 16'h0, "unknown command reads 0");
    finish_tb();
  end
endmodule
