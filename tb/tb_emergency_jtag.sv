// tb_emergency_jtag: walks a TAP model through the discrete-logic address
// 0xFFFC, one TCK per write, exactly as in the USERCODE example: five TMS=1
// and one TMS=0 to reach Run-Test/Idle, the IR scan of 3C8, then 32 pairs of
// "write 0 / read TDO" to read the 32-bit USERCODE. It also checks the TCK
// pulse width and that reads do not clock the TAP.
module tb_emergency_jtag;
  import odmb_pkg::*;
  localparam int H = 2;
  logic clk = 1'b0, rst = 1'b1;
  vme_cmd_t cmd = '0;
  vme_rsp_t rsp;
  logic tck, tms, tdi, tdo;
  int tck_count = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  emergency_jtag #(.TCK_HALF(H)) dut (.*);
  jtag_tap_model #(.USERCODE(32'h0105DBDB)) tap (.tck, .tms, .tdi, .tdo);
  always @(posedge tck) tck_count++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  initial begin
    logic [15:0] d;
    logic [31:0] uc;
    int c;
    logic [15:0] ir_seq [10] = '{0, 0, 0, 2, 0, 0, 2, 2, 2, 3};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    repeat (5) vme_w(EMERGENCY_ADDR, 16'h1);
    vme_w(EMERGENCY_ADDR, 16'h0);
    check_eq(tap.st, 1, "Run-Test/Idle");
    check_eq(tck_count, 6, "one TCK per write");
    vme_w(EMERGENCY_ADDR, 1);   // Select-DR-Scan
    vme_w(EMERGENCY_ADDR, 1);   // Select-IR-Scan
    vme_w(EMERGENCY_ADDR, 0);   // Capture-IR
    vme_w(EMERGENCY_ADDR, 0);   // Shift-IR
    check_eq(tap.st, 11, "Shift-IR");
    foreach (ir_seq[i]) vme_w(EMERGENCY_ADDR, ir_seq[i]);
    check_eq(tap.st, 12, "Exit1-IR");
    vme_w(EMERGENCY_ADDR, 1);   // Update-IR
    vme_w(EMERGENCY_ADDR, 0);   // Run-Test/Idle
    check_eq(tap.ir, 10'h3C8, "IR loaded with USERCODE instruction");
    vme_w(EMERGENCY_ADDR, 1);   // Select-DR-Scan
    vme_w(EMERGENCY_ADDR, 0);   // Capture-DR
    for (int i = 0; i < 32; i++) begin
      c = tck_count;
      vme_op(1'b1, EMERGENCY_ADDR, 16'h0, d, c);
      check_eq(c, 2 * H + 1, "write: one TCK pulse, then ack");
      vme_r(EMERGENCY_ADDR, d);
      uc[i] = d[0];
    end
    check_eq(tck_count, 6 + 4 + 10 + 2 + 2 + 32, "reads give no TCK");
    check_eq(uc, 32'h0105DBDB, "USERCODE XYZKdbdb for V01-05");
    // A command to another address is not answered.
    cmd.valid <= 1'b1; cmd.we <= 1'b1; cmd.addr <= 16'hFFF8; cmd.data <= 16'h1;
    @(posedge clk);
    cmd.valid <= 1'b0;
    repeat (8) begin @(posedge clk); check(!rsp.ack && !tck, "other address ignored"); end
    finish_tb();
  end
endmodule
