// tb_bpi_dev: device 6 with a small flash-engine stand-in that accepts one
// command word every third cycle and, for each word, returns its bitwise
// inverse into the read-back FIFO. Checks that commands written while
// parsing is disabled wait in the command FIFO, are handed over in order
// once parsing is enabled, the read-back count and words, the status
// register bits, that the timer runs only while there is work, and that
// W 6020 resets the FIFOs, the timer and the parse enable.
module tb_bpi_dev;
  import odmb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  vme_cmd_t cmd = '0;
  vme_rsp_t rsp;
  logic bpi_cmd_valid, bpi_cmd_ready, bpi_rb_valid = 0, bpi_busy, bpi_rst;
  logic [15:0] bpi_cmd, bpi_rb_data = 0;
  logic [7:0] bpi_status = 8'h5A;
  int phase = 0;
  logic [15:0] got [$];
  always #5 clk = ~clk;
  `include "tb_common.svh"

  bpi_dev #(.CMD_DEPTH(32), .RB_DEPTH(32)) dut (.*);

  assign bpi_cmd_ready = (phase == 0);
  assign bpi_busy      = (phase != 0);
  always @(posedge clk) begin
    bpi_rb_valid <= 1'b0;
    if (rst || bpi_rst) phase <= 0;
    else if (bpi_cmd_valid && bpi_cmd_ready) begin
      got.push_back(bpi_cmd);
      bpi_rb_valid <= 1'b1;
      bpi_rb_data  <= ~bpi_cmd;
      phase <= 2;
    end else if (phase != 0) phase <= phase - 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); finish_tb();
  end

  initial begin
    logic [15:0] d, t0, t1, w [10];
    repeat (3) @(posedge clk); rst <= 1'b0; @(posedge clk);
    vme_r(16'h6038, d); check_eq(d, 16'h5A0A, "status after reset: cmd and rb FIFOs empty");
    vme_w(16'h6024, 0);
    foreach (w[i]) begin w[i] = 16'($urandom); vme_w(16'h602C, w[i]); end
    repeat (10) @(posedge clk);
    check_eq(got.size(), 0, "nothing parsed while disabled");
    vme_r(16'h603C, t0); check_eq(t0, 0, "timer idle while disabled");
    vme_r(16'h6038, d); check_eq(d[1:0], 2'b00, "status: disabled, command FIFO not empty");
    vme_w(16'h6028, 0);
    vme_r(16'h6038, d); check_eq(d[0], 1, "status: parsing enabled");
    repeat (60) @(posedge clk);
    check_eq(got.size(), 10, "all commands handed over");
    foreach (w[i]) if (i < got.size()) check_eq(got[i], w[i], "command order");
    vme_r(16'h6034, d); check_eq(d, 10, "read-back count");
    foreach (w[i]) begin vme_r(16'h6030, d); check_eq(d, 16'(~w[i]), "read-back word"); end
    vme_r(16'h6030, d); check_eq(d, 0, "empty read-back FIFO reads 0");
    vme_r(16'h603C, t0); vme_r(16'h6040, t1);
    check_eq({t1, t0}, 10 * 3, "timer counts the cycles with work");
    repeat (5) @(posedge clk);
    vme_r(16'h603C, d); check_eq(d, t0, "timer stops when idle");
    vme_w(16'h6024, 0);
    vme_w(16'h602C, 16'h1234);
    vme_w(16'h6020, 0);
    vme_r(16'h6038, d); check_eq(d[3:0], 4'b1010, "reset empties FIFOs and disables parsing");
    vme_r(16'h603C, d); check_eq(d, 0, "reset clears the timer");
    finish_tb();
  end
endmodule
