// tb_test_fifo: fills the 2048 x 18 test FIFO to full with random data
// (checking that the extra write is dropped), drains it half way, runs random
// simultaneous writes and reads against a queue model, checks count, empty,
// full and first-word fall-through data every cycle, and the clear input.
module tb_test_fifo;
  localparam int D = 2048;
  logic clk = 1'b0, rst = 1'b1;
  odmb_pkg::vme_cmd_t cmd;
  odmb_pkg::vme_rsp_t rsp = '0;
  logic clr = 0, wr_en = 0, rd_en = 0, empty, full;
  logic [17:0] din = 0, dout;
  logic [11:0] count;
  logic [17:0] q [$];
  always #5 clk = ~clk;
  `include "tb_common.svh"

  test_fifo dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); finish_tb();
  end

  task automatic step(input bit w, input bit r);
    wr_en = w; rd_en = r; din = 18'($urandom);
    @(posedge clk);
    if (r && q.size() > 0) void'(q.pop_front());
    if (w && q.size() < D) q.push_back(din);
    #1;
    check_eq(count, q.size(), "count");
    check(empty == (q.size() == 0), "empty flag");
    check(full == (q.size() == D), "full flag");
    if (q.size() > 0) check_eq(dout, q[0], "head word");
  endtask

  initial begin
    repeat (3) @(posedge clk); rst = 1'b0; #1;
    check(empty && count == 0, "empty after reset");
    repeat (D + 1) step(1, 0);
    check_eq(count, D, "holds 2048 words");
    repeat (D / 2) step(0, 1);
    repeat (6000) step($urandom % 2, $urandom % 2);
    step(0, 1); step(1, 1);
    clr = 1; @(posedge clk); #1; clr = 0; q.delete();
    check(empty && count == 0, "clear empties the FIFO");
    step(0, 1);
    check(empty, "read of empty FIFO ignored");
    step(1, 0);
    finish_tb();
  end
endmodule
