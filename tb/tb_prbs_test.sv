// tb_prbs_test: the DDU (W 9000 / R 900C) and PC (W 9100 / R 910C) link
// tests with a loopback of a few cycles of latency. The transmitted words are
// compared with a bit-serial PRBS 2^7-1 reference (b[n] = b[n-7] ^ b[n-6]);
// the test must last N*127 words, report 0 errors on a clean loop and
// exactly the number of corrupted words when the loop flips bits, and end by
// timeout when nothing comes back.
module tb_prbs_test;
  import odmb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  vme_cmd_t cmd = '0;
  vme_rsp_t rsp, r0, r1;
  logic tx_valid0, tx_valid1, busy0, busy1;
  logic [15:0] tx_data0, tx_data1;
  logic rx_valid0, rx_valid1;
  logic [15:0] rx_data0, rx_data1;
  logic [15:0] flip = 0;
  logic [3:0][16:0] pipe0, pipe1;
  int tx_words0 = 0, tx_words1 = 0, ref_bad = 0, corrupt_every = 0, corrupted = 0;
  logic [127+6:0] refbits;
  int refpos = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  assign rsp = '{ack: r0.ack | r1.ack, data: r0.data | r1.data};
  prbs_test #(.SUB(4'h0), .TIMEOUT(64)) dut0 (.clk, .rst, .cmd, .rsp(r0), .tx_valid(tx_valid0),
    .tx_data(tx_data0), .rx_valid(rx_valid0), .rx_data(rx_data0), .busy(busy0));
  prbs_test #(.SUB(4'h1), .TIMEOUT(64)) dut1 (.clk, .rst, .cmd, .rsp(r1), .tx_valid(tx_valid1),
    .tx_data(tx_data1), .rx_valid(rx_valid1), .rx_data(rx_data1), .busy(busy1));

  // Loopback: 4 cycles latency, optional corruption of every n-th word (DDU).
  logic loop_on = 1;
  always @(posedge clk) begin
    logic [15:0] w;
    w = tx_data0;
    if (tx_valid0 && corrupt_every != 0 && (tx_words0 % corrupt_every) == 5) begin
      w = w ^ 16'h0100; corrupted++;
    end
    pipe0 <= {pipe0[2:0], {tx_valid0 & loop_on, w}};
    pipe1 <= {pipe1[2:0], {tx_valid1 & loop_on, tx_data1}};
    if (tx_valid0 && !rst) tx_words0++;
    if (tx_valid1 && !rst) tx_words1++;
  end
  assign {rx_valid0, rx_data0} = pipe0[3];
  assign {rx_valid1, rx_data1} = pipe1[3];

  // Bit-serial reference, all-ones start; one 127-bit period kept.
  initial begin
    logic [6:0] s = 7'h7F;
    for (int n = 0; n < 127; n++) begin
      refbits[n] = s[6] ^ s[5];   // b[n-7] ^ b[n-6] with s[6] = b[n-7]
      s = {s[5:0], refbits[n]};
    end
  end
  always @(posedge clk) if (tx_valid1 && !rst) begin
    for (int i = 0; i < 16; i++) if (tx_data1[i] !== refbits[(refpos + i) % 127]) ref_bad++;
    refpos = (refpos + 16) % 127;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); finish_tb();
  end

  task automatic wait_idle();
    int n = 0;
    do begin @(posedge clk); n++; end while ((busy0 || busy1) && n < 20000);
  endtask

  initial begin
    logic [15:0] d;
    pipe0 = '0; pipe1 = '0;
    repeat (3) @(posedge clk); rst <= 1'b0; @(posedge clk);
    // clean loop on both links
    vme_w(16'h9000, 3);
    vme_w(16'h9100, 2);
    wait_idle();
    check_eq(tx_words0, 3 * 127, "DDU: 3 sequences of 127 words");
    check_eq(tx_words1, 2 * 127, "PC: 2 sequences of 127 words");
    check_eq(ref_bad, 0, "PC words match the bit-serial PRBS 2^7-1");
    vme_r(16'h900C, d); check_eq(d, 0, "DDU errors, clean loop");
    vme_r(16'h910C, d); check_eq(d, 0, "PC errors, clean loop");
    // corrupted loop on the DDU link
    corrupt_every = 50; corrupted = 0; tx_words0 = 0;
    vme_w(16'h9000, 4);
    wait_idle();
    check(corrupted > 0, "some words were corrupted");
    vme_r(16'h900C, d); check_eq(d, corrupted, "DDU errors = corrupted words");
    // broken loop: ends by timeout, no errors counted
    loop_on = 0;
    vme_w(16'h9100, 1);
    wait_idle();
    check(!busy1, "PC test ends without returned words");
    vme_r(16'h910C, d); check_eq(d, 0, "no words, no errors");
    finish_tb();
  end
endmodule
