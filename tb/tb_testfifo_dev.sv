// tb_testfifo_dev: device 5 with small FIFOs (DEPTH 64). Writes a different
// number of tagged words into each of the 13 FIFOs, then reads counts and
// words back through R 5Z0C / R 5Z00 and, for the DCFEB FIFOs, through the
// select register (W 5010) and R 500C / R 5000. Checks the per-FIFO reset
// W 5Z20, the DCFEB reset mask W 5020, and that an empty FIFO reads 0.
module tb_testfifo_dev;
  import odmb_pkg::*;
  localparam int D = 64;
  logic clk = 1'b0, rst = 1'b1;
  vme_cmd_t cmd = '0;
  vme_rsp_t rsp;
  logic [12:0] wr_en = '0, full;
  logic [17:0] din [13];
  logic [6:0]  count [13];
  logic [2:0]  dcfeb_sel;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  testfifo_dev #(.DEPTH(D)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); finish_tb();
  end

  function automatic logic [15:0] word(input int f, input int k);
    return 16'((f << 8) | k);
  endfunction

  task automatic fill();
    for (int k = 0; k < 20; k++) begin
      for (int f = 0; f < 13; f++) begin
        wr_en[f] <= (k < f + 3);
        din[f]   <= {2'b11, word(f, k)};
      end
      @(posedge clk);
    end
    wr_en <= '0;
    @(posedge clk);
  endtask

  initial begin
    logic [15:0] d;
    foreach (din[i]) din[i] = '0;
    repeat (3) @(posedge clk); rst <= 1'b0; @(posedge clk);
    fill();
    vme_r(16'h5010, d); check_eq(d, 1, "DCFEB select after reset is 1");
    // FIFOs Z = 1..6
    for (int z = 1; z <= 6; z++) begin
      int f;
      f = z + 6;
      vme_r(16'h500C | 16'(z << 8), d); check_eq(d, f + 3, $sformatf("count of FIFO %0d", z));
      for (int k = 0; k < f + 3; k++) begin
        vme_r(16'h5000 | 16'(z << 8), d); check_eq(d, word(f, k), "FIFO word, low 16 bits");
      end
      vme_r(16'h5000 | 16'(z << 8), d); check_eq(d, 0, "empty FIFO reads 0");
    end
    // DCFEB FIFOs through the select register
    for (int s = 1; s <= 7; s++) begin
      vme_w(16'h5010, 16'(s));
      vme_r(16'h500C, d); check_eq(d, s + 2, "count of selected DCFEB FIFO");
      vme_r(16'h5000, d); check_eq(d, word(s - 1, 0), "first word of DCFEB FIFO");
      vme_r(16'h5000, d); check_eq(d, word(s - 1, 1), "second word of DCFEB FIFO");
    end
    fill();
    vme_w(16'h5320, 0);
    vme_r(16'h530C, d); check_eq(d, 0, "W 5320 resets DDU TX FIFO");
    vme_r(16'h540C, d); check_eq(d, 13, "other FIFO untouched");
    vme_w(16'h5020, 16'h0005);   // DCFEB 1 and 3
    vme_w(16'h5010, 1); vme_r(16'h500C, d); check_eq(d, 0, "DCFEB 1 FIFO reset");
    vme_w(16'h5010, 2); vme_r(16'h500C, d); check_eq(d, 2 * 4 - 2, "DCFEB 2 FIFO kept");
    vme_w(16'h5010, 3); vme_r(16'h500C, d); check_eq(d, 0, "DCFEB 3 FIFO reset");
    // fill one FIFO to full
    repeat (D + 5) begin wr_en[12] <= 1'b1; @(posedge clk); end
    wr_en <= '0; @(posedge clk);
    vme_r(16'h560C, d); check_eq(d, D, "ALCT FIFO full at DEPTH words");
    check(full[12], "full flag");
    finish_tb();
  end
endmodule
