// tb_odmb_counters: drives random event strobes for many cycles while a
// reference model in the testbench counts the same events, then compares
// every R 3YZC selection with the model: match, stored, shipped, good-CRC
// and LCT counts, DDU/PC packet counts, the LCT-to-L1A gap, the CCB
// snapshots and toggle bits, and unused selections reading 0.
module tb_odmb_counters;
  logic clk = 1'b0, rst = 1'b1;
  odmb_pkg::vme_cmd_t cmd;
  odmb_pkg::vme_rsp_t rsp = '0;
  logic [7:0]  sel = '0;
  logic [15:0] rdata, l1a_counter = 16'h1234, otmb_avail = 16'd3, alct_avail = 16'd4;
  logic        l1a = 0, pkt_ddu = 0, pkt_pc = 0, ccb_cmd_strobe = 0, ccb_evtrst = 0, ccb_bxrst = 0;
  logic        ccb_data_strobe = 0;
  logic [9:1]  l1a_match = 0, pkt_stored = 0, pkt_shipped = 0;
  logic [7:1]  lct = 0, crc_good = 0;
  logic [5:0]  ccb_cmd = 0;
  logic [7:0]  ccb_data = 0;
  logic [10:0] ccb_toggle_in = 0;
  logic [4:0]  ccb_rsv = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  odmb_counters dut (.*);

  int m_match [10], m_stored [10], m_shipped [10], m_crc [8], m_lct [8], m_gap [8];
  int m_since [8];
  int m_ddu = 0, m_pc = 0;
  logic [7:0] m_cmd = 0, m_data = 0;
  logic [10:0] m_tog = 0;
  logic [4:0] m_rsv = 0;
  bit seen_lct [8];

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); finish_tb();
  end

  function automatic logic [15:0] expect_of(input logic [7:0] s);
    int y = s[7:4], z = s[3:0];
    case (y)
      2: return (z >= 1 && z <= 9) ? 16'(m_match[z]) : 0;
      3: return (z >= 1 && z <= 7) ? 16'(m_gap[z]) : (z == 15 ? l1a_counter : 0);
      4: return (z >= 1 && z <= 9) ? 16'(m_stored[z]) : (z == 10 ? 16'(m_ddu) : (z == 11 ? 16'(m_pc) : 0));
      5: return (z >= 1 && z <= 9) ? 16'(m_shipped[z]) : (z == 10 ? {8'h0, m_cmd} :
                (z == 11 ? {8'h0, m_data} : (z == 12 ? {5'h0, m_tog} : (z == 13 ? {11'h0, m_rsv} : 0))));
      6: return (z >= 1 && z <= 7) ? 16'(m_crc[z]) : 0;
      7: return (z >= 1 && z <= 7) ? 16'(m_lct[z]) : (z == 8 ? otmb_avail : (z == 9 ? alct_avail : 0));
      default: return 0;
    endcase
  endfunction

  initial begin
    int cyc = 0;
    foreach (m_match[i]) begin m_match[i] = 0; m_stored[i] = 0; m_shipped[i] = 0; end
    foreach (m_crc[i]) begin m_crc[i] = 0; m_lct[i] = 0; m_gap[i] = 0; m_since[i] = 0; seen_lct[i] = 0; end
    repeat (3) @(posedge clk); rst <= 1'b0;
    repeat (3000) begin
      // random strobes for this cycle
      l1a_match   = 9'($urandom) & 9'($urandom);
      pkt_stored  = 9'($urandom) & 9'($urandom);
      pkt_shipped = 9'($urandom) & 9'($urandom);
      crc_good    = 7'($urandom) & 7'($urandom);
      lct         = 7'($urandom) & 7'($urandom) & 7'($urandom) & 7'($urandom);
      l1a         = ($urandom % 16) == 0;
      pkt_ddu     = $urandom % 2;
      pkt_pc      = $urandom % 3 == 0;
      ccb_cmd_strobe  = $urandom % 5 == 0;  ccb_cmd = 6'($urandom);
      ccb_evtrst = $urandom % 2; ccb_bxrst = $urandom % 2;
      ccb_data_strobe = $urandom % 7 == 0;  ccb_data = 8'($urandom);
      ccb_toggle_in = 11'($urandom) & 11'($urandom);
      ccb_rsv = 5'($urandom) & 5'($urandom);
      // model
      for (int i = 1; i <= 9; i++) begin
        m_match[i] += l1a_match[i]; m_stored[i] += pkt_stored[i]; m_shipped[i] += pkt_shipped[i];
      end
      for (int i = 1; i <= 7; i++) begin
        m_crc[i] += crc_good[i]; m_lct[i] += lct[i];
        if (l1a) m_gap[i] = lct[i] ? 0 : (seen_lct[i] ? m_since[i] : 0);
        if (lct[i]) begin m_since[i] = 1; seen_lct[i] = 1; end else m_since[i]++;
      end
      m_ddu += pkt_ddu; m_pc += pkt_pc;
      if (ccb_cmd_strobe) m_cmd = {ccb_bxrst, ccb_evtrst, ccb_cmd};
      if (ccb_data_strobe) m_data = ccb_data;
      m_tog ^= ccb_toggle_in; m_rsv ^= ccb_rsv;
      @(posedge clk); #1;
    end
    {l1a_match, pkt_stored, pkt_shipped, crc_good, lct, l1a, pkt_ddu, pkt_pc} = '0;
    {ccb_cmd_strobe, ccb_data_strobe, ccb_toggle_in, ccb_rsv} = '0;
    @(posedge clk); #1;
    for (int s = 16'h20; s < 16'h80; s++) begin
      sel = 8'(s);
      #1;
      // the gap of DCFEBs that never saw an LCT before an L1A is not defined
      if (s >= 16'h31 && s <= 16'h37 && !seen_lct[s - 16'h30]) continue;
      check_eq(rdata, expect_of(8'(s)), $sformatf("selection %02x", s));
    end
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    sel = 8'h21; #1; check_eq(rdata, 0, "reset clears counters");
    finish_tb();
  end
endmodule
