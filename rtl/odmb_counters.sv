// odmb_counters: the monitoring counters and CCB snapshots read through
// "R 3YZC" (ODMB_DATA, selection YZ).
//
// Index i of a 9-bit source vector is 1..7 for DCFEB 1..7, 8 for the OTMB
// and 9 for the ALCT, matching selections x1..x9 of the manual:
//   3F      L1A_COUNTER[15:0] (from the trigger logic)
//   21-29   L1A_MATCHes sent per source
//   31-37   bunch crossings between the last LCT and the L1A, per DCFEB
//   41-49   packets stored per source        4A/4B packets sent to DDU / PC
//   51-59   packets shipped per source       61-67  good-CRC packets per DCFEB
//   71-77   LCTs per DCFEB                   78/79  available OTMB / ALCT packets
//   5A      last CCB_CMD[5:0], EVTRST (bit 6), BXRST (bit 7) seen with CCB_CMD_STROBE
//   5B      last CCB_DATA[7:0] seen with CCB_DATA_STROBE
//   5C      toggle bits of CCB_CAL[2:0], BX0, BXRST, L1ARST, L1A, CLKEN, EVTRST,
//           CMD_STROBE, DATA_STROBE (bits 0..10)
//   5D      toggle bits of CCB_RSV
// All event inputs are one-cycle strobes in the clk domain (one per bunch
// crossing at 40 MHz). Counters are 16 bits and wrap; the LCT-L1A gap counter
// saturates at 16'hFFFF. A toggle bit flips each cycle its CCB signal is
// asserted. Everything clears on rst. The selections and what they count are
// the manual's; widths, bit order within 5A/5C and the strobe convention are
// this design's choices. rdata is combinational from sel.
module odmb_counters #(
  parameter int unsigned NRSV = 5
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [7:0]      sel,
  output logic [15:0]     rdata,
  input  logic [15:0]     l1a_counter,
  input  logic            l1a,
  input  logic [9:1]      l1a_match,
  input  logic [7:1]      lct,
  input  logic [9:1]      pkt_stored,
  input  logic            pkt_ddu,
  input  logic            pkt_pc,
  input  logic [9:1]      pkt_shipped,
  input  logic [7:1]      crc_good,
  input  logic [15:0]     otmb_avail,
  input  logic [15:0]     alct_avail,
  input  logic            ccb_cmd_strobe,
  input  logic [5:0]      ccb_cmd,
  input  logic            ccb_evtrst,
  input  logic            ccb_bxrst,
  input  logic            ccb_data_strobe,
  input  logic [7:0]      ccb_data,
  input  logic [10:0]     ccb_toggle_in,
  input  logic [NRSV-1:0] ccb_rsv
);
  logic [15:0] n_match [1:9], n_stored [1:9], n_shipped [1:9];
  logic [15:0] n_crc [1:7], n_lct [1:7], gap_run [1:7], gap [1:7];
  logic [15:0] n_ddu, n_pc;
  logic [7:0]  last_cmd, last_data;
  logic [10:0] tog;
  logic [NRSV-1:0] tog_rsv;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i <= 9; i++) begin n_match[i] <= '0; n_stored[i] <= '0; n_shipped[i] <= '0; end
      for (int i = 1; i <= 7; i++) begin n_crc[i] <= '0; n_lct[i] <= '0; gap_run[i] <= '0; gap[i] <= '0; end
      n_ddu <= '0; n_pc <= '0; last_cmd <= '0; last_data <= '0; tog <= '0; tog_rsv <= '0;
    end else begin
      for (int i = 1; i <= 9; i++) begin
        if (l1a_match[i])   n_match[i]   <= n_match[i] + 16'd1;
        if (pkt_stored[i])  n_stored[i]  <= n_stored[i] + 16'd1;
        if (pkt_shipped[i]) n_shipped[i] <= n_shipped[i] + 16'd1;
      end
      for (int i = 1; i <= 7; i++) begin
        if (crc_good[i]) n_crc[i] <= n_crc[i] + 16'd1;
        if (lct[i]) begin
          n_lct[i]   <= n_lct[i] + 16'd1;
          gap_run[i] <= 16'd1;             // next crossing is 1 BX after the LCT
        end else if (gap_run[i] != 16'hFFFF) begin
          gap_run[i] <= gap_run[i] + 16'd1;
        end
        if (l1a) gap[i] <= lct[i] ? 16'd0 : gap_run[i];
      end
      if (pkt_ddu) n_ddu <= n_ddu + 16'd1;
      if (pkt_pc)  n_pc  <= n_pc + 16'd1;
      if (ccb_cmd_strobe)  last_cmd  <= {ccb_bxrst, ccb_evtrst, ccb_cmd};
      if (ccb_data_strobe) last_data <= ccb_data;
      tog     <= tog ^ ccb_toggle_in;
      tog_rsv <= tog_rsv ^ ccb_rsv;
    end
  end

  always_comb begin
    logic [3:0] y, z;
    y = sel[7:4];
    z = sel[3:0];
    rdata = 16'h0000;
    unique case (y)
      4'h2: if (z >= 1 && z <= 9) rdata = n_match[z];
      4'h3: if (z >= 1 && z <= 7) rdata = gap[z[2:0]];
            else if (z == 4'hF) rdata = l1a_counter;
      4'h4: if (z >= 1 && z <= 9) rdata = n_stored[z];
            else if (z == 4'hA) rdata = n_ddu;
            else if (z == 4'hB) rdata = n_pc;
      4'h5: if (z >= 1 && z <= 9) rdata = n_shipped[z];
            else if (z == 4'hA) rdata = {8'h00, last_cmd};
            else if (z == 4'hB) rdata = {8'h00, last_data};
            else if (z == 4'hC) rdata = {5'h00, tog};
            else if (z == 4'hD) rdata = 16'(tog_rsv);
      4'h6: if (z >= 1 && z <= 7) rdata = n_crc[z[2:0]];
      4'h7: if (z >= 1 && z <= 7) rdata = n_lct[z[2:0]];
            else if (z == 4'h8) rdata = otmb_avail;
            else if (z == 4'h9) rdata = alct_avail;
      default: ;
    endcase
  end

endmodule
