// tb_odmb_top: end-to-end test of the whole ODMB firmware at its default
// parameters (2048-word FIFOs, 40 MHz clock rates). Around the top sit TAP
// models for the seven DCFEBs, the ODMB JTAG chain and the discrete-logic
// JTAG port, a loopback of both optical links, a flash-engine stand-in, a
// system-monitor ADC stand-in and a serial LVMB ADC model. The test goes
// through every VME device and every mode the firmware has and counts each
// mechanism it makes happen; a mechanism that never happened is a failure.
module tb_odmb_top;
  import odmb_pkg::*;
  logic clk = 0, clk80 = 0, ddu_clk = 0, pc_clk = 0, rst = 1;
  vme_cmd_t cmd = '0;
  vme_rsp_t rsp;
  logic pb0 = 0, pb1 = 0;
  logic [12:1] led;
  logic [6:0] dcfeb_tck, dcfeb_tdo;
  logic dcfeb_tms, dcfeb_tdi, odmb_tck, odmb_tms, odmb_tdi, odmb_tdo, fpga_tck, fpga_tms, fpga_tdi, fpga_tdo;
  odmb_ctrl_t odmb_ctrl;
  dcfeb_ctrl_t dcfeb_pulse;
  config_t cfg;
  logic [15:0] tp_sel;
  logic [2:0] loopback;
  logic [3:0] diffctrl;
  logic [7:1] dcfeb_done = 7'b1011011;
  logic ccb_l1a = 0, int_l1a = 0, l1a, l1a_resync, injpls, extpls, cal_lct;
  logic [9:1] match_in = '0, l1a_match;
  logic [23:0] l1a_counter;
  logic [7:1] ev_lct = 0, ev_crc_good = 0;
  logic [9:1] ev_pkt_stored = 0, ev_pkt_shipped = 0;
  logic ev_pkt_ddu = 0, ev_pkt_pc = 0;
  logic [15:0] otmb_avail = 16'd2, alct_avail = 16'd3;
  logic ccb_cmd_strobe = 0, ccb_evtrst = 0, ccb_bxrst = 0, ccb_data_strobe = 0;
  logic [5:0] ccb_cmd = 0;
  logic [7:0] ccb_data = 0;
  logic [10:0] ccb_toggle_in = 0;
  logic [4:0] ccb_rsv = 0;
  logic [8:0] tf_wr_en = 0;
  logic [17:0] tf_din [9];
  logic ddu_tx_valid_in = 0, ddu_tx_valid, ddu_rx_valid, pc_tx_valid_in = 0, pc_tx_valid, pc_rx_valid;
  logic [15:0] ddu_tx_data_in = 0, ddu_tx_data, ddu_rx_data, pc_tx_data_in = 0, pc_tx_data, pc_rx_data;
  logic bpi_cmd_valid, bpi_cmd_ready, bpi_rb_valid = 0, bpi_busy = 0, bpi_rst;
  logic [15:0] bpi_cmd, bpi_rb_data = 0;
  logic [7:0] bpi_status = 8'h3C;
  logic adc_valid = 0;
  logic [3:0] adc_chan = 0;
  logic [11:0] adc_data = 0;
  logic [7:0] lvmb_pon, lvmb_pon_status = 8'h0F;
  logic [6:0] lvmb_ce;
  logic lvmb_sclk, lvmb_sdin, lvmb_sdout;

  always #12.5 clk = ~clk;                 // 40 MHz
  always #6.25 clk80 = ~clk80;             // 80 MHz, edges aligned with clk
  always #6.25 ddu_clk = ~ddu_clk;         // 80 MHz
  always #8 pc_clk = ~pc_clk;              // 62.5 MHz
  `include "tb_common.svh"

  odmb_top dut (.*);

  // ---- models ---------------------------------------------------------------
  for (genvar i = 0; i < 7; i++) begin : g_dcfeb
    jtag_tap_model #(.USERCODE(32'hDCFE_B000 + 32'(i + 1))) tap (
      .tck(dcfeb_tck[i]), .tms(dcfeb_tms), .tdi(dcfeb_tdi), .tdo(dcfeb_tdo[i]));
  end
  jtag_tap_model #(.USERCODE(FW_USERCODE)) tap_odmb (.tck(odmb_tck), .tms(odmb_tms), .tdi(odmb_tdi), .tdo(odmb_tdo));
  jtag_tap_model #(.USERCODE(FW_USERCODE)) tap_fpga (.tck(fpga_tck), .tms(fpga_tms), .tdi(fpga_tdi), .tdo(fpga_tdo));

  // Optical loopback, 3 cycles; flip_pc corrupts one PC word.
  logic [2:0][16:0] dpipe, ppipe;
  int flip_pc = -1, pc_words = 0;
  always @(posedge clk) begin
    logic [15:0] w;
    w = pc_tx_data;
    if (pc_tx_valid) begin
      if (pc_words == flip_pc) w = w ^ 16'h0010;
      pc_words++;
    end
    dpipe <= {dpipe[1:0], {ddu_tx_valid, ddu_tx_data}};
    ppipe <= {ppipe[1:0], {pc_tx_valid, w}};
  end
  assign {ddu_rx_valid, ddu_rx_data} = dpipe[2];
  assign {pc_rx_valid, pc_rx_data}   = ppipe[2];

  // Flash engine stand-in: echoes each command word plus 1 into read-back.
  assign bpi_cmd_ready = 1'b1;
  always @(posedge clk) begin
    bpi_rb_valid <= bpi_cmd_valid;
    bpi_rb_data  <= bpi_cmd + 16'd1;
  end

  // System monitor stand-in: channel c reads 12'h100 * c + 12'h0AB.
  always @(posedge clk) begin
    adc_valid <= 1'b1;
    adc_chan  <= (adc_chan == 4'd8) ? 4'd0 : adc_chan + 4'd1;
    adc_data  <= 12'h100 * 12'((adc_chan == 4'd8) ? 0 : adc_chan + 1) + 12'h0AB;
  end

  // LVMB serial ADC model: returns {control byte, 8'hA0 + ADC number}.
  int lv_rise = 0;
  logic [7:0] lv_ctrl = 0;
  logic [15:0] lv_res;
  int lv_n;
  always_comb begin
    lv_n = 0;
    for (int n = 0; n < 7; n++) if (!lvmb_ce[n]) lv_n = n;
  end
  assign lv_res = {lv_ctrl, 8'hA0 + 8'(lv_n)};
  always @(negedge (&lvmb_ce)) lv_rise = 0;
  always @(posedge lvmb_sclk) if (!(&lvmb_ce)) begin
    if (lv_rise < 8) lv_ctrl = {lv_ctrl[6:0], lvmb_sdin};
    lv_rise++;
  end
  always @(negedge lvmb_sclk) lvmb_sdout = (lv_rise >= 8 && lv_rise < 24) ? lv_res[23 - lv_rise] : 1'b0;

  // ---- event monitors -------------------------------------------------------
  int n_l1a = 0, n_match [10], n_injpls = 0, n_extpls = 0, n_resync = 0, n_soft_rst = 0;
  always @(posedge clk) if (!rst) begin
    if (l1a) n_l1a++;
    for (int i = 1; i <= 9; i++) if (l1a_match[i]) n_match[i]++;
    if (l1a_resync) n_resync++;
  end
  logic injpls_q = 0, extpls_q = 0, soft_q = 0;
  always @(posedge clk80) begin
    injpls_q <= injpls; extpls_q <= extpls;
    if (!rst && injpls && !injpls_q) n_injpls++;
    if (!rst && extpls && !extpls_q) n_extpls++;
  end
  always @(posedge clk) begin
    soft_q <= dut.soft_rst;
    if (!rst && dut.soft_rst && !soft_q) n_soft_rst++;
  end

  // Mechanisms: name -> times seen.
  int mech [string];
  task automatic saw(input string m);
    if (!mech.exists(m)) mech[m] = 0;
    mech[m]++;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); finish_tb();
  end

  // ---- helpers --------------------------------------------------------------
  task automatic usercode(input logic [3:0] dev, output logic [31:0] uc);
    logic [15:0] lo, hi, d; int c;
    vme_w({dev, 12'h018}, 0);
    vme_w({dev, 12'h91C}, 16'h03C8);
    vme_op(1'b1, {dev, 12'hF04}, 0, d, c);
    check_eq(c, 19 * 2 * 2 + 2, "16-bit DR shift with header takes 19 TCK cycles");
    vme_r({dev, 12'h014}, lo);
    vme_w({dev, 12'hF08}, 0);
    vme_r({dev, 12'h014}, hi);
    uc = {hi, lo};
  endtask

  task automatic pulse_l1a(input bit internal, input logic [9:1] m);
    @(posedge clk);
    if (internal) int_l1a <= 1; else ccb_l1a <= 1;
    match_in <= m;
    @(posedge clk);
    int_l1a <= 0; ccb_l1a <= 0; match_in <= 0;
    repeat (2) @(posedge clk);
  endtask

  // ---- the test -------------------------------------------------------------
  initial begin
    logic [15:0] d;
    logic [31:0] uc;
    int l0, m0 [10], c;
    logic [15:0] ir_seq [10] = '{0, 0, 0, 2, 0, 0, 2, 2, 2, 3};
    foreach (tf_din[i]) tf_din[i] = '0;
    foreach (n_match[i]) n_match[i] = 0;
    dpipe = '0; ppipe = '0;
    repeat (5) @(posedge clk); rst <= 0; repeat (3) @(posedge clk);

    // Unknown device and firmware version
    vme_op(1'b0, 16'hA000, 0, d, c);
    check(c == 1 && d == 0, "unknown device acknowledged with 0"); saw("default acknowledge");
    vme_r(16'h4024, d); check_eq(d, FW_VERSION, "firmware version"); saw("configuration read");

    // Device 1: DCFEB 3 USERCODE, as in the manual's example
    vme_w(16'h1020, 16'h0004);
    vme_r(16'h1024, d); check_eq(d, 4, "DCFEB 3 selected");
    usercode(4'h1, uc); check_eq(uc, 32'hDCFE_B003, "DCFEB 3 USERCODE"); saw("DCFEB JTAG");
    vme_w(16'h1020, 16'h0040);
    usercode(4'h1, uc); check_eq(uc, 32'hDCFE_B007, "DCFEB 7 USERCODE"); saw("DCFEB JTAG");
    // Device 2
    usercode(4'h2, uc); check_eq(uc, 32'h0105DBDB, "ODMB USERCODE XYZKdbdb"); saw("ODMB JTAG");
    // Discrete logic at FFFC
    repeat (5) vme_w(16'hFFFC, 1);
    vme_w(16'hFFFC, 0);
    vme_w(16'hFFFC, 1); vme_w(16'hFFFC, 1); vme_w(16'hFFFC, 0); vme_w(16'hFFFC, 0);
    foreach (ir_seq[i]) vme_w(16'hFFFC, ir_seq[i]);
    vme_w(16'hFFFC, 1); vme_w(16'hFFFC, 0); vme_w(16'hFFFC, 1); vme_w(16'hFFFC, 0);
    for (int i = 0; i < 32; i++) begin vme_w(16'hFFFC, 0); vme_r(16'hFFFC, d); uc[i] = d[0]; end
    check_eq(uc, 32'h0105DBDB, "USERCODE through the discrete logic"); saw("emergency JTAG");

    // Configuration: kill DCFEB 2, calibration delays
    vme_w(16'h401C, 16'h0004);
    vme_r(16'h401C, d); check_eq(d, 16'h0004, "KILL register"); check_eq(cfg.kill, 9'h002, "KILL output");
    vme_w(16'h4010, 5); vme_w(16'h4014, 9); vme_w(16'h4018, 3);
    check_eq(cfg.inj_dly, 5, "INJ_DLY"); saw("configuration write");

    // Triggers from the CCB with matches from the data path
    l0 = n_l1a; foreach (m0[i]) m0[i] = n_match[i];
    repeat (5) pulse_l1a(0, 9'b1_1000_0011);   // ALCT, OTMB, DCFEB 2, DCFEB 1
    check_eq(n_l1a - l0, 5, "CCB L1As sent");
    check_eq(n_match[1] - m0[1], 5, "DCFEB 1 matches");
    check_eq(n_match[2] - m0[2], 0, "DCFEB 2 killed"); saw("KILL mask");
    check_eq(n_match[8] - m0[8], 5, "OTMB matches");
    check_eq(l1a_counter, 5, "L1A_COUNTER");
    check_eq({led[10], led[8], led[6], led[4], led[2]}, 5, "L1A_COUNTER on LEDs 2-10");
    vme_r(16'h33FC, d); check_eq(d, 5, "R 33FC: L1A_COUNTER"); saw("ODMB_DATA read");
    vme_r(16'h321C, d); check_eq(d, 5, "R 321C: DCFEB 1 L1A_MATCHes");
    vme_r(16'h322C, d); check_eq(d, 0, "R 322C: killed DCFEB 2");
    vme_r(16'h329C, d); check_eq(d, 5, "R 329C: ALCT matches");

    // Pedestal mode: a match to every live DCFEB for each L1A
    vme_w(16'h3000, 16'h2000);
    check(!led[7], "LED 7 off in pedestal mode");
    foreach (m0[i]) m0[i] = n_match[i];
    repeat (3) pulse_l1a(0, 9'h000);
    check_eq(n_match[5] - m0[5], 3, "pedestal: DCFEB 5 matched each L1A");
    check_eq(n_match[2] - m0[2], 0, "pedestal: killed DCFEB 2 stays quiet"); saw("pedestal mode");
    // Internal triggers: CCB ignored
    vme_w(16'h3000, 16'h0200);
    check(!led[9], "LED 9 off with internal triggers");
    l0 = n_l1a;
    pulse_l1a(0, 0); pulse_l1a(1, 0); pulse_l1a(1, 0);
    check_eq(n_l1a - l0, 2, "internal triggers only"); saw("internal triggers");
    // Kill L1A
    vme_w(16'h3000, 16'h0800);
    l0 = n_l1a;
    pulse_l1a(0, 9'h1FF);
    check_eq(n_l1a - l0, 0, "L1A killed"); saw("kill L1A");
    vme_w(16'h3000, 16'h1000);
    foreach (m0[i]) m0[i] = n_match[i];
    pulse_l1a(0, 9'h1FF);
    check_eq(n_match[1] - m0[1], 0, "L1A_MATCH killed"); saw("kill L1A_MATCH");
    vme_w(16'h3000, 16'h0000);

    // DCFEB_CTRL: test L1A, resync, calibration pulses
    l0 = n_l1a; foreach (m0[i]) m0[i] = n_match[i];
    vme_w(16'h3010, 16'h0010); repeat (3) @(posedge clk);
    check_eq(n_l1a - l0, 1, "test L1A");
    check_eq(n_match[2] - m0[2], 1, "test L1A_MATCH reaches all DCFEBs"); saw("test L1A");
    vme_w(16'h3010, 16'h0002); repeat (3) @(posedge clk);
    check_eq(l1a_counter, 0, "L1A_COUNTER resynchronised");
    check_eq(n_resync, 1, "resync sent to DCFEBs"); saw("L1A_COUNTER resync");
    vme_w(16'h3010, 16'h000C); repeat (40) @(posedge clk);
    check_eq(n_injpls, 1, "INJPLS sent"); check_eq(n_extpls, 1, "EXTPLS sent"); saw("calibration pulses");
    // PB1
    l0 = n_l1a;
    pb1 <= 1; repeat (10) @(posedge clk);
    check(led[12], "LED 12 on while PB1 pressed");
    pb1 <= 0; repeat (5) @(posedge clk);
    check_eq(n_l1a - l0, 1, "PB1 sends one L1A"); saw("PB1");

    // Device 3 odds and ends
    vme_w(16'h3100, 1); vme_w(16'h3110, 16'hF); vme_w(16'h3020, 16'h1234);
    check(loopback == 1 && diffctrl == 15 && tp_sel == 16'h1234, "LOOPBACK, DIFFCTRL, TP_SEL");
    vme_r(16'h3120, d); check_eq(d, 16'h5B, "DCFEB DONE bits");

    // LCT-L1A matching: L1A 96 + LCT_L1A_DLY = 100 BX after the raw LCTs
    vme_w(16'h4000, 4);
    vme_r(16'h4000, d); check_eq(d, 4, "LCT_L1A_DLY");
    foreach (m0[i]) m0[i] = n_match[i];
    @(posedge clk); ev_lct <= 7'b001_0010;          // DCFEB 5 and killed DCFEB 2
    @(posedge clk); ev_lct <= 0;
    repeat (99) @(posedge clk); ccb_l1a <= 1;
    @(posedge clk); ccb_l1a <= 0;
    @(posedge clk); ev_lct <= 7'b010_0000;          // DCFEB 6, L1A one BX early
    @(posedge clk); ev_lct <= 0;
    repeat (98) @(posedge clk); ccb_l1a <= 1;
    @(posedge clk); ccb_l1a <= 0;
    repeat (3) @(posedge clk);
    check_eq(n_match[5] - m0[5], 1, "DCFEB 5 matched to the L1A 100 BX after its LCT");
    check_eq(n_match[2] - m0[2], 0, "killed DCFEB 2 not matched");
    check_eq(n_match[6] - m0[6], 0, "DCFEB 6 not matched one BX early");
    if (n_match[5] - m0[5] == 1) saw("LCT-L1A matching");
    vme_r(16'h375C, d); check_eq(d, 1, "LCTs of DCFEB 5");

    // Event counters and CCB snapshots
    @(posedge clk);
    ev_pkt_ddu <= 1; ev_lct <= 7'h01; ccb_cmd_strobe <= 1; ccb_cmd <= 6'h2A; ccb_bxrst <= 1;
    @(posedge clk);
    ev_pkt_ddu <= 0; ev_lct <= 0; ccb_cmd_strobe <= 0; ccb_bxrst <= 0;
    repeat (6) @(posedge clk);
    ccb_l1a <= 1; @(posedge clk); ccb_l1a <= 0; repeat (2) @(posedge clk);
    vme_r(16'h34AC, d); check_eq(d, 1, "packets to DDU");
    vme_r(16'h371C, d); check_eq(d, 1, "LCTs of DCFEB 1");
    vme_r(16'h331C, d); check_eq(d, 8, "LCT-L1A gap: 7 BX plus the L1A output register"); saw("LCT-L1A gap");
    vme_r(16'h35AC, d); check_eq(d, 16'h00AA, "last CCB command with BXRST");
    vme_r(16'h378C, d); check_eq(d, 2, "available OTMB packets");

    // Test FIFOs: DCFEB 4 copy and DDU TX
    for (int k = 0; k < 5; k++) begin
      tf_wr_en <= 9'h008; tf_din[3] <= 18'h10 + 18'(k);
      ddu_tx_valid_in <= 1; ddu_tx_data_in <= 16'hD000 + 16'(k);
      @(posedge clk);
    end
    tf_wr_en <= 0; ddu_tx_valid_in <= 0;
    @(posedge clk);
    vme_w(16'h5010, 4);
    vme_r(16'h500C, d); check_eq(d, 5, "DCFEB 4 FIFO count");
    vme_r(16'h5000, d); check_eq(d, 16'h10, "DCFEB 4 FIFO first word");
    vme_r(16'h530C, d); check_eq(d, 5, "DDU TX FIFO count");
    vme_r(16'h540C, d); check_eq(d, 5, "DDU RX FIFO count through the loopback");
    vme_r(16'h5400, d); check_eq(d, 16'hD000, "DDU RX word"); saw("test FIFOs");
    vme_w(16'h5320, 0);
    vme_r(16'h530C, d); check_eq(d, 0, "DDU TX FIFO reset");

    // PRBS link tests
    vme_w(16'h9000, 2);
    flip_pc = 40; pc_words = 0;
    vme_w(16'h9100, 1);
    repeat (400) @(posedge clk);
    vme_r(16'h900C, d); check_eq(d, 0, "DDU PRBS test: no errors");
    vme_r(16'h910C, d); check_eq(d, 1, "PC PRBS test: the corrupted word"); saw("PRBS test");
    check_eq(pc_words, 127, "one sequence is 127 words");
    vme_r(16'h540C, d); check_eq(d, 4, "PRBS words stay out of the DDU RX FIFO (one word read before)");

    // BPI
    vme_w(16'h6024, 0);
    vme_w(16'h602C, 16'h0100); vme_w(16'h602C, 16'h0200); vme_w(16'h602C, 16'h0300);
    vme_r(16'h6034, d); check_eq(d, 0, "nothing parsed yet");
    vme_w(16'h6028, 0); repeat (10) @(posedge clk);
    vme_r(16'h6034, d); check_eq(d, 3, "three read-back words");
    vme_r(16'h6030, d); check_eq(d, 16'h0101, "read-back word"); saw("BPI command FIFO");
    vme_r(16'h6038, d); check_eq(d[15:8], 8'h3C, "BPI status register");

    // System monitor
    vme_r(16'h7000, d); check_eq(d, 16'h00AB, "FPGA temperature channel");
    vme_r(16'h7150, d); check_eq(d, 16'h06AB, "THERM1 channel"); saw("system monitor");

    // LVMB
    vme_w(16'h8020, 2);
    vme_w(16'h8000, 16'h008E);
    vme_r(16'h8004, d); check_eq(d, 16'h8EA2, "LVMB ADC 2 result"); saw("LVMB ADC");
    vme_w(16'h8010, 16'h00FF); check_eq(lvmb_pon, 8'hFF, "power on all");
    vme_r(16'h8018, d); check_eq(d, 16'h0F, "LVMB status");
    vme_w(16'h3000, 16'h0400);
    vme_r(16'h8018, d); check_eq(d, 16'hFF, "dummy LVMB"); saw("dummy LVMB");

    // Firmware reset through ODMB_CTRL[8], then PB0
    vme_w(16'h3000, 16'h0100);
    repeat (30) @(posedge clk);
    vme_r(16'h401C, d); check_eq(d, 0, "firmware reset cleared KILL");
    vme_r(16'h33FC, d); check_eq(d, 0, "firmware reset cleared the counters");
    vme_r(16'h3000, d); check_eq(d, 0, "firmware reset cleared ODMB_CTRL");
    check(dut.blinking, "LEDs blinking after the reset"); saw("firmware reset");
    vme_w(16'h4020, 16'h55);
    pb0 <= 1; repeat (10) @(posedge clk); pb0 <= 0; repeat (30) @(posedge clk);
    vme_r(16'h4020, d); check_eq(d, 0, "PB0 reset cleared CRATEID");
    check_eq(n_soft_rst, 2, "two firmware resets"); saw("PB0 reset");

    // Every mechanism must have happened
    begin
      string names [] = '{"default acknowledge", "configuration read", "configuration write",
        "DCFEB JTAG", "ODMB JTAG", "emergency JTAG", "KILL mask", "ODMB_DATA read",
        "pedestal mode", "internal triggers", "kill L1A", "kill L1A_MATCH", "test L1A",
        "L1A_COUNTER resync", "calibration pulses", "PB1", "LCT-L1A gap", "test FIFOs",
        "PRBS test", "BPI command FIFO", "LCT-L1A matching", "system monitor", "LVMB ADC", "dummy LVMB",
        "firmware reset", "PB0 reset"};
      foreach (names[i]) begin
        check(mech.exists(names[i]), {"mechanism happened: ", names[i]});
        if (mech.exists(names[i])) $display("mechanism %-22s seen %0d times", names[i], mech[names[i]]);
      end
    end
    finish_tb();
  end
endmodule
