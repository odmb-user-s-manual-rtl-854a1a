// odmb_top: slow-control and trigger-distribution firmware of the ODMB
// (Optical DAQ MotherBoard) for the ME1/1 stations of the CMS muon endcap.
//
// A VME command (vme_cmd_t: strobe, direction, 16-bit address, 16-bit data)
// is offered to every device at once; the device named by address bits
// [15:12] answers with an acknowledge and read data (vme_rsp_t), and the top
// ORs the answers together:
//   1 DCFEB JTAG (7 chains)   2 ODMB JTAG          3 ODMB/DCFEB control
//   4 configuration           5 test FIFOs         6 BPI (flash) interface
//   7 FPGA ADC monitoring     8 LVMB monitoring    9 PRBS link tests
//   FFFC  discrete-logic JTAG access to the FPGA
// Commands to any other device are acknowledged with read data 0, so the
// bus never hangs. Around the devices sit the trigger logic (L1A,
// L1A_MATCH, L1A_COUNTER; a DCFEB is matched when the L1A comes
// LCT_L1A_DLY after its raw LCT on ev_lct, see lct_l1a_match), the
// calibration pulse generator, the front-panel buttons and LEDs, and a
// firmware reset (PB0 or ODMB_CTRL[8]) that clears every register and FIFO
// except the LED logic.
// The event builder that forms DDU packets and Ethernet frames from the
// DCFEB, OTMB and ALCT data is outside this design: its event strobes
// (ev_*), its copy of the data for the test FIFOs (tf_*) and its link words
// (ddu_tx_*, pc_tx_*) are ports. During a PRBS test the test pattern replaces
// the link's normal words. The PC TX and DDU TX test FIFOs record the normal
// words sent, the PC RX and DDU RX FIFOs the words received outside a test.
// Clocks: clk (40 MHz, the bunch-crossing clock), clk80 (80 MHz, locked to
// clk, for the 12.5 ns calibration delays), ddu_clk and pc_clk only drive the
// LED blinkers. rst is the power-on reset, synchronous to clk.
module odmb_top
  import odmb_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH   = 2048,
  parameter int unsigned TCK_HALF     = 2,
  parameter int unsigned CLK_HZ       = 40_000_000,
  parameter int unsigned BLINK_CYCLES = 3 * CLK_HZ,
  parameter int unsigned BLINK_BIT0   = 21,
  parameter int unsigned LED12_CYCLES = CLK_HZ / 10,
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic        clk,
  input  logic        clk80,
  input  logic        ddu_clk,
  input  logic        pc_clk,
  input  logic        rst,
  // VME
  input  vme_cmd_t    cmd,
  output vme_rsp_t    rsp,
  // front panel
  input  logic        pb0,
  input  logic        pb1,
  output logic [12:1] led,
  // DCFEB JTAG (device 1), ODMB JTAG (device 2), discrete JTAG (FFFC)
  output logic [6:0]  dcfeb_tck,
  output logic        dcfeb_tms,
  output logic        dcfeb_tdi,
  input  logic [6:0]  dcfeb_tdo,
  output logic        odmb_tck,
  output logic        odmb_tms,
  output logic        odmb_tdi,
  input  logic        odmb_tdo,
  output logic        fpga_tck,
  output logic        fpga_tms,
  output logic        fpga_tdi,
  input  logic        fpga_tdo,
  // control outputs (device 3, 4)
  output odmb_ctrl_t  odmb_ctrl,
  output dcfeb_ctrl_t dcfeb_pulse,
  output config_t     cfg,
  output logic [15:0] tp_sel,
  output logic [2:0]  loopback,
  output logic [3:0]  diffctrl,
  input  logic [7:1]  dcfeb_done,
  // triggers and calibration
  input  logic        ccb_l1a,
  input  logic        int_l1a,
  input  logic [9:1]  match_in,
  output logic        l1a,
  output logic [9:1]  l1a_match,
  output logic        l1a_resync,
  output logic [23:0] l1a_counter,
  output logic        injpls,
  output logic        extpls,
  output logic        cal_lct,
  // events counted for R 3YZC
  input  logic [7:1]  ev_lct,
  input  logic [9:1]  ev_pkt_stored,
  input  logic        ev_pkt_ddu,
  input  logic        ev_pkt_pc,
  input  logic [9:1]  ev_pkt_shipped,
  input  logic [7:1]  ev_crc_good,
  input  logic [15:0] otmb_avail,
  input  logic [15:0] alct_avail,
  input  logic        ccb_cmd_strobe,
  input  logic [5:0]  ccb_cmd,
  input  logic        ccb_evtrst,
  input  logic        ccb_bxrst,
  input  logic        ccb_data_strobe,
  input  logic [7:0]  ccb_data,
  input  logic [10:0] ccb_toggle_in,
  input  logic [4:0]  ccb_rsv,
  // test FIFO copies of DCFEB 1..7, OTMB, ALCT data
  input  logic [8:0]  tf_wr_en,
  input  logic [17:0] tf_din [9],
  // optical links
  input  logic        ddu_tx_valid_in,
  input  logic [15:0] ddu_tx_data_in,
  output logic        ddu_tx_valid,
  output logic [15:0] ddu_tx_data,
  input  logic        ddu_rx_valid,
  input  logic [15:0] ddu_rx_data,
  input  logic        pc_tx_valid_in,
  input  logic [15:0] pc_tx_data_in,
  output logic        pc_tx_valid,
  output logic [15:0] pc_tx_data,
  input  logic        pc_rx_valid,
  input  logic [15:0] pc_rx_data,
  // BPI flash engine
  output logic        bpi_cmd_valid,
  output logic [15:0] bpi_cmd,
  input  logic        bpi_cmd_ready,
  input  logic        bpi_rb_valid,
  input  logic [15:0] bpi_rb_data,
  input  logic        bpi_busy,
  input  logic [7:0]  bpi_status,
  output logic        bpi_rst,
  // FPGA system monitor ADC
  input  logic        adc_valid,
  input  logic [3:0]  adc_chan,
  input  logic [11:0] adc_data,
  // LVMB
  output logic [7:0]  lvmb_pon,
  input  logic [7:0]  lvmb_pon_status,
  output logic [6:0]  lvmb_ce,
  output logic        lvmb_sclk,
  output logic        lvmb_sdin,
  input  logic        lvmb_sdout
);
  logic sys_rst, soft_rst, fw_reset, pb1_pulse, blinking;
  logic [6:0] dcfeb_sel;
  logic       odmb_sel;
  vme_rsp_t r_d1, r_d2, r_em, r_d3, r_d4, r_d5, r_d6, r_d7, r_d8, r_d9a, r_d9b, r_def;
  logic [7:0]  data_sel;
  logic [15:0] data_val;
  logic        prbs_ddu_valid, prbs_pc_valid, prbs_ddu_busy, prbs_pc_busy;
  logic [15:0] prbs_ddu_data, prbs_pc_data;
  logic [12:0] tf_we;
  logic [17:0] tf_d [13];
  logic [CW-1:0] tf_count [13];
  logic [12:0] tf_full;
  logic [2:0]  tf_dcfeb_sel;

  assign sys_rst = rst | soft_rst;

  // ---- VME devices -------------------------------------------------------
  jtag_vme #(.DEV(4'h1), .NCHAIN(7), .TCK_HALF(TCK_HALF)) u_dcfeb_jtag (
    .clk, .rst(sys_rst), .cmd, .rsp(r_d1), .jtag_tck(dcfeb_tck), .jtag_tms(dcfeb_tms),
    .jtag_tdi(dcfeb_tdi), .jtag_tdo(dcfeb_tdo), .sel(dcfeb_sel));

  jtag_vme #(.DEV(4'h2), .NCHAIN(1), .TCK_HALF(TCK_HALF)) u_odmb_jtag (
    .clk, .rst(sys_rst), .cmd, .rsp(r_d2), .jtag_tck(odmb_tck), .jtag_tms(odmb_tms),
    .jtag_tdi(odmb_tdi), .jtag_tdo(odmb_tdo), .sel(odmb_sel));

  emergency_jtag #(.TCK_HALF(TCK_HALF)) u_emergency (
    .clk, .rst, .cmd, .rsp(r_em), .tck(fpga_tck), .tms(fpga_tms), .tdi(fpga_tdi), .tdo(fpga_tdo));

  ctrl_dev u_ctrl (
    .clk, .rst(sys_rst), .cmd, .rsp(r_d3), .odmb_ctrl, .fw_reset, .dcfeb_pulse,
    .tp_sel, .loopback, .diffctrl, .dcfeb_done, .data_sel, .data_val);

  odmb_counters u_counters (
    .clk, .rst(sys_rst), .sel(data_sel), .rdata(data_val),
    .l1a_counter(l1a_counter[15:0]), .l1a, .l1a_match, .lct(ev_lct),
    .pkt_stored(ev_pkt_stored), .pkt_ddu(ev_pkt_ddu), .pkt_pc(ev_pkt_pc),
    .pkt_shipped(ev_pkt_shipped), .crc_good(ev_crc_good), .otmb_avail, .alct_avail,
    .ccb_cmd_strobe, .ccb_cmd, .ccb_evtrst, .ccb_bxrst, .ccb_data_strobe, .ccb_data,
    .ccb_toggle_in, .ccb_rsv);

  config_dev u_config (.clk, .rst(sys_rst), .cmd, .rsp(r_d4), .cfg);

  // Test FIFO write ports: DCFEB 1..7, PC TX, PC RX, DDU TX, DDU RX, OTMB, ALCT.
  always_comb begin
    for (int i = 0; i < 7; i++) begin tf_we[i] = tf_wr_en[i]; tf_d[i] = tf_din[i]; end
    tf_we[7]  = pc_tx_valid_in && !prbs_pc_busy;    tf_d[7]  = {2'b00, pc_tx_data_in};
    tf_we[8]  = pc_rx_valid && !prbs_pc_busy;       tf_d[8]  = {2'b00, pc_rx_data};
    tf_we[9]  = ddu_tx_valid_in && !prbs_ddu_busy;  tf_d[9]  = {2'b00, ddu_tx_data_in};
    tf_we[10] = ddu_rx_valid && !prbs_ddu_busy;     tf_d[10] = {2'b00, ddu_rx_data};
    tf_we[11] = tf_wr_en[7];                        tf_d[11] = tf_din[7];
    tf_we[12] = tf_wr_en[8];                        tf_d[12] = tf_din[8];
  end

  testfifo_dev #(.DEPTH(FIFO_DEPTH)) u_testfifo (
    .clk, .rst(sys_rst), .cmd, .rsp(r_d5), .wr_en(tf_we), .din(tf_d), .count(tf_count),
    .full(tf_full), .dcfeb_sel(tf_dcfeb_sel));

  bpi_dev u_bpi (
    .clk, .rst(sys_rst), .cmd, .rsp(r_d6), .bpi_cmd_valid, .bpi_cmd, .bpi_cmd_ready,
    .bpi_rb_valid, .bpi_rb_data, .bpi_busy, .bpi_status, .bpi_rst);

  sysmon_dev u_sysmon (.clk, .rst(sys_rst), .cmd, .rsp(r_d7), .adc_valid, .adc_chan, .adc_data);

  lvmb_dev u_lvmb (
    .clk, .rst(sys_rst), .cmd, .rsp(r_d8), .dummy_lvmb(odmb_ctrl.dummy_lvmb), .lvmb_pon,
    .lvmb_pon_status, .lvmb_ce, .lvmb_sclk, .lvmb_sdin, .lvmb_sdout);

  prbs_test #(.SUB(4'h0)) u_prbs_ddu (
    .clk, .rst(sys_rst), .cmd, .rsp(r_d9a), .tx_valid(prbs_ddu_valid), .tx_data(prbs_ddu_data),
    .rx_valid(ddu_rx_valid), .rx_data(ddu_rx_data), .busy(prbs_ddu_busy));

  prbs_test #(.SUB(4'h1)) u_prbs_pc (
    .clk, .rst(sys_rst), .cmd, .rsp(r_d9b), .tx_valid(prbs_pc_valid), .tx_data(prbs_pc_data),
    .rx_valid(pc_rx_valid), .rx_data(pc_rx_data), .busy(prbs_pc_busy));

  assign ddu_tx_valid = prbs_ddu_busy ? prbs_ddu_valid : ddu_tx_valid_in;
  assign ddu_tx_data  = prbs_ddu_busy ? prbs_ddu_data  : ddu_tx_data_in;
  assign pc_tx_valid  = prbs_pc_busy  ? prbs_pc_valid  : pc_tx_valid_in;
  assign pc_tx_data   = prbs_pc_busy  ? prbs_pc_data   : pc_tx_data_in;

  // Commands to no device: acknowledge with 0.
  always_ff @(posedge clk) begin
    r_def <= RSP_NONE;
    if (!rst && cmd.valid && (cmd.addr[15:12] == 4'h0 || cmd.addr[15:12] >= 4'hA) &&
        cmd.addr != EMERGENCY_ADDR)
      r_def.ack <= 1'b1;
  end

  always_comb begin
    rsp = r_d1 | r_d2 | r_em | r_d3 | r_d4 | r_d5 | r_d6 | r_d7 | r_d8 | r_d9a | r_d9b | r_def;
  end

  // ---- triggers, calibration, front panel -----------------------------------
  // DCFEB matches: an L1A that arrives LCT_L1A_DLY after a DCFEB's raw LCT,
  // plus any match request from the data path.
  logic [7:1] lct_match;
  logic [9:1] match_req;
  lct_l1a_match u_lctm (
    .clk, .rst(sys_rst), .lct(ev_lct), .lct_l1a_dly(cfg.lct_l1a_dly),
    .l1a_src(odmb_ctrl.int_trig ? int_l1a : ccb_l1a), .match(lct_match));
  always_comb match_req = match_in | {2'b00, lct_match};

  trigger_ctrl u_trig (
    .clk, .rst(sys_rst), .odmb_ctrl, .kill(cfg.kill), .ccb_l1a, .int_l1a, .match_in(match_req),
    .test_l1a(dcfeb_pulse.test_l1a), .pb1(pb1_pulse), .resync(dcfeb_pulse.resync),
    .l1a, .l1a_match, .l1a_resync, .l1a_counter);

  calib_pulse u_calib (
    .clk80, .rst(sys_rst), .inj_req(dcfeb_pulse.injpls), .ext_req(dcfeb_pulse.extpls),
    .inj_dly(cfg.inj_dly), .ext_dly(cfg.ext_dly), .callct_dly(cfg.callct_dly),
    .cal_mode(odmb_ctrl.cal_mode), .injpls, .extpls, .cal_lct);

  led_ctrl #(.CLK_HZ(CLK_HZ), .BLINK_CYCLES(BLINK_CYCLES), .BLINK_BIT0(BLINK_BIT0),
             .LED12_CYCLES(LED12_CYCLES)) u_led (
    .clk, .ddu_clk, .pc_clk, .rst, .pb0, .pb1, .fw_reset, .vme_cmd(cmd.valid), .odmb_ctrl,
    .l1a_counter(l1a_counter[4:0]), .pb1_pulse, .soft_rst, .blinking, .led);

  // Only one device answers a command.
  assert property (@(posedge clk) disable iff (rst)
    $onehot0({r_d1.ack, r_d2.ack, r_em.ack, r_d3.ack, r_d4.ack, r_d5.ack, r_d6.ack,
              r_d7.ack, r_d8.ack, r_d9a.ack, r_d9b.ack, r_def.ack}));

endmodule
