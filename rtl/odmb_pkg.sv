// odmb_pkg: types and constants shared by the ODMB slow-control firmware.
//
// Every VME command reaches the devices as a vme_cmd_t: a one-cycle valid
// strobe, the direction, the 16-bit VME address and the 16-bit write data.
// The address follows the manual's command notation: bits [15:12] select the
// device (1..9, or the discrete-logic address 0xFFFC), bits [11:0] the
// command inside the device. A device answers with a vme_rsp_t: ack is high
// for one cycle when the command is complete and carries the read data.
// The command/acknowledge handshake is this design's own choice; the manual
// gives only the addresses and what each command does.
package odmb_pkg;

  typedef struct packed {
    logic        valid;   // one-cycle command strobe
    logic        we;      // 1: write (W), 0: read (R)
    logic [15:0] addr;    // VME address, e.g. 16'h3010
    logic [15:0] data;    // write data
  } vme_cmd_t;

  typedef struct packed {
    logic        ack;     // command complete (DTACK)
    logic [15:0] data;    // read data, valid with ack
  } vme_rsp_t;

  localparam vme_rsp_t RSP_NONE = '{ack: 1'b0, data: 16'h0000};

  // Firmware tag V01-05 -> version XYZK = 0105, USERCODE XYZKdbdb.
  localparam logic [15:0] FW_VERSION  = 16'h0105;
  localparam logic [31:0] FW_USERCODE = {FW_VERSION, 16'hDBDB};

  // Address of the board's discrete "emergency" JTAG logic.
  localparam logic [15:0] EMERGENCY_ADDR = 16'hFFFC;

  localparam int unsigned NDCFEB = 7;   // DCFEBs on an ME1/1 ODMB

  // Operations of the JTAG master (jtag_engine).
  typedef enum logic [1:0] {JOP_DR = 2'd0, JOP_IR = 2'd1, JOP_RESET = 2'd2} jtag_op_e;

  // ODMB_CTRL register (W/R 3000).
  typedef struct packed {
    logic       spare15;
    logic       ped_otmb;        // 14: OTMB data requested for each L1A
    logic       ped_dcfeb;       // 13: L1A_MATCH sent to DCFEBs for each L1A
    logic       kill_l1a_match;  // 12
    logic       kill_l1a;        // 11
    logic       dummy_lvmb;      // 10: 1 -> dummy LVMB
    logic       int_trig;        //  9: 1 -> internally generated L1A/LCTs
    logic       fw_reset;        //  8: auto-reset, resets registers/FIFOs
    logic       dummy_data;      //  7: 1 -> dummy DCFEB data
    logic       spare6;
    logic       cal_trgsel;      //  5
    logic       cal_mode;        //  4
    logic [3:0] cal_trgen;       //  3:0
  } odmb_ctrl_t;

  // DCFEB_CTRL register (W/R 3010); every bit is auto-reset.
  typedef struct packed {
    logic opt_reset;     // 7: reset optical transceivers
    logic ext_trig_req;  // 6: external trigger request to OTMB
    logic lct_req;       // 5: LCT request to OTMB
    logic test_l1a;      // 4: test L1A and L1A_MATCH to all DCFEBs
    logic extpls;        // 3: EXTPLS to DCFEBs
    logic injpls;        // 2: INJPLS to DCFEBs
    logic resync;        // 1: resynchronise L1A_COUNTER
    logic reprogram;     // 0: reprogram the DCFEBs
  } dcfeb_ctrl_t;

  // Configuration registers of device 4.
  typedef struct packed {
    logic [5:0]  lct_l1a_dly;  // 4000: total delay 2400 + 25*LCT_L1A_DLY ns
    logic [4:0]  otmb_dly;     // 4004
    logic [4:0]  push_dly;     // 4008
    logic [4:0]  alct_dly;     // 400C
    logic [4:0]  inj_dly;      // 4010: 12.5 ns steps
    logic [4:0]  ext_dly;      // 4014: 12.5 ns steps
    logic [3:0]  callct_dly;   // 4018: 25 ns steps
    logic [9:1]  kill;         // 401C: ALCT(9), TMB(8), DCFEB 7..1
    logic [6:0]  crateid;      // 4020
    logic [15:0] nwords_dummy; // 4028: words made by dummy DCFEB/OTMB/ALCT
  } config_t;

endpackage
