// calib_pulse: calibration pulses INJPLS and EXTPLS for the DCFEBs.
//
// A request (DCFEB_CTRL[2] for INJPLS, DCFEB_CTRL[3] for EXTPLS; one cycle
// of the 40 MHz clk) is seen on the rising edge in the 80 MHz clk80 domain
// and the pulse leaves INJ_DLY (EXT_DLY) clk80 cycles later, that is
// 12.5 ns x INJ_DLY, as the manual gives. Each pulse lasts PULSE_LEN clk80
// cycles. In calibration mode (cal_mode, ODMB_CTRL[4]) every calibration
// pulse is followed, CALLCT_DLY x 25 ns later, by a one-BX calibration LCT
// request cal_lct; this pairing of CALLCT_DLY with the pulses is this
// design's reading of the register's name. clk80 must be phase-locked to
// clk (derived from the same source), so the requests need no synchroniser.
// A request arriving while the previous one is still counting restarts it.
module calib_pulse #(
  parameter int unsigned PULSE_LEN = 2
) (
  input  logic       clk80,
  input  logic       rst,
  input  logic       inj_req,
  input  logic       ext_req,
  input  logic [4:0] inj_dly,
  input  logic [4:0] ext_dly,
  input  logic [3:0] callct_dly,
  input  logic       cal_mode,
  output logic       injpls,
  output logic       extpls,
  output logic       cal_lct
);
  logic inj_q, ext_q;
  logic [5:0] inj_cnt, ext_cnt;    // remaining cycles + 1, 0 = idle
  logic [5:0] inj_w, ext_w, lct_w;
  logic [4:0] lct_cnt;
  logic inj_fire, ext_fire;

  assign inj_fire = (inj_cnt == 6'd1);
  assign ext_fire = (ext_cnt == 6'd1);

  always_ff @(posedge clk80) begin
    if (rst) begin
      inj_q <= 1'b0; ext_q <= 1'b0; inj_cnt <= '0; ext_cnt <= '0; lct_cnt <= '0;
      inj_w <= '0; ext_w <= '0; lct_w <= '0;
    end else begin
      inj_q <= inj_req;
      ext_q <= ext_req;
      // Delay counters: loaded with DLY+1 so that a delay of 0 fires next cycle.
      if (inj_req && !inj_q)   inj_cnt <= {1'b0, inj_dly} + 6'd1;
      else if (inj_cnt != '0)  inj_cnt <= inj_cnt - 6'd1;
      if (ext_req && !ext_q)   ext_cnt <= {1'b0, ext_dly} + 6'd1;
      else if (ext_cnt != '0)  ext_cnt <= ext_cnt - 6'd1;
      // Pulse width counters.
      if (inj_fire)            inj_w <= 6'(PULSE_LEN);
      else if (inj_w != '0)    inj_w <= inj_w - 6'd1;
      if (ext_fire)            ext_w <= 6'(PULSE_LEN);
      else if (ext_w != '0)    ext_w <= ext_w - 6'd1;
      // Calibration LCT, CALLCT_DLY bunch crossings (2 clk80 cycles each) later.
      if ((inj_fire || ext_fire) && cal_mode) lct_cnt <= {callct_dly, 1'b0} + 5'd1;
      else if (lct_cnt != '0)  lct_cnt <= lct_cnt - 5'd1;
      if (lct_cnt == 5'd1)     lct_w <= 6'd2;
      else if (lct_w != '0)    lct_w <= lct_w - 6'd1;
    end
  end

  assign injpls  = (inj_w != '0);
  assign extpls  = (ext_w != '0);
  assign cal_lct = (lct_w != '0);

endmodule
