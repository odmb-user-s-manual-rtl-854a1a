// sysmon_dev: VME device 7, ODMB monitoring through the FPGA's internal ADC.
//
// The FPGA's system-monitor ADC delivers a 12-bit result per channel on
// adc_data together with adc_valid and the channel number adc_chan (0 = FPGA
// temperature, 1..8 = the external inputs LV_P3V3, P5V, THERM2, P3V3_PP,
// P2V5, THERM1, P1V0, P5V_LVMB). This block keeps the latest result of each
// channel and returns it right-aligned:
//   R 7000 -> channel 0;  R 71Z0 (Z = 0..7) -> channel Z+1
// Conversions to physical units are done by software (for example
// T_FPGA = R*503.975/4096 - 273.15 degC, V = R/2048 * V_nominal). The channel
// order is the manual's address order; storing the last result per channel
// and the adc_* interface are this design's choices. Results reset to 0.
// Commands are acknowledged one cycle after they arrive.
module sysmon_dev
  import odmb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  vme_cmd_t    cmd,
  output vme_rsp_t    rsp,
  input  logic        adc_valid,
  input  logic [3:0]  adc_chan,
  input  logic [11:0] adc_data
);
  logic [11:0] res [9];
  logic hit;
  logic [3:0] ch;
  logic ch_ok;

  assign hit = cmd.valid && (cmd.addr[15:12] == 4'h7);

  always_comb begin
    ch_ok = 1'b0;
    ch    = 4'd0;
    if (cmd.addr[11:0] == 12'h000) begin
      ch_ok = 1'b1;
    end else if (cmd.addr[11:8] == 4'h1 && cmd.addr[3:0] == 4'h0 && cmd.addr[7:4] <= 4'h7) begin
      ch_ok = 1'b1;
      ch    = cmd.addr[7:4] + 4'd1;
    end
  end

  always_ff @(posedge clk) begin
    rsp <= RSP_NONE;
    if (rst) begin
      for (int i = 0; i < 9; i++) res[i] <= '0;
    end else if (adc_valid && adc_chan <= 4'd8) begin
      res[adc_chan] <= adc_data;
    end
    if (hit) begin
      rsp.ack  <= 1'b1;
      rsp.data <= (!cmd.we && ch_ok) ? {4'h0, res[ch]} : 16'h0000;
    end
  end

endmodule
