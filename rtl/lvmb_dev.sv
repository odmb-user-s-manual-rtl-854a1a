// lvmb_dev: VME device 8, low-voltage monitoring board (LVMB) control.
//
//   W 8000  send a control byte to the selected ADC
//   R 8004  read the last result of the ADC
//   W 8010  select the DCFEBs/ALCT to power on (bit 7 ALCT, bits 6:0 DCFEB 7..1)
//   R 8018  read which DCFEBs/ALCT are powered on
//   W 8020  select the ADC to talk to, 0..6
//   R 8024  read the ADC selection
// The ADCs sit on a serial bus: lvmb_ce[n] (active low) selects ADC n,
// lvmb_sclk clocks, lvmb_sdin carries data to the ADC and lvmb_sdout from
// it. A control-byte write lowers the selected chip enable, sends the byte
// MSB first (data changes while SCLK is low, the ADC samples on the rising
// edge), then gives RESULT_BITS more clocks sampling lvmb_sdout on each
// rising edge, MSB first, and raises the chip enable; the write is
// acknowledged at the end. The bit counts and the SCLK rate (SCLK_HALF clk
// cycles per half period) are this design's choices; the manual gives only
// the commands. R 8018 returns the LVMB's power-status inputs, or, in dummy
// LVMB mode (ODMB_CTRL[10]), the power-on register itself.
module lvmb_dev
  import odmb_pkg::*;
#(
  parameter int unsigned SCLK_HALF   = 8,
  parameter int unsigned RESULT_BITS = 16,
  parameter int unsigned NADC        = 7
) (
  input  logic            clk,
  input  logic            rst,
  input  vme_cmd_t        cmd,
  output vme_rsp_t        rsp,
  input  logic            dummy_lvmb,
  output logic [7:0]      lvmb_pon,
  input  logic [7:0]      lvmb_pon_status,
  output logic [NADC-1:0] lvmb_ce,
  output logic            lvmb_sclk,
  output logic            lvmb_sdin,
  input  logic            lvmb_sdout
);
  localparam int unsigned NB = 8 + RESULT_BITS;
  logic hit, busy;
  logic [2:0]  adc_sel;
  logic [7:0]  ctrl_q;
  logic [15:0] result;
  logic [$clog2(NB+1)-1:0] bitn;
  logic [$clog2(SCLK_HALF+1)-1:0] cnt;

  assign hit = cmd.valid && (cmd.addr[15:12] == 4'h8);
  assign lvmb_sdin = busy && (bitn < 8) && ctrl_q[7];

  always_ff @(posedge clk) begin
    rsp <= RSP_NONE;
    if (rst) begin
      busy <= 1'b0; adc_sel <= '0; lvmb_pon <= '0; ctrl_q <= '0; result <= '0;
      bitn <= '0; cnt <= '0; lvmb_sclk <= 1'b0; lvmb_ce <= '1;
    end else if (busy) begin
      if (cnt == $bits(cnt)'(SCLK_HALF - 1)) begin
        cnt <= '0;
        if (!lvmb_sclk) begin
          lvmb_sclk <= 1'b1;
          if (bitn >= 8) result <= {result[14:0], lvmb_sdout};
        end else begin
          lvmb_sclk <= 1'b0;
          if (bitn < 8) ctrl_q <= {ctrl_q[6:0], 1'b0};
          if (bitn == $bits(bitn)'(NB - 1)) begin
            busy    <= 1'b0;
            lvmb_ce <= '1;
            rsp.ack <= 1'b1;
          end else begin
            bitn <= bitn + 1'b1;
          end
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end else if (hit) begin
      if (cmd.we && cmd.addr[11:0] == 12'h000) begin
        busy   <= 1'b1;
        ctrl_q <= cmd.data[7:0];
        bitn   <= '0;
        cnt    <= '0;
        result <= '0;
        lvmb_ce <= ~(NADC'(1) << adc_sel);
      end else begin
        rsp.ack <= 1'b1;
        if (cmd.we) begin
          if (cmd.addr[11:0] == 12'h010) lvmb_pon <= cmd.data[7:0];
          if (cmd.addr[11:0] == 12'h020 && cmd.data[2:0] < 3'(NADC)) adc_sel <= cmd.data[2:0];
        end else begin
          unique case (cmd.addr[11:0])
            12'h004: rsp.data <= result;
            12'h018: rsp.data <= {8'h00, dummy_lvmb ? lvmb_pon : lvmb_pon_status};
            12'h024: rsp.data <= {13'h0, adc_sel};
            default: rsp.data <= 16'h0000;
          endcase
        end
      end
    end
  end

endmodule
