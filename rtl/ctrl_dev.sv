// ctrl_dev: VME device 3, ODMB/DCFEB control.
//
//   W/R 3000  ODMB_CTRL (odmb_ctrl_t); bit 8 is auto-reset: writing it gives
//             a one-cycle fw_reset pulse and it reads back as 0
//   W/R 3010  DCFEB_CTRL (dcfeb_ctrl_t); all 8 bits are auto-reset: a write
//             gives one-cycle pulses on dcfeb_pulse and the register reads 0
//   W/R 3020  TP_SEL, selects the signals on test points TP27/28/41/42
//   W/R 3100  LOOPBACK of the optical transceivers (0: none, 1 or 2: internal)
//   W/R 3110  DIFFCTRL, TX swing, 0 (about 100 mV) .. F (about 1100 mV)
//   R   3120  DONE bits of the seven DCFEBs
//   R   3YZC  ODMB_DATA entry YZ, taken from odmb_counters through data_sel
// Register addresses and meanings follow the manual. Register widths not
// given there (TP_SEL 16 bits, LOOPBACK 3 bits), reset values (all 0) and
// the one-cycle pulse width of auto-reset bits are this design's choices.
// Every command is acknowledged one cycle after it arrives; unknown
// addresses read 0.
module ctrl_dev
  import odmb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  vme_cmd_t    cmd,
  output vme_rsp_t    rsp,
  output odmb_ctrl_t  odmb_ctrl,
  output logic        fw_reset,
  output dcfeb_ctrl_t dcfeb_pulse,
  output logic [15:0] tp_sel,
  output logic [2:0]  loopback,
  output logic [3:0]  diffctrl,
  input  logic [7:1]  dcfeb_done,
  output logic [7:0]  data_sel,
  input  logic [15:0] data_val
);
  logic hit;
  assign hit      = cmd.valid && (cmd.addr[15:12] == 4'h3);
  assign data_sel = cmd.addr[11:4];

  always_ff @(posedge clk) begin
    rsp         <= RSP_NONE;
    fw_reset    <= 1'b0;
    dcfeb_pulse <= '0;
    if (rst) begin
      odmb_ctrl <= '0; tp_sel <= '0; loopback <= '0; diffctrl <= '0;
    end else if (hit) begin
      rsp.ack <= 1'b1;
      if (cmd.we) begin
        unique case (cmd.addr[11:0])
          12'h000: begin
            odmb_ctrl          <= odmb_ctrl_t'(cmd.data);
            odmb_ctrl.fw_reset <= 1'b0;
            fw_reset           <= cmd.data[8];
          end
          12'h010: dcfeb_pulse <= dcfeb_ctrl_t'(cmd.data[7:0]);
          12'h020: tp_sel      <= cmd.data;
          12'h100: loopback    <= cmd.data[2:0];
          12'h110: diffctrl    <= cmd.data[3:0];
          default: ;
        endcase
      end else begin
        if (cmd.addr[3:0] == 4'hC)
          rsp.data <= data_val;
        else
          unique case (cmd.addr[11:0])
            12'h000: rsp.data <= odmb_ctrl;
            12'h010: rsp.data <= 16'h0000;
            12'h020: rsp.data <= tp_sel;
            12'h100: rsp.data <= {13'h0, loopback};
            12'h110: rsp.data <= {12'h0, diffctrl};
            12'h120: rsp.data <= {9'h0, dcfeb_done};
            default: rsp.data <= 16'h0000;
          endcase
      end
    end
  end

endmodule
