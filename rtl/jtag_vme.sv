// jtag_vme: VME device 1 (DCFEB JTAG) or device 2 (ODMB JTAG).
//
// Decodes the device's commands and hands them to a jtag_engine:
//   W dY00 / dY04 / dY08 / dY0C  shift Y+1 data bits; 04 adds the TMS header,
//                                08 the TMS tailer, 0C both
//   W dY1C                       shift Y+1 instruction bits
//   W d018                       reset the TAP to Run-Test/Idle (data ignored)
//   R d014                       read the TDO register (last 16 bits shifted)
//   W d020 / R d024              DCFEB select register, one bit per chain
//                                (only when NCHAIN > 1, i.e. device 1)
// With NCHAIN chains, TCK reaches only the selected chains; TMS and TDI are
// common and TDO is the OR of the selected chains' TDO, so one chain should
// be selected at a time. The select register resets to 0.
// Timing: a shift or reset write is acknowledged when the JTAG operation has
// ended (ack is held off like a late DTACK); reads and register writes are
// acknowledged the cycle after the command. Commands this device does not
// know are acknowledged with read data 0. A command arriving while the engine
// is busy is acknowledged and ignored (the host waits for ack anyway).
module jtag_vme
  import odmb_pkg::*;
#(
  parameter logic [3:0]  DEV      = 4'h1,
  parameter int unsigned NCHAIN   = 7,
  parameter int unsigned TCK_HALF = 2
) (
  input  logic              clk,
  input  logic              rst,
  input  vme_cmd_t          cmd,
  output vme_rsp_t          rsp,
  output logic [NCHAIN-1:0] jtag_tck,
  output logic              jtag_tms,
  output logic              jtag_tdi,
  input  logic [NCHAIN-1:0] jtag_tdo,
  output logic [NCHAIN-1:0] sel
);
  logic        hit, start, busy, done, tck, pending;
  jtag_op_e    op;
  logic [15:0] tdo_reg;
  logic [7:0]  sub;

  assign hit = cmd.valid && (cmd.addr[15:12] == DEV);
  assign sub = cmd.addr[7:0];

  always_comb begin
    start = 1'b0;
    op    = JOP_DR;
    if (hit && cmd.we && !busy && !pending) begin
      unique case (sub)
        8'h00, 8'h04, 8'h08, 8'h0C: begin start = 1'b1; op = JOP_DR; end
        8'h1C:                      begin start = 1'b1; op = JOP_IR; end
        8'h18:                      begin start = 1'b1; op = JOP_RESET; end
        default: ;
      endcase
    end
  end

  jtag_engine #(.TCK_HALF(TCK_HALF)) u_eng (
    .clk, .rst, .start, .op,
    .nbits    ({1'b0, cmd.addr[11:8]} + 5'd1),
    .header   (sub[2]),
    .tailer   (sub[3]),
    .tdi_data (cmd.data),
    .busy, .done, .tdo_reg,
    .tck, .tms(jtag_tms), .tdi(jtag_tdi),
    .tdo      (|(jtag_tdo & sel))
  );

  assign jtag_tck = {NCHAIN{tck}} & sel;

  always_ff @(posedge clk) begin
    rsp <= RSP_NONE;
    if (rst) begin
      sel     <= (NCHAIN == 1) ? NCHAIN'(1) : '0;
      pending <= 1'b0;
    end else begin
      if (done && pending) begin
        pending  <= 1'b0;
        rsp.ack  <= 1'b1;
      end
      if (hit) begin
        if (start) begin
          pending <= 1'b1;
        end else begin
          rsp.ack <= 1'b1;
          if (cmd.we) begin
            if (sub == 8'h20 && NCHAIN > 1) sel <= cmd.data[NCHAIN-1:0];
          end else begin
            unique case (sub)
              8'h14: rsp.data <= tdo_reg;
              8'h24: rsp.data <= 16'(sel);
              default: rsp.data <= 16'h0000;
            endcase
          end
        end
      end
    end
  end

endmodule
