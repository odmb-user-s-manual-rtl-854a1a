// jtag_engine: JTAG master that runs one VME-requested JTAG operation.
//
// Operations (op):
//   JOP_DR    shift NBITS (1..16) data bits, optionally preceded by the TMS
//             header Run-Test/Idle -> Select-DR -> Capture-DR -> Shift-DR
//             (TMS 1,0,0) and optionally ended by the TMS tailer: last bit with
//             TMS=1 (Exit1-DR), then Update-DR, Run-Test/Idle (TMS 1,0).
//             Without a tailer the TAP stays in Shift-DR, so a long register
//             is read in 16-bit pieces (header-only, then tailer-only).
//   JOP_IR    shift NBITS instruction bits, always with header TMS 1,1,0,0
//             (to Shift-IR) and tailer (last bit TMS=1, then 1,0).
//   JOP_RESET five TCK cycles with TMS=1 then one with TMS=0: Run-Test/Idle.
// Data goes out LSB first on TDI. TDO is sampled on every rising TCK edge of
// a shift bit and shifted into tdo_reg from the top, so after 16 bits
// tdo_reg[0] is the first bit read. These sequences are the ones the manual
// spells out for the discrete-logic access; their use by the firmware
// devices, the TDO register orientation and the TCK rate are this design's
// choices.
// Timing: TCK is low for TCK_HALF clk cycles, then high for TCK_HALF cycles
// per step. TMS/TDI change together with the falling TCK edge. busy is high
// from the cycle after start until done, a one-cycle pulse at the end.
module jtag_engine
  import odmb_pkg::*;
#(
  parameter int unsigned TCK_HALF = 2   // clk cycles per TCK half period
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,       // ignored while busy
  input  jtag_op_e    op,
  input  logic [4:0]  nbits,       // 1..16
  input  logic        header,
  input  logic        tailer,
  input  logic [15:0] tdi_data,
  output logic        busy,
  output logic        done,
  output logic [15:0] tdo_reg,
  output logic        tck,
  output logic        tms,
  output logic        tdi,
  input  logic        tdo
);
  jtag_op_e    op_q;
  logic [4:0]  nbits_q;
  logic        hdr_q, tlr_q;
  logic [15:0] data_q;
  logic [4:0]  k;          // step index
  logic [4:0]  hdr_len, tlr_len, seq_len;
  logic [$clog2(TCK_HALF+1)-1:0] cnt;
  logic        s_tms, s_tdi, s_shift;

  always_comb begin
    unique case (op_q)
      JOP_IR:    begin hdr_len = 5'd4; tlr_len = 5'd2; end
      JOP_RESET: begin hdr_len = 5'd6; tlr_len = 5'd0; end
      default:   begin hdr_len = hdr_q ? 5'd3 : 5'd0; tlr_len = tlr_q ? 5'd2 : 5'd0; end
    endcase
    seq_len = hdr_len + ((op_q == JOP_RESET) ? 5'd0 : nbits_q) + tlr_len;
  end

  // TMS/TDI of step k.
  always_comb begin
    logic [4:0] i, j;
    i = k - hdr_len;
    j = k - hdr_len - nbits_q;
    s_tms = 1'b0; s_tdi = 1'b0; s_shift = 1'b0;
    if (op_q == JOP_RESET) begin
      s_tms = (k < 5'd5);
    end else if (k < hdr_len) begin
      s_tms = (op_q == JOP_IR) ? (k < 5'd2) : (k == 5'd0);
    end else if (k < hdr_len + nbits_q) begin
      s_shift = 1'b1;
      s_tdi   = data_q[i[3:0]];
      s_tms   = (tlr_len != 5'd0) && (i == nbits_q - 5'd1);
    end else begin
      s_tms = (j == 5'd0);
    end
  end

  assign tms = busy & s_tms;
  assign tdi = busy & s_tdi;

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy <= 1'b0; tck <= 1'b0; k <= '0; cnt <= '0; tdo_reg <= '0;
      op_q <= JOP_RESET; nbits_q <= 5'd1; hdr_q <= 1'b0; tlr_q <= 1'b0; data_q <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1; k <= '0; cnt <= '0; tck <= 1'b0;
        op_q <= op; hdr_q <= header; tlr_q <= tailer; data_q <= tdi_data;
        nbits_q <= (nbits == 5'd0) ? 5'd1 : ((nbits > 5'd16) ? 5'd16 : nbits);
      end
    end else if (cnt == $bits(cnt)'(TCK_HALF - 1)) begin
      cnt <= '0;
      if (!tck) begin
        tck <= 1'b1;
        if (s_shift) tdo_reg <= {tdo, tdo_reg[15:1]};
      end else begin
        tck <= 1'b0;
        if (k == seq_len - 5'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          k <= k + 5'd1;
        end
      end
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  // A step never exceeds 4 + 16 + 2 TCK cycles.
  assert property (@(posedge clk) disable iff (rst) busy |-> (k < 5'd22));

endmodule
