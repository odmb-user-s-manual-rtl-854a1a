// emergency_jtag: the board's discrete "emergency" JTAG access at VME address
// 0xFFFC, written here as logic so that it can be simulated with the rest.
//
// A write to 0xFFFC sets TMS from data bit 0 and TDI from data bit 1 and then
// gives the FPGA's JTAG port one TCK pulse, so each write moves the TAP by one
// state (and shifts one bit in a Shift state). A read of 0xFFFC returns the
// current TDO in bit 0 without clocking. Walking a TAP this way is what the
// manual describes; the TCK pulse width (TCK_HALF clk cycles low, then high)
// and the acknowledge at the end of the pulse are this design's choices.
module emergency_jtag
  import odmb_pkg::*;
#(
  parameter int unsigned TCK_HALF = 2
) (
  input  logic     clk,
  input  logic     rst,
  input  vme_cmd_t cmd,
  output vme_rsp_t rsp,
  output logic     tck,
  output logic     tms,
  output logic     tdi,
  input  logic     tdo
);
  typedef enum logic [1:0] {E_IDLE, E_LOW, E_HIGH} estate_e;
  estate_e state;
  logic [$clog2(TCK_HALF+1)-1:0] cnt;
  logic hit;

  assign hit = cmd.valid && (cmd.addr == EMERGENCY_ADDR);

  always_ff @(posedge clk) begin
    rsp <= RSP_NONE;
    if (rst) begin
      state <= E_IDLE; cnt <= '0; tck <= 1'b0; tms <= 1'b0; tdi <= 1'b0;
    end else begin
      unique case (state)
        E_IDLE: if (hit) begin
          if (cmd.we) begin
            tms <= cmd.data[0];
            tdi <= cmd.data[1];
            cnt <= '0;
            state <= E_LOW;
          end else begin
            rsp.ack  <= 1'b1;
            rsp.data <= {15'h0000, tdo};
          end
        end
        E_LOW: if (cnt == $bits(cnt)'(TCK_HALF - 1)) begin
          cnt <= '0; tck <= 1'b1; state <= E_HIGH;
        end else cnt <= cnt + 1'b1;
        E_HIGH: if (cnt == $bits(cnt)'(TCK_HALF - 1)) begin
          cnt <= '0; tck <= 1'b0; state <= E_IDLE; rsp.ack <= 1'b1;
        end else cnt <= cnt + 1'b1;
        default: state <= E_IDLE;
      endcase
    end
  end

endmodule
