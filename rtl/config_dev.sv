// config_dev: VME device 4, configuration registers.
//
// Holds the delays, kill mask, crate ID and dummy-generator word count of
// config_t at the manual's addresses (W/R 4000 .. 4020, 4028) and returns
// the firmware version at R 4024. Each register keeps the width the manual
// gives and reads back right-aligned. The width of the dummy word count
// (16 bits) and the reset values are this design's choices; the reset values
// are parameters. Every command is acknowledged one cycle after it arrives.
module config_dev
  import odmb_pkg::*;
#(
  parameter config_t     RESET_CFG = '0,
  parameter logic [15:0] VERSION   = FW_VERSION
) (
  input  logic     clk,
  input  logic     rst,
  input  vme_cmd_t cmd,
  output vme_rsp_t rsp,
  output config_t  cfg
);
  logic hit;
  assign hit = cmd.valid && (cmd.addr[15:12] == 4'h4);

  always_ff @(posedge clk) begin
    rsp <= RSP_NONE;
    if (rst) begin
      cfg <= RESET_CFG;
    end else if (hit) begin
      rsp.ack <= 1'b1;
      if (cmd.we) begin
        unique case (cmd.addr[11:0])
          12'h000: cfg.lct_l1a_dly  <= cmd.data[5:0];
          12'h004: cfg.otmb_dly     <= cmd.data[4:0];
          12'h008: cfg.push_dly     <= cmd.data[4:0];
          12'h00C: cfg.alct_dly     <= cmd.data[4:0];
          12'h010: cfg.inj_dly      <= cmd.data[4:0];
          12'h014: cfg.ext_dly      <= cmd.data[4:0];
          12'h018: cfg.callct_dly   <= cmd.data[3:0];
          12'h01C: cfg.kill         <= cmd.data[9:1];
          12'h020: cfg.crateid      <= cmd.data[6:0];
          12'h028: cfg.nwords_dummy <= cmd.data;
          default: ;
        endcase
      end else begin
        unique case (cmd.addr[11:0])
          12'h000: rsp.data <= 16'(cfg.lct_l1a_dly);
          12'h004: rsp.data <= 16'(cfg.otmb_dly);
          12'h008: rsp.data <= 16'(cfg.push_dly);
          12'h00C: rsp.data <= 16'(cfg.alct_dly);
          12'h010: rsp.data <= 16'(cfg.inj_dly);
          12'h014: rsp.data <= 16'(cfg.ext_dly);
          12'h018: rsp.data <= 16'(cfg.callct_dly);
          12'h01C: rsp.data <= {6'h00, cfg.kill, 1'b0};
          12'h020: rsp.data <= 16'(cfg.crateid);
          12'h024: rsp.data <= VERSION;
          12'h028: rsp.data <= cfg.nwords_dummy;
          default: rsp.data <= 16'h0000;
        endcase
      end
    end
  end

endmodule
