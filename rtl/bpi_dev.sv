// bpi_dev: VME device 6, front end of the BPI (parallel flash PROM) interface.
//
//   W 6020  reset the BPI state machines: empties both FIFOs, clears the
//           timer, disables parsing
//   W 6024  disable parsing of the command FIFO (so it can be filled)
//   W 6028  enable parsing
//   W 602C  write one word into the command FIFO
//   R 6030  read one word of the read-back FIFO (0 if empty)
//   R 6034  number of words in the read-back FIFO
//   R 6038  status register
//   R 603C / R 6040  timer bits [15:0] / [31:16]
// While parsing is enabled, the oldest command word is handed to the flash
// engine (bpi_cmd_valid/bpi_cmd, taken when bpi_cmd_ready is high); words the
// engine reads from the flash come back through bpi_rb_valid/bpi_rb_data into
// the read-back FIFO. The flash engine itself (the command language and the
// flash bus timing) is not part of this block.
// Status register (this design's layout): [0] parsing enabled, [1] command
// FIFO empty, [2] command FIFO full, [3] read-back FIFO empty, [4] read-back
// FIFO full, [5] engine busy, [15:8] engine status. The timer counts clk
// cycles while parsing is enabled and there is work (command FIFO not empty
// or engine busy), so it measures how long a programming sequence took.
// FIFO depths are parameters; the manual gives none.
module bpi_dev
  import odmb_pkg::*;
#(
  parameter int unsigned CMD_DEPTH = 1024,
  parameter int unsigned RB_DEPTH  = 1024,
  localparam int unsigned RBW = $clog2(RB_DEPTH) + 1
) (
  input  logic        clk,
  input  logic        rst,
  input  vme_cmd_t    cmd,
  output vme_rsp_t    rsp,
  output logic        bpi_cmd_valid,
  output logic [15:0] bpi_cmd,
  input  logic        bpi_cmd_ready,
  input  logic        bpi_rb_valid,
  input  logic [15:0] bpi_rb_data,
  input  logic        bpi_busy,
  input  logic [7:0]  bpi_status,
  output logic        bpi_rst
);
  logic hit, parse_en;
  logic cmd_wr, cmd_rd, cmd_empty, cmd_full, rb_rd, rb_empty, rb_full;
  logic [15:0] rb_dout;
  logic [RBW-1:0] rb_count;
  logic [$clog2(CMD_DEPTH):0] cmd_count;
  logic [31:0] timer;

  assign hit     = cmd.valid && (cmd.addr[15:12] == 4'h6);
  assign bpi_rst = rst || (hit && cmd.we && cmd.addr[11:0] == 12'h020);
  assign cmd_wr  = hit && cmd.we && cmd.addr[11:0] == 12'h02C;
  assign rb_rd   = hit && !cmd.we && cmd.addr[11:0] == 12'h030;
  assign bpi_cmd_valid = parse_en && !cmd_empty;
  assign cmd_rd  = bpi_cmd_valid && bpi_cmd_ready;

  test_fifo #(.WIDTH(16), .DEPTH(CMD_DEPTH)) u_cmd (
    .clk, .rst(bpi_rst), .clr(1'b0), .wr_en(cmd_wr), .din(cmd.data), .rd_en(cmd_rd),
    .dout(bpi_cmd), .count(cmd_count), .empty(cmd_empty), .full(cmd_full));
  test_fifo #(.WIDTH(16), .DEPTH(RB_DEPTH)) u_rb (
    .clk, .rst(bpi_rst), .clr(1'b0), .wr_en(bpi_rb_valid), .din(bpi_rb_data), .rd_en(rb_rd),
    .dout(rb_dout), .count(rb_count), .empty(rb_empty), .full(rb_full));

  always_ff @(posedge clk) begin
    rsp <= RSP_NONE;
    if (bpi_rst) begin
      parse_en <= 1'b0;
      timer    <= '0;
    end else if (parse_en && (!cmd_empty || bpi_busy)) begin
      timer <= timer + 32'd1;
    end
    if (hit) begin
      rsp.ack <= 1'b1;
      if (cmd.we) begin
        if (!bpi_rst && cmd.addr[11:0] == 12'h024) parse_en <= 1'b0;
        if (!bpi_rst && cmd.addr[11:0] == 12'h028) parse_en <= 1'b1;
      end else begin
        unique case (cmd.addr[11:0])
          12'h030: rsp.data <= rb_empty ? 16'h0000 : rb_dout;
          12'h034: rsp.data <= 16'(rb_count);
          12'h038: rsp.data <= {bpi_status, 2'b00, bpi_busy, rb_full, rb_empty,
                                cmd_full, cmd_empty, parse_en};
          12'h03C: rsp.data <= timer[15:0];
          12'h040: rsp.data <= timer[31:16];
          default: rsp.data <= 16'h0000;
        endcase
      end
    end
  end

endmodule
