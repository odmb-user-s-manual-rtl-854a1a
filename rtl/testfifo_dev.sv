// testfifo_dev: VME device 5, the test FIFOs.
//
// Thirteen test_fifo instances of DEPTH x 18 bits, indexed as in the manual:
// 0..6 the DCFEB 1..7 FIFOs, then FIFO Z = 1..6 at index 6+Z: PC TX, PC RX,
// DDU TX, DDU RX, OTMB, ALCT. The data path writes them through wr_en/din
// (one write port per FIFO, in parallel with its normal destination); VME
// reads them:
//   R 5000 / R 500C   one word / word count of the selected DCFEB FIFO
//   W/R 5010          DCFEB FIFO select, DCFEB number 1..7
//   W 5020            reset DCFEB FIFOs, one bit per FIFO (bit 0 = DCFEB 1)
//   R 5Z00 / R 5Z0C   one word / word count of FIFO Z
//   W 5Z20            reset FIFO Z
// A word read returns bits [15:0] of the 18-bit word; reading an empty FIFO
// returns 0 and removes nothing. These encodings (select by number, low 16
// bits returned) are this design's choices where the manual does not say.
// Commands are acknowledged one cycle after they arrive.
module testfifo_dev
  import odmb_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned NF = 13,
  localparam int unsigned CW = $clog2(DEPTH) + 1
) (
  input  logic           clk,
  input  logic           rst,
  input  vme_cmd_t       cmd,
  output vme_rsp_t       rsp,
  input  logic [NF-1:0]  wr_en,
  input  logic [17:0]    din   [NF],
  output logic [CW-1:0]  count [NF],
  output logic [NF-1:0]  full,
  output logic [2:0]     dcfeb_sel
);
  logic [NF-1:0] rd_en, clr, empty;
  logic [17:0]   dout [NF];
  logic          hit;
  logic [3:0]    z;
  logic [3:0]    idx;     // FIFO addressed by the command
  logic          idx_ok;

  assign hit = cmd.valid && (cmd.addr[15:12] == 4'h5);
  assign z   = cmd.addr[11:8];

  always_comb begin
    if (z == 4'h0) begin
      idx    = {1'b0, dcfeb_sel} - 4'd1;
      idx_ok = (dcfeb_sel != 3'd0);
    end else begin
      idx    = z + 4'd6;
      idx_ok = (z <= 4'd6);
    end
  end

  always_comb begin
    rd_en = '0;
    clr   = '0;
    if (hit && cmd.we && cmd.addr[7:0] == 8'h20) begin
      if (z == 4'h0)      clr = {6'h00, cmd.data[6:0]};
      else if (idx_ok)    clr[idx] = 1'b1;
    end
    if (hit && !cmd.we && cmd.addr[7:0] == 8'h00 && idx_ok) rd_en[idx] = 1'b1;
  end

  for (genvar i = 0; i < NF; i++) begin : g_fifo
    test_fifo #(.WIDTH(18), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst, .clr(clr[i]), .wr_en(wr_en[i]), .din(din[i]), .rd_en(rd_en[i]),
      .dout(dout[i]), .count(count[i]), .empty(empty[i]), .full(full[i]));
  end

  always_ff @(posedge clk) begin
    rsp <= RSP_NONE;
    if (rst) begin
      dcfeb_sel <= 3'd1;
    end else if (hit) begin
      rsp.ack <= 1'b1;
      if (cmd.we) begin
        if (cmd.addr[11:0] == 12'h010) dcfeb_sel <= cmd.data[2:0];
      end else begin
        unique case (cmd.addr[7:0])
          8'h00:   rsp.data <= (idx_ok && !empty[idx]) ? dout[idx][15:0] : 16'h0000;
          8'h0C:   rsp.data <= idx_ok ? 16'(count[idx]) : 16'h0000;
          8'h10:   rsp.data <= (z == 4'h0) ? {13'h0, dcfeb_sel} : 16'h0000;
          default: rsp.data <= 16'h0000;
        endcase
      end
    end
  end

endmodule
