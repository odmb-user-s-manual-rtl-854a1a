// test_fifo: single-clock FIFO used for the test, command and read-back FIFOs.
//
// DEPTH words of WIDTH bits (the test FIFOs are 2048 x 18 = 36 kb, the
// manual's "2,000 18-bit words"). dout shows the oldest word whenever the
// FIFO is not empty (first-word fall-through); rd_en removes it. A write
// when full and a read when empty are ignored. count is the number of words
// stored, 0..DEPTH. clr empties the FIFO in one cycle, like rst. A write and
// a read in the same cycle both take effect.
module test_fifo #(
  parameter int unsigned WIDTH = 18,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic [AW:0]      count,
  output logic             empty,
  output logic             full
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign dout  = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      wptr <= '0; rptr <= '0; count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  assert property (@(posedge clk) disable iff (rst) count <= (AW+1)'(DEPTH));

endmodule
