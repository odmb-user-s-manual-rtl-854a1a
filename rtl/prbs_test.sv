// prbs_test: VME device 9 system test of one optical link (DDU or PC).
//
//   W 9S00 N  send N PRBS 2^7-1 sequences on the link and check what comes
//             back (S = SUB: 0 for the DDU link, 1 for the PC link)
//   R 9S0C    number of errors found during the last test
// One sequence is 127 16-bit words (16 full periods of the 127-bit pattern;
// see prbs7). The transmitter sends one word per clk cycle with tx_valid
// while the test runs; otherwise the link's normal data go out (the top
// multiplexes on tx_valid). The checker locks onto the first word received
// after the start: it takes its state from that word's last seven bits and
// compares every following word with its own prediction, counting each word
// that differs (the error counter saturates at FFFF). The test ends when
// N*127 words have been received, or TIMEOUT cycles after the last word was
// sent. Sequence length, word width, error unit and lock method are this
// design's choices; the manual gives only the pattern and the commands.
// The start write is acknowledged at once; busy shows the test running.
module prbs_test
  import odmb_pkg::*;
#(
  parameter logic [3:0]  SUB     = 4'h0,
  parameter int unsigned TIMEOUT = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  vme_cmd_t    cmd,
  output vme_rsp_t    rsp,
  output logic        tx_valid,
  output logic [15:0] tx_data,
  input  logic        rx_valid,
  input  logic [15:0] rx_data,
  output logic        busy
);
  logic hit;
  logic [6:0]  tx_state, tx_next, rx_state, rx_next;
  logic [15:0] tx_word, rx_word;
  logic [31:0] tx_left, rx_left;
  logic        locked;
  logic [15:0] errors;
  logic [$clog2(TIMEOUT+1)-1:0] idle;

  assign hit = cmd.valid && (cmd.addr[15:12] == 4'h9) && (cmd.addr[11:8] == SUB);

  prbs7 u_tx (.state(tx_state), .word(tx_word), .next_state(tx_next));
  prbs7 u_rx (.state(rx_state), .word(rx_word), .next_state(rx_next));

  assign tx_valid = busy && (tx_left != 0);
  assign tx_data  = tx_word;

  always_ff @(posedge clk) begin
    rsp <= RSP_NONE;
    if (rst) begin
      busy <= 1'b0; tx_state <= 7'h7F; rx_state <= 7'h7F; tx_left <= '0; rx_left <= '0;
      locked <= 1'b0; errors <= '0; idle <= '0;
    end else begin
      if (hit) begin
        rsp.ack <= 1'b1;
        if (cmd.we && cmd.addr[7:0] == 8'h00 && !busy) begin
          busy     <= (cmd.data != 16'h0);
          tx_left  <= 32'(cmd.data) * 32'd127;
          rx_left  <= 32'(cmd.data) * 32'd127;
          tx_state <= 7'h7F;
          locked   <= 1'b0;
          errors   <= '0;
          idle     <= '0;
        end
        if (!cmd.we && cmd.addr[7:0] == 8'h0C) rsp.data <= errors;
      end
      if (busy) begin
        if (tx_left != 0) begin
          tx_left  <= tx_left - 32'd1;
          tx_state <= tx_next;
        end
        if (rx_valid && rx_left != 0) begin
          rx_left <= rx_left - 32'd1;
          if (!locked) begin
            locked   <= 1'b1;
            rx_state <= rx_data[15:9];
          end else begin
            rx_state <= rx_next;
            if (rx_data != rx_word && errors != 16'hFFFF) errors <= errors + 16'd1;
          end
        end
        if (tx_left == 0) idle <= idle + 1'b1;
        if ((rx_valid && rx_left == 32'd1) || rx_left == 0 ||
            idle == $bits(idle)'(TIMEOUT - 1)) busy <= 1'b0;
      end
    end
  end

endmodule
