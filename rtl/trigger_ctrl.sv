// trigger_ctrl: L1A and L1A_MATCH distribution and the L1A_COUNTER.
//
// Source: the CCB's L1A, or the internally generated one when
// ODMB_CTRL[9] (int_trig) is set. The outgoing L1A is that source unless
// ODMB_CTRL[11] kills it; a test L1A (DCFEB_CTRL[4]) or the PB1 button adds
// one regardless. L1A_MATCH per source i (1..7 DCFEB, 8 OTMB, 9 ALCT) comes
// from the match inputs of the data path, or in pedestal mode from every
// L1A: ODMB_CTRL[13] for the DCFEBs, ODMB_CTRL[14] for the OTMB data
// request. ODMB_CTRL[12] kills all matches, and KILL[i] (device 4) kills
// source i. A test L1A or PB1 also sends L1A_MATCH to all seven DCFEBs.
// L1A_COUNTER counts every L1A sent and is cleared by DCFEB_CTRL[1], which
// is also passed on to the DCFEBs as l1a_resync so that their counters
// restart together. The mode bits and their meanings are the manual's;
// applying KILL to test L1As (it does not) and the one-cycle registered
// timing are this design's choices. All outputs are registered.
module trigger_ctrl
  import odmb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  odmb_ctrl_t  odmb_ctrl,
  input  logic [9:1]  kill,
  input  logic        ccb_l1a,
  input  logic        int_l1a,
  input  logic [9:1]  match_in,
  input  logic        test_l1a,
  input  logic        pb1,
  input  logic        resync,
  output logic        l1a,
  output logic [9:1]  l1a_match,
  output logic        l1a_resync,
  output logic [23:0] l1a_counter
);
  logic src, test, l1a_d;
  logic [9:1] m;

  always_comb begin
    src  = odmb_ctrl.int_trig ? int_l1a : ccb_l1a;
    test = test_l1a | pb1;
    l1a_d = (src & ~odmb_ctrl.kill_l1a) | test;
    m = match_in;
    if (odmb_ctrl.ped_dcfeb) m[7:1] = {7{src}};
    if (odmb_ctrl.ped_otmb)  m[8]   = src;
    m = odmb_ctrl.kill_l1a_match ? 9'h000 : (m & ~kill);
    m[7:1] = m[7:1] | {7{test}};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      l1a <= 1'b0; l1a_match <= '0; l1a_resync <= 1'b0; l1a_counter <= '0;
    end else begin
      l1a        <= l1a_d;
      l1a_match  <= m;
      l1a_resync <= resync;
      if (resync)     l1a_counter <= '0;
      else if (l1a_d) l1a_counter <= l1a_counter + 24'd1;
    end
  end

endmodule
