// lct_l1a_match: pairs each L1A with the LCTs that caused it.
//
// A DCFEB that saw a muon raises its raw LCT; the matching L1A comes back
// from the trigger system a fixed latency later. The configuration register
// LCT_L1A_DLY (W 4000) sets that latency as 2400 ns + 25 ns x LCT_L1A_DLY,
// i.e. BASE_BX + LCT_L1A_DLY bunch crossings of the 40 MHz clk with the
// default BASE_BX = 96. The block keeps a MAX_BX-deep history of every raw
// LCT line; when an L1A arrives (l1a_src, the selected L1A source before
// any kill) it raises match[i] in the same cycle for each DCFEB i whose LCT
// was high exactly BASE_BX + lct_l1a_dly cycles earlier. The delay formula
// is the manual's; the exact one-BX coincidence (no window) and the use of
// the raw LCT lines are this design's choices. match is combinational from
// l1a_src and registered history; trigger_ctrl registers it with the L1A.
module lct_l1a_match #(
  parameter int unsigned N       = 7,
  parameter int unsigned BASE_BX = 96,          // 2400 ns / 25 ns
  localparam int unsigned MAX_BX = BASE_BX + 63 // largest total delay
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N:1]   lct,
  input  logic [5:0]   lct_l1a_dly,
  input  logic         l1a_src,
  output logic [N:1]   match
);
  // hist[i][k] holds lct[i] from k+1 cycles ago
  logic [MAX_BX-1:0] hist [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) hist[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) hist[i] <= {hist[i][MAX_BX-2:0], lct[i+1]};
    end
  end

  always_comb begin
    for (int i = 1; i <= N; i++)
      match[i] = l1a_src & hist[i-1][BASE_BX - 1 + int'(lct_l1a_dly)];
  end

  initial assert (BASE_BX >= 1) else $error("BASE_BX must be at least 1");

endmodule
