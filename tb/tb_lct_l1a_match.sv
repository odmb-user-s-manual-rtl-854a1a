// tb_lct_l1a_match: random raw LCTs and L1As against a reference that keeps
// its own log of every LCT applied. For every cycle the expected match of
// DCFEB i is "L1A now and LCT i exactly 96 + LCT_L1A_DLY cycles ago"
// (2400 ns + 25 ns x LCT_L1A_DLY at 25 ns per cycle). LCT_L1A_DLY changes
// every 2000 cycles and includes both ends of its range (0 and 63). A
// directed part checks that an L1A one cycle early or late finds no match.
module tb_lct_l1a_match;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:1] lct = '0, match;
  logic [5:0] lct_l1a_dly = '0;
  logic l1a_src = 1'b0;
  logic [7:1] lct_log [int];
  int n_match = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  lct_l1a_match dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:1] logged(input int c);
    return lct_log.exists(c) ? lct_log[c] : 7'h00;
  endfunction

  task automatic cycle_check(input int cyc, input string what);
    logic [7:1] e;
    e = l1a_src ? logged(cyc - 96 - int'(lct_l1a_dly)) : 7'h00;
    checks++;
    if (match !== e) begin
      failures++;
      $display("FAIL: %s cycle %0d: match %b expected %b", what, cyc, match, e);
    end
    if (match != 0) n_match++;
  endtask

  initial begin
    int cyc;
    logic [5:0] dlys [5] = '{6'd0, 6'd63, 6'd17, 6'd1, 6'd40};
    repeat (3) @(posedge clk); rst <= 1'b0; @(posedge clk); #1;
    cyc = 0;
    // Random traffic: sparse LCTs, frequent L1As so that coincidences occur
    for (int p = 0; p < 5; p++) begin
      lct_l1a_dly = dlys[p];
      for (int k = 0; k < 2000; k++) begin
        lct = 7'($urandom) & 7'($urandom) & 7'($urandom);
        l1a_src = $urandom % 2 == 0;
        lct_log[cyc] = lct;
        #0 cycle_check(cyc, "random");
        @(posedge clk); #1; cyc++;
      end
    end
    checks++;
    if (n_match < 1000) begin failures++; $display("FAIL: only %0d matches seen", n_match); end

    // Directed: one LCT on DCFEB 4, L1A at the nominal delay and one off it
    lct = '0; l1a_src = 0; lct_l1a_dly = 6'd10;
    repeat (200) begin lct_log[cyc] = '0; @(posedge clk); #1; cyc++; end
    for (int off = -1; off <= 1; off++) begin
      int t0;
      lct = 7'b000_1000; lct_log[cyc] = lct; t0 = cyc;
      @(posedge clk); #1; cyc++;
      lct = '0;
      while (cyc < t0 + 106 + off) begin lct_log[cyc] = '0; @(posedge clk); #1; cyc++; end
      l1a_src = 1; lct_log[cyc] = '0;
      #0 cycle_check(cyc, "directed");
      checks++;
      if ((match[4] == 1'b1) != (off == 0)) begin
        failures++; $display("FAIL: L1A %0d cycles off the delay: match %b", off, match);
      end
      @(posedge clk); #1; cyc++; l1a_src = 0;
      repeat (200) begin lct_log[cyc] = '0; @(posedge clk); #1; cyc++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
