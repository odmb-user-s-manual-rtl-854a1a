// tb_sysmon_dev: feeds ADC results for channels 0..8 and checks that R 7000
// and R 7100..7170 return the latest result of the right channel, that
// later results replace earlier ones, and that other addresses read 0.
module tb_sysmon_dev;
  import odmb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  vme_cmd_t cmd = '0;
  vme_rsp_t rsp;
  logic adc_valid = 0;
  logic [3:0] adc_chan = 0;
  logic [11:0] adc_data = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  sysmon_dev dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); finish_tb();
  end

  initial begin
    logic [15:0] d;
    logic [11:0] v [9];
    logic [15:0] addr [9] = '{16'h7000, 16'h7100, 16'h7110, 16'h7120, 16'h7130,
                              16'h7140, 16'h7150, 16'h7160, 16'h7170};
    repeat (3) @(posedge clk); rst <= 1'b0; @(posedge clk);
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 9; c++) begin
        v[c] = 12'($urandom);
        adc_valid <= 1; adc_chan <= 4'(c); adc_data <= v[c];
        @(posedge clk);
      end
      adc_valid <= 1; adc_chan <= 4'd12; adc_data <= 12'hFFF;   // no such channel
      @(posedge clk);
      adc_valid <= 0;
      foreach (addr[c]) begin vme_r(addr[c], d); check_eq(d, {4'h0, v[c]}, $sformatf("R %04x", addr[c])); end
    end
    vme_r(16'h7180, d); check_eq(d, 0, "R 7180 not a channel");
    vme_r(16'h7104, d); check_eq(d, 0, "R 7104 not a channel");
    finish_tb();
  end
endmodule
