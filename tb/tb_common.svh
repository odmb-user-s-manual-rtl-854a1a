// tb_common.svh: clock, check counters and VME command tasks shared by the
// testbenches. The including module declares clk, rst, cmd (vme_cmd_t) and
// rsp (vme_rsp_t) before including this file.
int checks = 0, failures = 0;

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", what);
  end
endtask

task automatic check_eq(input logic [63:0] got, input logic [63:0] exp, input string what);
  checks++;
  if (got !== exp) begin
    failures++;
    $display("FAIL: %s: got %0h expected %0h", what, got, exp);
  end
endtask

task automatic finish_tb();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask

// Issue one command and wait for its acknowledge; returns read data and the
// number of clock cycles from the command to the acknowledge.
task automatic vme_op(input bit we, input logic [15:0] addr, input logic [15:0] data,
                      output logic [15:0] rdata, output int cycles);
  cmd.valid <= 1'b1; cmd.we <= we; cmd.addr <= addr; cmd.data <= data;
  @(posedge clk);
  cmd.valid <= 1'b0;
  cycles = 0;
  do begin
    @(posedge clk);
    cycles++;
  end while (!rsp.ack && cycles < 100000);
  rdata = rsp.data;
endtask

task automatic vme_w(input logic [15:0] addr, input logic [15:0] data);
  logic [15:0] d; int c;
  vme_op(1'b1, addr, data, d, c);
endtask

task automatic vme_r(input logic [15:0] addr, output logic [15:0] data);
  int c;
  vme_op(1'b0, addr, 16'h0, data, c);
endtask
