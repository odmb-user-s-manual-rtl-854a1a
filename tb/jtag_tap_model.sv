// jtag_tap_model: behavioural model of an FPGA's JTAG test access port, used
// by the testbenches in place of a DCFEB or ODMB FPGA.
//
// It implements the IEEE 1149.1 TAP state machine, a 10-bit instruction
// register (capture value 10'b0000000001) and two data registers: USERCODE
// (32 bits, selected by instruction 10'h3C8, as on Virtex-6) and a 1-bit
// bypass register for any other instruction. State and shift registers move
// on the rising TCK edge, TDO changes on the falling edge. Counters record
// how many IR and DR updates it has seen.
module jtag_tap_model #(
  parameter logic [31:0] USERCODE = 32'h0105DBDB
) (
  input  logic tck,
  input  logic tms,
  input  logic tdi,
  output logic tdo
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_e;
  tap_e        st;
  logic [9:0]  ir, ir_sh;
  logic [31:0] dr_sh;
  int unsigned ir_updates, dr_updates;
  logic        uc;

  assign uc = (ir == 10'h3C8);
  initial begin tdo = 1'b0; st = TLR; ir = 10'h3C8; ir_sh = 0; dr_sh = 0; ir_updates = 0; dr_updates = 0; end

  always @(posedge tck) begin
    unique case (st)
      CAP_DR: dr_sh <= uc ? USERCODE : 32'h0;
      SH_DR:  dr_sh <= uc ? {tdi, dr_sh[31:1]} : {31'h0, tdi};
      CAP_IR: ir_sh <= 10'b0000000001;
      SH_IR:  ir_sh <= {tdi, ir_sh[9:1]};
      UPD_IR: begin ir <= ir_sh; ir_updates <= ir_updates + 1; end
      UPD_DR: dr_updates <= dr_updates + 1;
      default: ;
    endcase
    unique case (st)
      TLR:    st <= tms ? TLR    : RTI;
      RTI:    st <= tms ? SEL_DR : RTI;
      SEL_DR: st <= tms ? SEL_IR : CAP_DR;
      CAP_DR: st <= tms ? EX1_DR : SH_DR;
      SH_DR:  st <= tms ? EX1_DR : SH_DR;
      EX1_DR: st <= tms ? UPD_DR : PA_DR;
      PA_DR:  st <= tms ? EX2_DR : PA_DR;
      EX2_DR: st <= tms ? UPD_DR : SH_DR;
      UPD_DR: st <= tms ? SEL_DR : RTI;
      SEL_IR: st <= tms ? TLR    : CAP_IR;
      CAP_IR: st <= tms ? EX1_IR : SH_IR;
      SH_IR:  st <= tms ? EX1_IR : SH_IR;
      EX1_IR: st <= tms ? UPD_IR : PA_IR;
      PA_IR:  st <= tms ? EX2_IR : PA_IR;
      EX2_IR: st <= tms ? UPD_IR : SH_IR;
      UPD_IR: st <= tms ? SEL_DR : RTI;
      default: st <= TLR;
    endcase
  end

  always @(negedge tck) begin
    if (st == SH_DR)      tdo <= dr_sh[0];
    else if (st == SH_IR) tdo <= ir_sh[0];
  end

endmodule
