// jtag_tap_model: behavioural JTAG TAP of an FPGA for the testbenches.
//
// Implements the 16-state TAP controller, a 10-bit instruction register and
// three data registers: USERCODE (instruction 3C8, 32 bits, value USERCODE),
// IDCODE (instruction 3C9) and a 1-bit BYPASS for every other instruction.
// TMS/TDI are taken at the rising TCK edge, TDO changes at the falling edge.
// Not synthesizable logic of the design: a model of the device on the chain.
module jtag_tap_model #(
  parameter logic [31:0] USERCODE = 32'h0101dbdb,
  parameter logic [31:0] IDCODE   = 32'h1424a093
) (
  input  logic tck,
  input  logic tms,
  input  logic tdi,
  output logic tdo
);

  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_e;

  tap_e        st;
  logic [9:0]  ir, ir_sh;
  logic [31:0] dr;
  int          len;

  initial begin st = TLR; ir = 10'h3C9; ir_sh = '0; dr = '0; len = 1; tdo = 1'b0; end

  always @(posedge tck) begin
    // shift actions in the present state
    if (st == SH_DR) dr <= (len == 32) ? {tdi, dr[31:1]} : {31'd0, tdi};
    if (st == SH_IR) ir_sh <= {tdi, ir_sh[9:1]};
    if (st == CAP_DR) begin
      if (ir == 10'h3C8) begin dr <= USERCODE; len <= 32; end
      else if (ir == 10'h3C9) begin dr <= IDCODE; len <= 32; end
      else begin dr <= '0; len <= 1; end
    end
    if (st == CAP_IR) ir_sh <= 10'h001;
    if (st == UPD_IR) ir <= ir_sh;
    if (st == TLR) ir <= 10'h3C9;
    unique case (st)
      TLR:    st <= tms ? TLR : RTI;
      RTI:    st <= tms ? SEL_DR : RTI;
      SEL_DR: st <= tms ? SEL_IR : CAP_DR;
      CAP_DR: st <= tms ? EX1_DR : SH_DR;
      SH_DR:  st <= tms ? EX1_DR : SH_DR;
      EX1_DR: st <= tms ? UPD_DR : PAU_DR;
      PAU_DR: st <= tms ? EX2_DR : PAU_DR;
      EX2_DR: st <= tms ? UPD_DR : SH_DR;
      UPD_DR: st <= tms ? SEL_DR : RTI;
      SEL_IR: st <= tms ? TLR : CAP_IR;
      CAP_IR: st <= tms ? EX1_IR : SH_IR;
      SH_IR:  st <= tms ? EX1_IR : SH_IR;
      EX1_IR: st <= tms ? UPD_IR : PAU_IR;
      PAU_IR: st <= tms ? EX2_IR : PAU_IR;
      EX2_IR: st <= tms ? UPD_IR : SH_IR;
      UPD_IR: st <= tms ? SEL_DR : RTI;
      default: st <= TLR;
    endcase
  end

  always @(negedge tck) begin
    if (st == SH_DR) tdo <= dr[0];
    else if (st == SH_IR) tdo <= ir_sh[0];
    else tdo <= 1'b0;
  end

endmodule
