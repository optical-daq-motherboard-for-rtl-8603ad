// cfebjtag: VME device 1, JTAG access to the DCFEBs.
//
// Commands (address 1Ycc, Y = number of bits to shift minus one):
//   W 1Y00 / 1Y04 / 1Y08 / 1Y0C  shift Y+1 data bits with no header/tailer,
//                                header only, tailer only, both
//   R 1Y14  read the TDO register (last 16 shifted bits)
//   W 1018  TAP reset to Run-Test/Idle
//   W 1Y1C  shift Y+1 instruction bits (header and tailer)
//   W 1020  select DCFEBs, one bit per DCFEB;  R 1024 read the selection
// The sequence itself is made by jtag_master. TCK goes only to the selected
// DCFEBs, TMS and TDI are common, and TDO is the OR of the selected boards'
// TDO lines. Writes are acknowledged when the JTAG sequence has ended, reads
// one cycle after the strobe. The command set is the board's register map;
// the TCK rate and the OR of TDO lines are this design's choices.
module cfebjtag
  import odmb_pkg::*;
#(
  parameter int NCFEB_P  = NCFEB,
  parameter int TCK_HALF = 2
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               strobe,
  input  vme_cmd_t           req,
  output logic [15:0]        rdata,
  output logic               dtack,
  output logic [NCFEB_P-1:0] dcfeb_tck,
  output logic               dcfeb_tms,
  output logic               dcfeb_tdi,
  input  logic [NCFEB_P-1:0] dcfeb_tdo
);

  logic [NCFEB_P-1:0] sel;
  logic        start, hdr, tlr, ir, rseq, busy, done, tck, waiting;
  logic [15:0] tdo_reg;
  logic [7:0]  code;

  assign code = req.cmd[7:0];

  always_comb begin
    start = 1'b0; hdr = 1'b0; tlr = 1'b0; ir = 1'b0; rseq = 1'b0;
    if (strobe && req.write) begin
      unique case (code)
        JT_SHIFT_NONE, JT_SHIFT_HDR, JT_SHIFT_TLR, JT_SHIFT_BOTH: begin
          start = 1'b1; hdr = code[2]; tlr = code[3];
        end
        JT_SHIFT_IR: begin start = 1'b1; hdr = 1'b1; tlr = 1'b1; ir = 1'b1; end
        JT_RESET:    begin start = 1'b1; rseq = 1'b1; end
        default: ;
      endcase
    end
  end

  jtag_master #(.TCK_HALF(TCK_HALF)) u_jtag (
    .clk, .rst, .start, .hdr, .tlr, .ir, .reset_seq(rseq),
    .nbits({1'b0, req.cmd[11:8]} + 5'd1), .din(req.wdata),
    .busy, .done, .tck, .tms(dcfeb_tms), .tdi(dcfeb_tdi),
    .tdo(|(dcfeb_tdo & sel)), .tdo_reg
  );

  assign dcfeb_tck = tck ? sel : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      sel <= '0; rdata <= '0; dtack <= 1'b0; waiting <= 1'b0;
    end else begin
      dtack <= 1'b0;
      if (waiting && done) begin
        waiting <= 1'b0; dtack <= 1'b1;
      end
      if (strobe) begin
        rdata <= '0;
        if (start) waiting <= 1'b1;
        else begin
          dtack <= 1'b1;
          if (req.write && code == JT_SELECT) sel <= req.wdata[NCFEB_P-1:0];
          if (!req.write && code == JT_READ_TDO) rdata <= tdo_reg;
          if (!req.write && code == JT_READ_SEL) rdata <= 16'(sel);
        end
      end
    end
  end

endmodule
