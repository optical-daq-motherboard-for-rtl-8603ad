// odmbjtag: VME device 2, JTAG access to the ODMB's own FPGA chain.
//
// Same command set as device 1 without the board selection:
//   W 2Y00 / 2Y04 / 2Y08 / 2Y0C  shift Y+1 data bits (no header/tailer,
//                                header, tailer, both)
//   R 2Y14  read the last 16 shifted TDO bits
//   W 2018  TAP reset to Run-Test/Idle
//   W 2Y1C  shift Y+1 instruction bits
// The JTAG sequence comes from jtag_master; writes are acknowledged when it
// has ended, reads one cycle after the strobe. How the chain is reached
// inside the FPGA is left open: TCK/TMS/TDI/TDO are ports.
module odmbjtag
  import odmb_pkg::*;
#(
  parameter int TCK_HALF = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        strobe,
  input  vme_cmd_t    req,
  output logic [15:0] rdata,
  output logic        dtack,
  output logic        tck,
  output logic        tms,
  output logic        tdi,
  input  logic        tdo
);

  logic        start, hdr, tlr, ir, rseq, busy, done, waiting;
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
    .busy, .done, .tck, .tms, .tdi, .tdo, .tdo_reg
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      rdata <= '0; dtack <= 1'b0; waiting <= 1'b0;
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
          if (!req.write && code == JT_READ_TDO) rdata <= tdo_reg;
        end
      end
    end
  end

endmodule
