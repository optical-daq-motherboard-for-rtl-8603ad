// emergency_jtag: bit-by-bit JTAG of the FPGA from VME address 0xFFFC.
//
// On the board this path is discrete logic that works even when the FPGA is
// not configured; it is written here as a small clocked block on the same
// decoded bus (device F, command FFC). A write sets TMS = data[0] and
// TDI = data[1], then gives one TCK pulse (one clk low for set-up, one clk
// high); the write is acknowledged when TCK has fallen again. A read returns
// the present TDO level in bit 0, which after a TCK pulse in Shift-DR is the
// next bit of the register being shifted. Other commands of device F are
// acknowledged with data 0. The bit assignment is the board's; the pulse
// timing is this design's choice.
module emergency_jtag
  import odmb_pkg::*;
(
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

  logic [1:0] phase;   // 0 idle, 1 set-up, 2 TCK high

  always_ff @(posedge clk) begin
    if (rst) begin
      tck <= 1'b0; tms <= 1'b1; tdi <= 1'b0; rdata <= '0; dtack <= 1'b0; phase <= '0;
    end else begin
      dtack <= 1'b0;
      unique case (phase)
        2'd1: begin tck <= 1'b1; phase <= 2'd2; end
        2'd2: begin tck <= 1'b0; phase <= 2'd0; dtack <= 1'b1; end
        default: ;
      endcase
      if (strobe) begin
        rdata <= '0;
        if (req.cmd == 12'hFFC && req.write) begin
          tms <= req.wdata[0]; tdi <= req.wdata[1]; phase <= 2'd1;
        end else begin
          if (req.cmd == 12'hFFC) rdata <= {15'd0, tdo};
          dtack <= 1'b1;
        end
      end
    end
  end

endmodule
