// vmeconfregs: VME device 4, configuration registers.
//
//   W/R 4000 LCT_L1A_DLY[5:0]  LCT-to-L1A delay, 2400 + 25*LCT_L1A_DLY ns
//   W/R 4004 OTMB_DLY[4:0]     W/R 4008 PUSH_DLY[4:0]    W/R 400C ALCT_DLY[4:0]
//   W/R 4010 INJ_DLY[4:0]      INJPLS delay, 12.5 ns steps
//   W/R 4014 EXT_DLY[4:0]      EXTPLS delay, 12.5 ns steps
//   W/R 4018 CALLCT_DLY[3:0]   calibration LCT delay, 25 ns steps
//   W/R 401C KILL[9:1]         ALCT + TMB + 7 DCFEBs
//   W/R 4020 CRATEID[6:0]
//   R   4024 firmware version (XYZK for tag VXY-ZK)
// Every access is acknowledged one cycle after its strobe. Registers reset
// to zero (the reset values are this design's choice); the map and widths
// are the board's. OTMB_DLY, PUSH_DLY and ALCT_DLY are stored and read back
// but drive nothing here, since their use is not defined for this firmware
// level.
module vmeconfregs
  import odmb_pkg::*;
#(
  parameter logic [15:0] FW_VER = FW_VERSION
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        strobe,
  input  vme_cmd_t    req,
  output logic [15:0] rdata,
  output logic        dtack,
  output conf_regs_t  cfg
);

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg <= '0; rdata <= '0; dtack <= 1'b0;
    end else begin
      dtack <= strobe;
      if (strobe) begin
        rdata <= '0;
        unique case (req.cmd)
          12'h000: if (req.write) cfg.lct_l1a_dly <= req.wdata[5:0]; else rdata <= 16'(cfg.lct_l1a_dly);
          12'h004: if (req.write) cfg.otmb_dly    <= req.wdata[4:0]; else rdata <= 16'(cfg.otmb_dly);
          12'h008: if (req.write) cfg.push_dly    <= req.wdata[4:0]; else rdata <= 16'(cfg.push_dly);
          12'h00C: if (req.write) cfg.alct_dly    <= req.wdata[4:0]; else rdata <= 16'(cfg.alct_dly);
          12'h010: if (req.write) cfg.inj_dly     <= req.wdata[4:0]; else rdata <= 16'(cfg.inj_dly);
          12'h014: if (req.write) cfg.ext_dly     <= req.wdata[4:0]; else rdata <= 16'(cfg.ext_dly);
          12'h018: if (req.write) cfg.callct_dly  <= req.wdata[3:0]; else rdata <= 16'(cfg.callct_dly);
          12'h01C: if (req.write) cfg.kill        <= req.wdata[9:1]; else rdata <= {6'd0, cfg.kill, 1'b0};
          12'h020: if (req.write) cfg.crateid     <= req.wdata[6:0]; else rdata <= 16'(cfg.crateid);
          12'h024: if (!req.write) rdata <= FW_VER;
          default: ;
        endcase
      end
    end
  end

endmodule
