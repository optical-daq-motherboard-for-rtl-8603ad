// vmemon: VME device 3, ODMB/DCFEB control and monitoring.
//
//   W/R 3000  ODMB_CTRL   [3:0] CAL_TRGEN, [4] CAL_MODE, [5] CAL_TRGSEL,
//                         [7] dummy DCFEB data, [8] soft reset (auto-reset),
//                         [9] internal L1A/LCTs, [10] dummy LVMB,
//                         [11] kill L1A, [12] kill L1A_MATCH
//   W/R 3010  DCFEB_CTRL  [0] reprogram DCFEBs, [1] resync L1A_COUNTER,
//                         [2] INJPLS, [3] EXTPLS, [4] test L1A (bits 0-4
//                         auto-reset), [5] LCT request to OTMB, [6] external
//                         trigger request to OTMB, [7] reset optical links
//   W/R 3020  TP_SEL      selection of test points TP27/28/41/42
//   W/R 3100  LOOPBACK    0 none, 1 or 2 internal loopback
//   W/R 3110  DIFFCTRL    transmitter swing, 0 minimum .. F maximum
//   R   3YZC  ODMB_DATA selected by YZ (see odmb_counters)
// Auto-reset bits appear as one-cycle pulses on the outputs and read back 0.
// Writes and register reads are acknowledged one cycle after the strobe;
// an ODMB_DATA read drives odmb_data_sel and is acknowledged one cycle later
// with the selected value. The register map is the board's; widths the map
// leaves open (TP_SEL 16, LOOPBACK 3 bits) and zero reset values are this
// design's choices.
module vmemon
  import odmb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        strobe,
  input  vme_cmd_t    req,
  output logic [15:0] rdata,
  output logic        dtack,
  output logic [15:0] odmb_ctrl,
  output logic [7:0]  dcfeb_ctrl,
  output logic [15:0] tp_sel,
  output logic [2:0]  loopback,
  output logic [3:0]  diffctrl,
  output logic [7:0]  odmb_data_sel,
  input  logic [15:0] odmb_data
);

  localparam logic [15:0] ODMB_PULSE  = 16'h0100;
  localparam logic [7:0]  DCFEB_PULSE = 8'h1F;

  logic [15:0] odmb_lvl;
  logic [7:0]  dcfeb_lvl;
  logic [15:0] odmb_pls;
  logic [7:0]  dcfeb_pls;
  logic        data_rd;

  assign odmb_ctrl  = (odmb_lvl & ~ODMB_PULSE) | odmb_pls;
  assign dcfeb_ctrl = (dcfeb_lvl & ~DCFEB_PULSE) | dcfeb_pls;

  always_ff @(posedge clk) begin
    if (rst) begin
      odmb_lvl <= '0; dcfeb_lvl <= '0; odmb_pls <= '0; dcfeb_pls <= '0;
      tp_sel <= '0; loopback <= '0; diffctrl <= '0; odmb_data_sel <= '0;
      rdata <= '0; dtack <= 1'b0; data_rd <= 1'b0;
    end else begin
      dtack     <= 1'b0;
      odmb_pls  <= '0;
      dcfeb_pls <= '0;
      data_rd   <= 1'b0;
      if (data_rd) begin
        rdata <= odmb_data; dtack <= 1'b1;
      end
      if (strobe) begin
        if (!req.write && req.cmd[3:0] == 4'hC) begin
          odmb_data_sel <= req.cmd[11:4];
          data_rd       <= 1'b1;
        end else begin
          dtack <= 1'b1;
          rdata <= '0;
          unique case (req.cmd)
            12'h000: if (req.write) begin
                       odmb_lvl <= req.wdata & 16'h1FFF & ~ODMB_PULSE;
                       odmb_pls <= req.wdata & ODMB_PULSE;
                     end else rdata <= odmb_lvl;
            12'h010: if (req.write) begin
                       dcfeb_lvl <= req.wdata[7:0] & ~DCFEB_PULSE;
                       dcfeb_pls <= req.wdata[7:0] & DCFEB_PULSE;
                     end else rdata <= {8'd0, dcfeb_lvl};
            12'h020: if (req.write) tp_sel <= req.wdata; else rdata <= tp_sel;
            12'h100: if (req.write) loopback <= req.wdata[2:0]; else rdata <= {13'd0, loopback};
            12'h110: if (req.write) diffctrl <= req.wdata[3:0]; else rdata <= {12'd0, diffctrl};
            default: ;
          endcase
        end
      end
    end
  end

endmodule
