// lvdbmon: VME device 8, low-voltage monitoring and DCFEB/ALCT power control.
//
//   W 8000  send a control byte to the selected ADC and read its result
//   R 8004  read the last ADC result
//   W 8010  power on DCFEBs/ALCT (8 bits: [6:0] DCFEB 1-7, [7] ALCT)
//   R 8014  read the power-on register
//   W 8020  select the ADC to be read;  R 8024 read the selection
// The serial transfer drops the selected chip select, sends the 8 control
// bits MSB first on adc_din, then clocks in RES_BITS result bits MSB first
// from adc_dout, sampling at each rising adc_sclk; adc_sclk has a period of
// 2*SCLK_HALF clk cycles. The write to 8000 is acknowledged when the transfer
// has ended, everything else one cycle after the strobe. The register map is
// the board's; the ADC count, the serial format and the all-on power reset
// value are this design's choices, since the ADC protocol is not specified.
module lvdbmon
  import odmb_pkg::*;
#(
  parameter int NADC      = 7,
  parameter int RES_BITS  = 16,
  parameter int SCLK_HALF = 4
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            strobe,
  input  vme_cmd_t        req,
  output logic [15:0]     rdata,
  output logic            dtack,
  output logic [NADC-1:0] adc_cs_n,
  output logic            adc_sclk,
  output logic            adc_din,
  input  logic            adc_dout,
  output logic [7:0]      pon
);

  localparam int NB = 8 + RES_BITS;

  logic [2:0]          adc_sel;
  logic [7:0]          ctrl;
  logic [RES_BITS-1:0] shin, result;
  logic                busy;
  int unsigned         bitn, hcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      adc_sel <= '0; pon <= 8'hFF; rdata <= '0; dtack <= 1'b0;
      adc_cs_n <= '1; adc_sclk <= 1'b0; adc_din <= 1'b0;
      ctrl <= '0; shin <= '0; result <= '0; busy <= 1'b0; bitn <= 0; hcnt <= 0;
    end else begin
      dtack <= 1'b0;
      if (busy) begin
        if (hcnt == 0) begin
          adc_sclk <= 1'b0;
          adc_din  <= (bitn < 8) ? ctrl[7 - bitn] : 1'b0;
          hcnt     <= hcnt + 1;
        end else if (hcnt == SCLK_HALF) begin
          adc_sclk <= 1'b1;
          if (bitn >= 8) shin <= {shin[RES_BITS-2:0], adc_dout};
          hcnt <= hcnt + 1;
        end else if (hcnt == 2*SCLK_HALF - 1) begin
          adc_sclk <= 1'b0;
          hcnt     <= 0;
          if (bitn == NB - 1) begin
            busy     <= 1'b0;
            adc_cs_n <= '1;
            result   <= shin;
            dtack    <= 1'b1;
          end
          bitn <= bitn + 1;
        end else hcnt <= hcnt + 1;
      end
      if (strobe) begin
        rdata <= '0;
        if (req.write && req.cmd == 12'h000) begin
          ctrl <= req.wdata[7:0]; busy <= 1'b1; bitn <= 0; hcnt <= 0;
          if (32'(adc_sel) < NADC) adc_cs_n[adc_sel] <= 1'b0;
        end else begin
          dtack <= 1'b1;
          unique case (req.cmd)
            12'h004: if (!req.write) rdata <= 16'(result);
            12'h010: if (req.write) pon <= req.wdata[7:0];
            12'h014: if (!req.write) rdata <= {8'd0, pon};
            12'h020: if (req.write) adc_sel <= req.wdata[2:0];
            12'h024: if (!req.write) rdata <= {13'd0, adc_sel};
            default: ;
          endcase
        end
      end
    end
  end

endmodule
