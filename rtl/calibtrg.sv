// calibtrg: calibration pulses and calibration LCT.
//
// Runs on the 80 MHz clock (12.5 ns steps), assumed phase aligned with the
// 40 MHz clock: a one-cycle 40 MHz request is seen for two fast cycles and its
// rising edge starts the delay. INJPLS follows an injection request
// (DCFEB_CTRL[2]) after inj_dly fast cycles, EXTPLS an external-pulse
// request (DCFEB_CTRL[3]) after ext_dly cycles (12.5*INJ_DLY, 12.5*EXT_DLY
// ns); each pulse lasts one fast cycle. In calibration mode (cal_mode,
// ODMB_CTRL[4]) with any cal_trgen bit set (ODMB_CTRL[3:0]), an LCT to all
// DCFEBs follows the pulse chosen by cal_trgsel (ODMB_CTRL[5]: 0 INJPLS,
// 1 EXTPLS) 2*callct_dly + 2 fast cycles after the pulse rises
// (25*CALLCT_DLY ns plus a fixed 25 ns); it lasts two fast cycles so the
// 40 MHz logic sees it once. A new request while a delay is running
// restarts it. The delay steps are the board's; the use of
// CAL_TRGEN/CAL_TRGSEL/CAL_MODE and the pulse widths are this design's reading.
module calibtrg
  import odmb_pkg::*;
(
  input  logic             clk_fast,
  input  logic             rst,
  input  logic             inj_req,
  input  logic             ext_req,
  input  logic [4:0]       inj_dly,
  input  logic [4:0]       ext_dly,
  input  logic [3:0]       callct_dly,
  input  logic             cal_mode,
  input  logic [3:0]       cal_trgen,
  input  logic             cal_trgsel,
  output logic             injpls,
  output logic             extpls,
  output logic [NCFEB-1:0] cal_lct
);

  logic       inj_q, ext_q, inj_run, ext_run, lct_run;
  logic [5:0] inj_cnt, ext_cnt, lct_cnt;
  logic [1:0] lct_hold;
  logic       trig;

  assign trig    = cal_trgsel ? extpls : injpls;
  assign cal_lct = (lct_hold != 0) ? '1 : '0;

  always_ff @(posedge clk_fast) begin
    if (rst) begin
      inj_q <= 1'b0; ext_q <= 1'b0; inj_run <= 1'b0; ext_run <= 1'b0; lct_run <= 1'b0;
      inj_cnt <= '0; ext_cnt <= '0; lct_cnt <= '0; lct_hold <= '0;
      injpls <= 1'b0; extpls <= 1'b0;
    end else begin
      inj_q  <= inj_req;
      ext_q  <= ext_req;
      injpls <= 1'b0;
      extpls <= 1'b0;

      if (inj_req && !inj_q) begin
        if (inj_dly == 0) injpls <= 1'b1;
        else begin inj_run <= 1'b1; inj_cnt <= 6'(inj_dly) - 6'd1; end
      end else if (inj_run) begin
        if (inj_cnt == 0) begin inj_run <= 1'b0; injpls <= 1'b1; end
        else inj_cnt <= inj_cnt - 6'd1;
      end

      if (ext_req && !ext_q) begin
        if (ext_dly == 0) extpls <= 1'b1;
        else begin ext_run <= 1'b1; ext_cnt <= 6'(ext_dly) - 6'd1; end
      end else if (ext_run) begin
        if (ext_cnt == 0) begin ext_run <= 1'b0; extpls <= 1'b1; end
        else ext_cnt <= ext_cnt - 6'd1;
      end

      // calibration LCT: counted from the cycle after the chosen pulse
      if (lct_hold != 0) lct_hold <= lct_hold - 2'd1;
      if (trig && cal_mode && |cal_trgen) begin
        lct_run <= 1'b1; lct_cnt <= {1'b0, callct_dly, 1'b0};
      end else if (lct_run) begin
        if (lct_cnt == 0) begin lct_run <= 1'b0; lct_hold <= 2'd2; end
        else lct_cnt <= lct_cnt - 6'd1;
      end
    end
  end

endmodule
