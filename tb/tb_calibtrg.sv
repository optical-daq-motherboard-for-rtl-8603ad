// tb_calibtrg: calibration pulse delays and the calibration LCT.
//
// For random INJ_DLY, EXT_DLY and CALLCT_DLY the testbench raises each
// request for two fast cycles (a 40 MHz pulse) and measures, in fast clock
// edges: request sampled -> INJPLS/EXTPLS = INJ_DLY/EXT_DLY (12.5 ns steps),
// pulse -> calibration LCT = 2*CALLCT_DLY + 2 (25 ns steps plus a fixed
// 25 ns), LCT width two cycles, one pulse per request, and no LCT outside
// calibration mode or with CAL_TRGEN = 0. CAL_TRGSEL picks the pulse.
module tb_calibtrg;
  import odmb_pkg::*;

  logic clk = 0, rst = 1, inj_req = 0, ext_req = 0, cal_mode = 0, cal_trgsel = 0;
  logic [4:0] inj_dly = 0, ext_dly = 0;
  logic [3:0] callct_dly = 0, cal_trgen = 0;
  logic injpls, extpls;
  logic [6:0] cal_lct;
  int checks = 0, failures = 0;
  int edge_n = 0, t_inj = -1, t_ext = -1, t_lct = -1, w_lct = 0, n_inj = 0, n_ext = 0;

  always #5 clk = !clk;

  calibtrg dut (.clk_fast(clk), .rst, .inj_req, .ext_req, .inj_dly, .ext_dly, .callct_dly,
    .cal_mode, .cal_trgen, .cal_trgsel, .injpls, .extpls, .cal_lct);

  always @(posedge clk) begin
    edge_n++;
    #1;
    if (injpls) begin t_inj = edge_n; n_inj++; end
    if (extpls) begin t_ext = edge_n; n_ext++; end
    if (cal_lct == '1) begin if (w_lct == 0) t_lct = edge_n; w_lct++; end
    else if (cal_lct != '0) begin failures++; $display("FAIL: partial LCT"); end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 12; k++) begin
      inj_dly = 5'($urandom); ext_dly = 5'($urandom); callct_dly = 4'($urandom);
      if (k == 0) begin inj_dly = 0; callct_dly = 0; end
      cal_mode = (k != 5); cal_trgen = (k == 6) ? 4'd0 : 4'($urandom | 1); cal_trgsel = k[0];
      t_inj = -1; t_ext = -1; t_lct = -1; w_lct = 0; n_inj = 0; n_ext = 0;
      @(negedge clk);
      t0 = edge_n + 1;
      inj_req = 1; ext_req = 1;
      repeat (2) @(negedge clk);
      inj_req = 0; ext_req = 0;
      repeat (120) @(negedge clk);
      check(t_inj - t0 == int'(inj_dly), $sformatf("INJPLS after %0d want %0d", t_inj - t0, inj_dly));
      check(t_ext - t0 == int'(ext_dly), $sformatf("EXTPLS after %0d want %0d", t_ext - t0, ext_dly));
      check(n_inj == 1 && n_ext == 1, "one pulse per request");
      if (cal_mode && cal_trgen != 0) begin
        check(t_lct - (cal_trgsel ? t_ext : t_inj) == 2 * int'(callct_dly) + 2,
              $sformatf("LCT after %0d want %0d", t_lct - (cal_trgsel ? t_ext : t_inj), 2 * callct_dly + 2));
        check(w_lct == 2, $sformatf("LCT width %0d", w_lct));
      end else check(w_lct == 0, "no LCT outside calibration mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
