// tb_trgcntrl: L1A_MATCH formation against a reference model.
//
// Random CCB LCTs and L1As are applied for several LCT_L1A_DLY values, with
// and without KILL bits, kill-L1A, kill-L1A_MATCH, test L1As and internal
// mode. A reference model keeps the LCT history: an L1A at crossing t
// matches DCFEB i when LCT i was high at crossing t - (96 + LCT_L1A_DLY);
// OTMB/ALCT match every L1A; test L1As match all DCFEBs. l1a, l1a_match and
// l1a_counter are compared every cycle (outputs one cycle after the inputs).
// Extra L1As are placed exactly at the delay after an LCT so that matches are
// frequent; the number of matches seen is counted and must be non-zero.
module tb_trgcntrl;
  import odmb_pkg::*;

  logic clk = 0, rst = 1;
  logic sel_int = 0, ccb_l1a = 0, int_l1a = 0, test_l1a = 0, kill_l1a = 0, kill_match = 0, resync = 0;
  logic [6:0] ccb_lct = 0, int_lct = 0, lct, lct_dly;
  logic [9:1] kill = 0, l1a_match;
  logic [5:0] dly = 0;
  logic l1a;
  logic [23:0] l1a_counter;
  int checks = 0, failures = 0, nmatch = 0, ntest = 0, nint = 0;
  logic [6:0] hist [int];
  int n = 0;
  logic        exp_l1a;
  logic [9:1]  exp_match;
  logic [23:0] exp_cnt = 0;

  always #5 clk = !clk;

  trgcntrl dut (.clk, .rst, .sel_int, .ccb_l1a, .ccb_lct, .int_l1a, .int_lct, .test_l1a,
    .kill_l1a, .kill_match, .kill, .lct_l1a_dly(dly), .resync, .l1a, .l1a_match, .lct,
    .lct_dly, .l1a_counter);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", n, what); end
  endtask

  initial begin
    int D;
    logic [6:0] tap, lin;
    logic now, lin1;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int phase = 0; phase < 8; phase++) begin
      dly = 6'($urandom);
      if (phase == 3) dly = 6'd63;
      if (phase == 4) dly = 6'd0;
      kill = (phase == 2) ? 9'b1_0000_0101 : '0;
      sel_int = (phase == 5);
      kill_l1a = (phase == 6);
      kill_match = (phase == 7);
      D = 96 + int'(dly);
      for (int k = 0; k < 400; k++) begin
        // inputs for the coming edge n
        ccb_lct = ($urandom % 8 == 0) ? 7'($urandom) : '0;
        int_lct = ($urandom % 12 == 0) ? 7'($urandom) : '0;
        lin = sel_int ? int_lct : ccb_lct;
        hist[n] = lin;
        tap = hist.exists(n - D) ? hist[n - D] : '0;
        ccb_l1a = ($urandom % 16 == 0) || (tap != 0 && $urandom % 2 == 0);
        test_l1a = ($urandom % 64 == 0);
        resync = ($urandom % 300 == 0);
        lin1 = sel_int ? (int_l1a || tap != 0) : ccb_l1a;
        now = (lin1 || test_l1a) && !kill_l1a;
        exp_l1a = now;
        exp_match = '0;
        exp_match[7:1] = test_l1a ? '1 : tap;
        exp_match[8] = 1; exp_match[9] = 1;
        exp_match &= ~kill;
        if (kill_match || !now) exp_match = '0;
        if (resync) exp_cnt = 0; else if (now) exp_cnt++;
        @(negedge clk);
        n++;
        if (n > HLEN_SKIP) begin
          check(l1a == exp_l1a, "l1a");
          check(l1a_match == exp_match, $sformatf("match %b want %b", l1a_match, exp_match));
          check(l1a_counter == exp_cnt, "l1a_counter");
        end
        if (l1a_match[7:1] != 0 && !test_l1a) nmatch++;
        if (test_l1a && l1a) ntest++;
        if (sel_int && l1a) nint++;
      end
    end
    check(nmatch > 10, $sformatf("matches seen %0d", nmatch));
    check(ntest > 0, "test L1A seen");
    check(nint > 0, "internal L1A seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int HLEN_SKIP = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
