// tb_test_points: self-checking test of the test-point driver.
//
// Drives random values on every source and random TP_SEL settings, and
// compares each test point with a reference built here from the test-point
// list, one clk cycle after the sources were applied. Also checks that the
// outputs are low after reset and that the unused positions stay low.
module tb_test_points;
  logic        clk = 0, rst = 1;
  logic [15:0] tp_sel, sel_src;
  logic [7:1]  raw_lct, l1a_match;
  logic        l1a, ddu_valid, pc_valid, otmb_dav, alct_dav;
  logic [2:1]  dcfeb_dav;
  logic [42:6] tp, exp_tp;
  int checks = 0, failures = 0;

  test_points dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [42:6] model();
    logic [42:6] t = '0;
    t[6]  = raw_lct[1]; t[8]  = raw_lct[2]; t[10] = raw_lct[3]; t[12] = raw_lct[4];
    t[14] = raw_lct[5]; t[16] = raw_lct[6]; t[18] = raw_lct[7];
    t[7]  = l1a_match[1]; t[9]  = l1a_match[2]; t[11] = l1a_match[3]; t[13] = l1a_match[4];
    t[15] = l1a_match[5]; t[17] = l1a_match[6]; t[19] = l1a_match[7];
    t[20] = l1a; t[21] = ddu_valid; t[22] = otmb_dav; t[23] = alct_dav;
    t[29] = dcfeb_dav[1]; t[30] = dcfeb_dav[2]; t[31] = ddu_valid; t[32] = pc_valid;
    t[39:33] = raw_lct;
    t[27] = sel_src[tp_sel[3:0]];   t[28] = sel_src[tp_sel[7:4]];
    t[41] = sel_src[tp_sel[11:8]];  t[42] = sel_src[tp_sel[15:12]];
    return t;
  endfunction

  task automatic randomize_inputs();
    tp_sel = 16'($urandom); sel_src = 16'($urandom);
    raw_lct = 7'($urandom); l1a_match = 7'($urandom);
    {l1a, ddu_valid, pc_valid, otmb_dav, alct_dav} = 5'($urandom);
    dcfeb_dav = 2'($urandom);
  endtask

  initial begin
    randomize_inputs();
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (tp !== '0) begin failures++; $display("tp not low in reset: %h", tp); end
    rst = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      randomize_inputs();
      // a single hot source at times, to show one selection at a time
      if (n % 4 == 0) sel_src = 16'(1) << tp_sel[3:0];
      exp_tp = model();
      @(posedge clk); #1;
      checks++;
      if (tp !== exp_tp) begin
        failures++;
        if (failures < 10) $display("n=%0d tp=%h expected %h", n, tp, exp_tp);
      end
      checks++;
      if (tp[26:24] != 3'b000 || tp[40] != 1'b0) begin failures++; $display("unused test point high"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
