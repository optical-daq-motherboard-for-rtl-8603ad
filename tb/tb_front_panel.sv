// tb_front_panel: LEDs 1-12 and push buttons, with scaled-down clock rates.
//
// CLK_HZ = 1000 (so 1 Hz is 1000 cycles), DDU 2000 Hz, PC 1600 Hz, blink
// window 1 s, LED 12 hold 10 ms. Checks: the half periods of LEDs 1, 3, 5
// (4, 2, 1 Hz: 250, 400, 500 cycles) in their own clock cycles, LEDs 7/9/11 follow PLL lock and the
// selections, the even LEDs show L1A_COUNTER[4:0], LED 12 is held 10 cycles
// after a command and while PB1 is pressed, PB1 gives one test L1A, PB0 gives
// a 16-cycle soft reset and about 1000 cycles of blinking, and ODMB_CTRL[8]
// does the same.
module tb_front_panel;
  logic clk = 0, clk_ddu = 0, clk_pc = 0, rst = 1;
  logic pb0 = 0, pb1 = 0, ctrl_rst = 0, pll_locked = 0, sel_int = 0, dummy = 0, cmd_seen = 0;
  logic [4:0] l1a_cnt = 0;
  logic [12:1] led;
  logic soft_rst, pb1_l1a, blinking;
  int checks = 0, failures = 0;
  int n_l1a = 0, n_rst = 0, n_blink = 0, cyc = 0;
  int last1 = -1, last3 = -1, last5 = -1, h1 = 0, h3 = 0, h5 = 0, c1 = 0, c3 = 0, c5 = 0;
  logic p1 = 0, p3 = 0, p5 = 0;

  always #5 clk = !clk;
  always #2.5 clk_ddu = !clk_ddu;
  always #3.125 clk_pc = !clk_pc;

  front_panel #(.CLK_HZ(1000), .DDU_CLK_HZ(2000), .PC_CLK_HZ(1600), .BLINK_S(1), .STRETCH_MS(10)) dut (
    .clk, .clk_ddu, .clk_pc, .rst, .pb0, .pb1, .ctrl_rst, .pll_locked, .sel_int,
    .dummy_data(dummy), .l1a_cnt, .cmd_seen, .led, .soft_rst, .pb1_l1a, .blinking);

  // half periods of the heartbeats, in cycles of their own clock
  always @(posedge clk_ddu) begin c1++; if (!blinking && led[1] != p1) begin h1 = c1 - last1; last1 = c1; end p1 = led[1]; end
  always @(posedge clk_pc)  begin c3++; if (!blinking && led[3] != p3) begin h3 = c3 - last3; last3 = c3; end p3 = led[3]; end
  always @(posedge clk) begin
    cyc++;
    if (!blinking && led[5] != p5) begin h5 = cyc - last5; last5 = cyc; end
    p5 = led[5];
  end
  always @(negedge clk) begin n_l1a += pb1_l1a; n_rst += soft_rst; n_blink += blinking; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (2600) @(negedge clk);
    check(h1 == 250, $sformatf("LED1 half period %0d", h1));
    check(h3 == 400, $sformatf("LED3 half period %0d", h3));
    check(h5 == 500, $sformatf("LED5 half period %0d", h5));
    pll_locked = 1; sel_int = 0; dummy = 1; l1a_cnt = 5'b10110;
    @(negedge clk);
    check(led[7] && led[9] && !led[11], "LEDs 7/9/11");
    check({led[10], led[8], led[6], led[4], led[2]} == 5'b10110, "L1A_COUNTER LEDs");
    sel_int = 1; dummy = 0; @(negedge clk);
    check(!led[9] && led[11], "LEDs 9/11 follow selections");
    check(!led[12], "LED12 off");
    cmd_seen = 1; @(negedge clk); cmd_seen = 0;
    repeat (9) begin check(led[12], "LED12 held"); @(negedge clk); end
    repeat (2) @(negedge clk);
    check(!led[12], "LED12 released");
    pb1 = 1; repeat (5) @(negedge clk);
    check(led[12], "LED12 with PB1");
    repeat (20) @(negedge clk); pb1 = 0; repeat (5) @(negedge clk);
    check(n_l1a == 1, $sformatf("PB1 test L1As %0d", n_l1a));
    pb0 = 1; repeat (30) @(negedge clk); pb0 = 0;
    repeat (1100) @(negedge clk);
    check(n_rst == 17, $sformatf("soft reset cycles %0d", n_rst));
    check(n_blink >= 999 && n_blink <= 1001, $sformatf("blink cycles %0d", n_blink));
    ctrl_rst = 1; @(negedge clk); ctrl_rst = 0;
    repeat (300) @(negedge clk);
    check(blinking, "ODMB_CTRL[8] starts blinking");
    check(n_rst == 34, $sformatf("soft reset cycles %0d", n_rst));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
