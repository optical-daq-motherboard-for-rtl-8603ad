// tb_odmb_top: end-to-end run of the whole ODMB firmware at its default sizes.
//
// Behavioural TAPs sit on the DCFEB chain and the FPGA chain, an ADC model on
// the LVMB serial lines; the front-end data come from the dummy sources. All
// control goes through VME cycles (AS*/DS*/DTACK*). The run:
//   1. reads the firmware version (4024) and both usercodes (devices 1, 2);
//   2. selects dummy data and LCT_L1A_DLY = 2, sends a CCB LCT for DCFEB 2
//      and a CCB L1A 98 crossings later: DCFEB 2, OTMB and ALCT must match
//      and a DDU packet with their three packets must come out, then an
//      Ethernet frame of packet + 8 words;
//   3. test L1A from DCFEB_CTRL[4] (all nine boards), then with DCFEB 1
//      killed (eight boards), then with kill-L1A set (nothing);
//   4. calibration in internal mode: INJPLS after INJ_DLY, calibration LCT,
//      internal L1A after the LCT delay, packet from all DCFEBs;
//   5. reads counters (3YZC), the DDU TX test FIFO (5Z0C, 5Z00), the RX
//      FIFOs filled by the internal loopback set in step 2 (3100), an ADC
//      conversion (8000/8004), the emergency JTAG path (FFFC), PB1, resync
//      and soft reset (ODMB_CTRL[8]) with blinking LEDs; TP_SEL routes the
//      PB1 L1A to TP42, and the fixed test points TP7, TP20 and TP21 are
//      compared with their sources all through the run.
// Each DDU packet is checked for its 9/A/F/E framing, its board count and its
// word count; every mechanism must have happened at least once.
module tb_odmb_top;
  import odmb_pkg::*;

  logic clk = 0, clk80 = 0, clk_ddu = 0, clk_pc = 0, rst = 1;
  logic as_n = 1, ds_n = 1, write_n = 1, dtack_n;
  logic [15:0] addr = 0, din = 0, dout;
  logic ccb_l1a = 0;
  logic [6:0] ccb_lct = 0;
  logic l1a;
  logic [9:1] l1a_match;
  logic resync, reprog, injpls, extpls, lct_rqst, ext_trig, opt_reset;
  logic [6:0] dcfeb_tck, dcfeb_tdo;
  logic dcfeb_tms, dcfeb_tdi, odmb_tck, odmb_tms, odmb_tdi, odmb_tdo, em_tck, em_tms, em_tdi, em_tdo;
  logic [9:1][17:0] rx_data = '0;
  logic [9:1] rx_dv = '0;
  logic [7:1] rx_good_crc = '0;
  logic [15:0] ddu_data, pc_data, tp_sel;
  logic ddu_valid, ddu_last, pc_valid, pc_last;
  logic [2:0] loopback;
  logic [3:0] diffctrl;
  logic [6:0] adc_cs_n;
  logic adc_sclk, adc_din, adc_dout = 0, lvmb_dummy, pb0 = 0, pb1 = 0;
  logic [7:0] pon;
  logic [12:1] led;
  logic [42:6] tp;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_ccb_match = 0, n_test_l1a = 0, n_kill = 0, n_kill_l1a = 0, n_int_l1a = 0, n_inj = 0, n_ext = 0;
  int n_ddu = 0, n_pc = 0, n_soft = 0, n_pb1 = 0, n_jtag = 0, n_adc = 0, n_tfifo = 0, n_emerg = 0, n_resync = 0;
  int n_l1a = 0;
  int n_loopback = 0;
  int n_tp_err = 0, n_tp_l1a = 0, n_tp_sel = 0;
  logic l1a_q = 0, ddu_valid_q = 0, match1_q = 0;

  always #12.5 clk = !clk;           // 40 MHz
  always @(posedge clk) begin clk80 = 1; #6.25 clk80 = 0; #6.25 clk80 = 1; #6.25 clk80 = 0; end
  always #6.25 clk_ddu = !clk_ddu;
  always #8 clk_pc = !clk_pc;

  odmb_top dut (
    .clk, .clk80, .clk_ddu, .clk_pc, .rst, .pll_locked(1'b1),
    .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_addr(addr), .vme_din(din),
    .vme_dout(dout), .vme_dtack_n(dtack_n), .ccb_l1a, .ccb_lct, .l1a, .l1a_match,
    .dcfeb_resync(resync), .dcfeb_reprogram(reprog), .dcfeb_injpls(injpls), .dcfeb_extpls(extpls),
    .otmb_lct_rqst(lct_rqst), .otmb_ext_trig(ext_trig), .opt_reset, .dcfeb_tck, .dcfeb_tms,
    .dcfeb_tdi, .dcfeb_tdo, .odmb_tck, .odmb_tms, .odmb_tdi, .odmb_tdo, .em_tck, .em_tms,
    .em_tdi, .em_tdo, .rx_data, .rx_dv, .rx_good_crc, .ddu_data, .ddu_valid, .ddu_last,
    .ddu_rx_data(16'h0), .ddu_rx_valid(1'b0), .pc_data, .pc_valid, .pc_last,
    .pc_rx_data(16'h0), .pc_rx_valid(1'b0), .loopback, .diffctrl, .adc_cs_n, .adc_sclk,
    .adc_din, .adc_dout, .pon, .lvmb_dummy, .pb0, .pb1, .led, .tp_sel, .tp);

  for (genvar i = 0; i < 7; i++) begin : g_tap
    jtag_tap_model #(.USERCODE({16'h0101, 16'hdb00 + 16'(i + 1)})) u_tap (
      .tck(dcfeb_tck[i]), .tms(dcfeb_tms), .tdi(dcfeb_tdi), .tdo(dcfeb_tdo[i]));
  end
  jtag_tap_model #(.USERCODE(USERCODE)) u_odmb_tap (.tck(odmb_tck), .tms(odmb_tms), .tdi(odmb_tdi), .tdo(odmb_tdo));
  jtag_tap_model #(.USERCODE(USERCODE)) u_em_tap (.tck(em_tck), .tms(em_tms), .tdi(em_tdi), .tdo(em_tdo));

  // ADC model: answers every conversion with 16'hC0DE
  logic [15:0] adc_sh;
  int adc_bits = 0;
  always @(negedge adc_cs_n[1]) begin adc_bits = 0; adc_sh = 16'hC0DE; end
  always @(posedge adc_sclk) if (adc_cs_n != '1) adc_bits++;
  always @(negedge adc_sclk) if (adc_cs_n != '1 && adc_bits >= 8) begin adc_dout = adc_sh[15]; adc_sh = {adc_sh[14:0], 1'b0}; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- DDU packet and PC frame monitors ----------------
  logic [15:0] pkt [$];
  int exp_boards [$];
  int last_ddu_len = 0;
  always @(negedge clk) if (!rst && ddu_valid) begin
    pkt.push_back(ddu_data);
    if (ddu_last) begin
      int n, nb;
      n = pkt.size();
      n_ddu++;
      last_ddu_len = n;
      for (int k = 0; k < 4; k++) check(pkt[k][15:12] == 4'h9 && pkt[k+4][15:12] == 4'hA, "DDU header digits");
      for (int k = 0; k < 4; k++) check(pkt[n-8+k][15:12] == 4'hF && pkt[n-4+k][15:12] == 4'hE, "DDU trailer digits");
      check(pkt[n-7][11:0] == 12'(n), $sformatf("DDU word count %0d vs %0d", pkt[n-7][11:0], n));
      check(pkt[3][6:0] == 7'h15, "CRATEID in header");
      nb = $countones(pkt[2][8:0]);
      check(n == 16 + 8 * nb, $sformatf("DDU length %0d for %0d boards", n, nb));
      if (exp_boards.size() > 0) begin
        int eb;
        eb = exp_boards.pop_front();
        check(nb == eb, $sformatf("boards in packet %0d want %0d", nb, eb));
      end
      pkt.delete();
    end
  end
  int pc_len = 0, last_pc_len = 0;
  always @(negedge clk) if (!rst && pc_valid) begin
    pc_len++;
    if (pc_last) begin n_pc++; last_pc_len = pc_len; pc_len = 0; end
  end
  always @(negedge clk) if (!rst) begin
    if (l1a) n_l1a++;
    if (injpls) n_inj++;
  end
  // test points: TP20 = L1A, TP21 = DDU_DATA_VALID, TP7 = L1A_MATCH(1), one cycle later
  always @(negedge clk) begin
    if (!rst && !dut.soft_rst) begin
      if (tp[20] != l1a_q || tp[21] != ddu_valid_q || tp[7] != match1_q) n_tp_err++;
      if (tp[20]) n_tp_l1a++;
      if (tp_sel == 16'h5F10 && tp[42]) n_tp_sel++;
    end
    l1a_q = l1a; ddu_valid_q = ddu_valid; match1_q = l1a_match[1];
  end
  always @(negedge clk80) if (!rst) begin
    if (injpls) n_inj++;
    if (extpls) n_ext++;
  end

  // ---------------- VME master ----------------
  task automatic vme(input logic wr, input logic [15:0] a, input logic [15:0] d, output logic [15:0] rd);
    int t;
    @(negedge clk);
    addr = a; din = d; write_n = !wr;
    @(negedge clk) as_n = 0;
    ds_n = 0;
    t = 0;
    while (dtack_n && t < 5000) begin @(negedge clk); t++; end
    check(t < 5000, $sformatf("DTACK timeout at %h", a));
    rd = dout;
    @(negedge clk) ds_n = 1; as_n = 1;
    while (!dtack_n) @(negedge clk);
  endtask
  task automatic vw(input logic [15:0] a, input logic [15:0] d);
    logic [15:0] rd;
    vme(1, a, d, rd);
  endtask
  task automatic vr(input logic [15:0] a, output logic [15:0] rd);
    vme(0, a, 16'h0, rd);
  endtask

  task automatic wait_ddu(input int prev, input int cycles);
    int t;
    t = 0;
    while (n_ddu == prev && t < cycles) begin @(negedge clk); t++; end
    repeat (120) @(negedge clk);
  endtask

  initial begin
    logic [15:0] rd, rd2;
    int b0, l0, t;
    repeat (6) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);

    // 1. version and usercodes
    vr(16'h4024, rd);
    check(rd == 16'h0101, $sformatf("firmware version %h", rd));
    vw(16'h2018, 0); vw(16'h291C, 16'h3C8); vw(16'h2F04, 0); vr(16'h2F14, rd);
    vw(16'h2F08, 0); vr(16'h2F14, rd2);
    check(rd == 16'hdbdb && rd2 == 16'h0101, $sformatf("ODMB usercode %h%h", rd2, rd));
    vw(16'h1020, 16'h7F); vw(16'h1018, 0); vw(16'h1020, 16'h4);
    vw(16'h191C, 16'h3C8); vw(16'h1F04, 0); vr(16'h1F14, rd); vw(16'h1F08, 0); vr(16'h1F14, rd2);
    check(rd == 16'hdb03 && rd2 == 16'h0101, $sformatf("DCFEB 3 usercode %h%h", rd2, rd));
    if (rd == 16'hdb03) n_jtag++;
    // emergency path: reset, IR 3C8, read first 16 usercode bits
    begin
      logic [1:0] seq [25] = '{1, 1, 1, 1, 1, 0, 1, 1, 0, 0, 0, 0, 0, 2, 0, 0, 2, 2, 2, 3, 1, 0, 1, 0, 0};
      logic [15:0] code;
      foreach (seq[i]) vw(16'hFFFC, 16'(seq[i]));
      for (int b = 0; b < 16; b++) begin vr(16'hFFFC, rd); code[b] = rd[0]; vw(16'hFFFC, 0); end
      check(code == 16'hdbdb, $sformatf("emergency usercode %h", code));
      if (code == 16'hdbdb) n_emerg++;
    end

    // 2. CCB trigger with LCT delay 2, dummy data; internal loopback on
    vw(16'h3100, 16'h1);
    vr(16'h3100, rd); check(rd == 1 && loopback == 3'd1, "LOOPBACK register");
    vw(16'h4000, 16'd2); vw(16'h4020, 16'h15); vw(16'h3000, 16'h0080);
    vr(16'h4000, rd); check(rd == 2, "LCT_L1A_DLY");
    for (int r = 0; r < 3; r++) begin
      b0 = n_ddu;
      @(negedge clk) ccb_lct = 7'b0000010;
      @(negedge clk) ccb_lct = 0;
      repeat (96 + 2 - 1) @(negedge clk);
      ccb_l1a = 1;
      @(negedge clk) ccb_l1a = 0;
      #1;
      check(l1a && l1a_match == 9'b1_1000_0010, $sformatf("CCB match %b", l1a_match));
      if (l1a_match[2]) n_ccb_match++;
      exp_boards.push_back(3);
      wait_ddu(b0, 2000);
      check(n_ddu == b0 + 1, "DDU packet after CCB L1A");
      check(last_pc_len == last_ddu_len + 8, $sformatf("PC frame %0d for packet %0d", last_pc_len, last_ddu_len));
    end
    // L1A at the wrong delay: only OTMB/ALCT
    b0 = n_ddu;
    @(negedge clk) ccb_lct = 7'b0000100;
    @(negedge clk) ccb_lct = 0;
    repeat (90) @(negedge clk);
    ccb_l1a = 1; @(negedge clk) ccb_l1a = 0; #1;
    check(l1a_match == 9'b1_1000_0000, "no DCFEB match off the delay");
    exp_boards.push_back(2);
    wait_ddu(b0, 2000);

    // 3. test L1A, kill, kill L1A
    b0 = n_ddu; l0 = n_l1a;
    exp_boards.push_back(9);
    vw(16'h3010, 16'h0010);
    wait_ddu(b0, 3000);
    check(n_ddu == b0 + 1 && n_l1a == l0 + 1, "test L1A packet");
    if (n_ddu == b0 + 1) n_test_l1a++;
    vw(16'h401C, 16'h0002);          // kill DCFEB 1
    b0 = n_ddu;
    exp_boards.push_back(8);
    vw(16'h3010, 16'h0010);
    wait_ddu(b0, 3000);
    if (n_ddu == b0 + 1) n_kill++;
    vw(16'h401C, 16'h0000);
    vw(16'h3000, 16'h0880);          // kill L1A
    l0 = n_l1a; b0 = n_ddu;
    vw(16'h3010, 16'h0010);
    repeat (300) @(negedge clk);
    check(n_l1a == l0 && n_ddu == b0, "kill L1A");
    if (n_l1a == l0) n_kill_l1a++;

    // 4. calibration, internal mode: dummy | int | cal_mode | trgen[0]
    vw(16'h4010, 16'd3); vw(16'h4014, 16'd5); vw(16'h4018, 16'd1);
    vw(16'h3000, 16'h0291);
    b0 = n_ddu; l0 = n_l1a;
    exp_boards.push_back(9);
    vw(16'h3010, 16'h0004);          // INJPLS
    wait_ddu(b0, 3000);
    check(n_l1a == l0 + 1 && n_ddu == b0 + 1, "internal L1A after calibration LCT");
    if (n_l1a == l0 + 1) n_int_l1a++;
    vw(16'h3010, 16'h0008);          // EXTPLS (no LCT: CAL_TRGSEL = 0)
    repeat (50) @(negedge clk);
    vw(16'h3000, 16'h0080);

    // 5. counters, test FIFO, ADC, PB1, resync, soft reset
    vr(16'h322C, rd);  check(rd == 6, $sformatf("L1A_MATCHes DCFEB 2: %0d", rd));
    vr(16'h329C, rd);  check(rd == 7, $sformatf("L1A_MATCHes ALCT: %0d", rd));
    vr(16'h34AC, rd);  check(int'(rd) == n_ddu, $sformatf("DDU packets %0d", rd));
    vr(16'h34BC, rd);  check(int'(rd) == n_pc, $sformatf("PC packets %0d", rd));
    vr(16'h33BC, rd);  check(int'(rd) == n_l1a, $sformatf("L1A_COUNTER %0d vs %0d", rd, n_l1a));
    vr(16'h372C, rd);  check(rd == 3 + 1, $sformatf("LCTs DCFEB 2: %0d", rd));
    vr(16'h352C, rd);  check(rd == 6, $sformatf("DCFEB 2 packets shipped %0d", rd));
    vr(16'h530C, rd);
    check(rd > 0, "DDU TX test FIFO has words");
    vr(16'h5300, rd);  check(rd[15:12] == 4'h9, $sformatf("first DDU TX word %h", rd));
    if (rd[15:12] == 4'h9) n_tfifo++;
    vr(16'h510C, rd);  check(rd > 0, "PC TX test FIFO has words");
    begin
      logic [15:0] ddu_tx_n, ddu_rx_n, pc_tx_n, pc_rx_n;
      vr(16'h530C, ddu_tx_n); vr(16'h540C, ddu_rx_n);
      vr(16'h510C, pc_tx_n);  vr(16'h520C, pc_rx_n);
      check(ddu_rx_n == ddu_tx_n + 1, $sformatf("DDU RX %0d vs TX %0d words", ddu_rx_n, ddu_tx_n));
      check(pc_rx_n == pc_tx_n, $sformatf("PC RX %0d vs TX %0d words", pc_rx_n, pc_tx_n));
      vr(16'h5400, rd);  check(rd[15:12] == 4'h9, $sformatf("first DDU RX word %h", rd));
      if (ddu_rx_n > 0 && pc_rx_n == pc_tx_n && rd[15:12] == 4'h9) n_loopback++;
    end
    vw(16'h5010, 16'h2); vr(16'h500C, rd); check(rd == 8 * 6, $sformatf("DCFEB 2 FIFO words %0d", rd));
    vw(16'h8020, 16'd1); vw(16'h8000, 16'h008F); vr(16'h8004, rd);
    check(rd == 16'hC0DE, $sformatf("ADC %h", rd));
    if (rd == 16'hC0DE) n_adc++;
    vw(16'h3020, 16'h5F10);          // TP27 L1A, TP28 DDU last, TP41 blinking, TP42 PB1 L1A
    l0 = n_l1a;
    pb1 = 1; repeat (10) @(negedge clk); pb1 = 0;
    repeat (400) @(negedge clk);
    check(n_l1a == l0 + 1, "PB1 L1A");
    check(n_tp_sel == 1, $sformatf("PB1 L1A on TP42 %0d", n_tp_sel));
    if (n_l1a == l0 + 1) n_pb1++;
    check(led[2] == n_l1a[0] && led[4] == n_l1a[1], "L1A_COUNTER on LEDs");
    vw(16'h3010, 16'h0002);
    vr(16'h33BC, rd); check(rd == 0, "resync clears L1A_COUNTER");
    if (rd == 0) n_resync++;
    vw(16'h4020, 16'h15);
    vw(16'h3000, 16'h0100);           // soft reset
    repeat (5) @(negedge clk);
    check(dut.blinking, "LEDs blinking after soft reset");
    vr(16'h4020, rd); check(rd == 0, "read during soft reset answered by the time-out");
    repeat (30) @(negedge clk);
    vr(16'h4020, rd); check(rd == 0, "soft reset cleared CRATEID");
    if (dut.blinking && rd == 0) n_soft++;

    check(n_inj > 0 && n_ext > 0, "INJPLS/EXTPLS");
    check(n_ccb_match > 0, "mechanism: CCB L1A_MATCH");
    check(n_test_l1a > 0, "mechanism: test L1A");
    check(n_kill > 0, "mechanism: KILL");
    check(n_kill_l1a > 0, "mechanism: kill L1A");
    check(n_int_l1a > 0, "mechanism: internal L1A from calibration");
    check(n_ddu > 0 && n_pc > 0, "mechanism: DDU packets and PC frames");
    check(n_soft > 0, "mechanism: soft reset");
    check(n_pb1 > 0, "mechanism: PB1");
    check(n_jtag > 0 && n_emerg > 0, "mechanism: JTAG paths");
    check(n_adc > 0, "mechanism: ADC read");
    check(n_tfifo > 0, "mechanism: test FIFO read");
    check(n_resync > 0, "mechanism: resync");
    check(n_tp_err == 0, $sformatf("fixed test points: %0d mismatches", n_tp_err));
    check(n_tp_l1a == n_l1a, $sformatf("L1As on TP20 %0d of %0d", n_tp_l1a, n_l1a));
    check(n_tp_sel > 0, "mechanism: TP_SEL selection");
    check(n_loopback > 0, "mechanism: internal loopback into the RX FIFOs");
    $display("mechanisms: ccb_match=%0d test_l1a=%0d kill=%0d kill_l1a=%0d int_l1a=%0d inj=%0d ext=%0d ddu=%0d pc=%0d soft_rst=%0d pb1=%0d jtag=%0d emerg=%0d adc=%0d tfifo=%0d resync=%0d tp_sel=%0d loopback=%0d",
             n_ccb_match, n_test_l1a, n_kill, n_kill_l1a, n_int_l1a, n_inj, n_ext, n_ddu, n_pc, n_soft,
             n_pb1, n_jtag, n_emerg, n_adc, n_tfifo, n_resync, n_tp_sel, n_loopback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
