// tb_ddu_builder: DDU packets built from random events and board data.
//
// Events with random L1A_MATCH masks (empty ones included) are issued; each
// matched board then sends a packet of 1-10 random words, with random gaps and
// out of step with the other boards. A reference model builds the expected
// DDU packet: 9xxx words (L1A number, match mask, CRATEID), four Axxx words,
// the ALCT, OTMB and DCFEB 1-7 packets in that order, F words (L1A number,
// word count) and four Exxx words. The output stream is compared word by
// word, ddu_last must mark each packet's end, pkt_stored / pkt_shipped are
// counted per board, and the available-packet counts must return to 0.
module tb_ddu_builder;
  import odmb_pkg::*;

  logic clk = 0, rst = 1, l1a = 0;
  logic [9:1] match = 0, dv = 0, pkt_stored, pkt_shipped;
  logic [23:0] l1a_counter = 0;
  logic [9:1][17:0] din = '0;
  logic [15:0] ddu_data, otmb_avail, alct_avail;
  logic ddu_valid, ddu_last, ddu_pkt;
  int checks = 0, failures = 0, n_st = 0, n_sh = 0, n_pkt = 0, n_words_exp = 0;
  logic [17:0] bq [10][$];
  logic [15:0] exp_q [$];
  logic exp_last [$];

  always #5 clk = !clk;

  ddu_builder #(.DATA_DEPTH(64), .EV_DEPTH(8)) dut (.clk, .rst, .l1a, .l1a_match(match), .l1a_counter,
    .crateid(7'h2B), .din, .dv, .ddu_data, .ddu_valid, .ddu_last, .ddu_pkt, .pkt_stored,
    .pkt_shipped, .otmb_avail, .alct_avail);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // board senders
  for (genvar b = 1; b <= 9; b++) begin : g_send
    always @(negedge clk) begin
      dv[b] = 0;
      if (bq[b].size() > 0 && $urandom % 3 != 0) begin
        dv[b] = 1; din[b] = bq[b].pop_front();
      end
    end
  end

  always @(negedge clk) if (!rst) begin
    n_st += $countones(pkt_stored); n_sh += $countones(pkt_shipped); n_pkt += ddu_pkt;
    if (ddu_valid) begin
      if (exp_q.size() == 0) check(0, "unexpected word");
      else begin
        logic [15:0] w; logic l;
        w = exp_q.pop_front(); l = exp_last.pop_front();
        check(ddu_data == w && ddu_last == l, $sformatf("word %h/%b want %h/%b", ddu_data, ddu_last, w, l));
      end
    end
  end

  task automatic put(input logic [15:0] w, input logic l);
    exp_q.push_back(w); exp_last.push_back(l); n_words_exp++;
  endtask

  initial begin
    logic [9:1] m;
    int order [9] = '{9, 8, 1, 2, 3, 4, 5, 6, 7};
    int nstored = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int e = 1; e <= 30; e++) begin
      m = 9'($urandom);
      if (e == 4) m = '0;
      if (e == 5) m = '1;
      // L1A
      l1a = 1; match = m; l1a_counter = 24'(e * 4099);
      @(negedge clk);
      l1a = 0; match = 0;
      // expected packet
      begin
        int wc;
        wc = 0;
        put({4'h9, l1a_counter[11:0]}, 0); put({4'h9, l1a_counter[23:12]}, 0);
        put({4'h9, 3'd0, m}, 0); put({4'h9, 5'd0, 7'h2B}, 0);
        for (int k = 0; k < 4; k++) put({4'hA, 12'(k)}, 0);
        wc = 8;
        foreach (order[i]) if (m[order[i]]) begin
          int len;
          len = 1 + $urandom % 10;
          for (int k = 0; k < len; k++) begin
            logic [17:0] w;
            w = {(k == len - 1), 1'b0, 16'($urandom)};
            bq[order[i]].push_back(w);
            put(w[15:0], 0); wc++;
          end
          nstored++;
        end
        put({4'hF, l1a_counter[11:0]}, 0); put({4'hF, 12'(wc + 8)}, 0);
        put(16'hF002, 0); put(16'hF003, 0);
        for (int k = 0; k < 4; k++) put({4'hE, 12'(k)}, k == 3);
      end
      repeat ($urandom % 40) @(negedge clk);
      while (exp_q.size() > 60) @(negedge clk);
    end
    repeat (2000) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d words not sent", exp_q.size()));
    check(n_pkt == 30, $sformatf("packets %0d", n_pkt));
    check(n_st == nstored && n_sh == nstored, $sformatf("stored %0d shipped %0d want %0d", n_st, n_sh, nstored));
    check(otmb_avail == 0 && alct_avail == 0, "available counts back to 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
