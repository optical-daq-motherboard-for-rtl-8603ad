// tb_pc_builder: Ethernet wrapping of DDU packets.
//
// Packets of 1 to 50 random words are fed in with random gaps. Each frame
// must be: the four header words, the packet, zero padding up to a frame of
// 32 words, the word count and the three fixed trailer words, with
// dout_last on the final word. Frames are compared word by word and counted;
// the frame length is checked to be max(32, packet + 8).
module tb_pc_builder;
  logic clk = 0, rst = 1, dv = 0, dl = 0;
  logic [15:0] din = 0, dout;
  logic dout_valid, dout_last, pc_pkt;
  int checks = 0, failures = 0, n_pkt = 0, flen = 0, n_padded = 0;
  logic [15:0] exp_q [$];
  logic exp_last [$];
  int exp_len [$];

  always #5 clk = !clk;

  pc_builder #(.DEPTH(256)) dut (.clk, .rst, .din, .din_valid(dv), .din_last(dl),
    .dout, .dout_valid, .dout_last, .pc_pkt);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (!rst) begin
    n_pkt += pc_pkt;
    if (dout_valid) begin
      flen++;
      if (exp_q.size() == 0) check(0, "unexpected word");
      else begin
        logic [15:0] w; logic l;
        w = exp_q.pop_front(); l = exp_last.pop_front();
        check(dout == w && dout_last == l, $sformatf("word %h/%b want %h/%b", dout, dout_last, w, l));
      end
      if (dout_last) begin
        int el;
        el = exp_len.pop_front();
        check(flen == el, $sformatf("frame length %0d want %0d", flen, el));
        flen = 0;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int p = 0; p < 25; p++) begin
      int len, tot;
      len = (p == 3) ? 24 : (p == 4) ? 25 : 1 + $urandom % 50;
      for (int k = 0; k < 4; k++) begin exp_q.push_back(16'(k)); exp_last.push_back(0); end
      tot = 4;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        dv = 1; din = 16'($urandom); dl = (k == len - 1);
        exp_q.push_back(din); exp_last.push_back(0); tot++;
        if ($urandom % 4 == 0) begin @(negedge clk); dv = 0; end
      end
      @(negedge clk) dv = 0; dl = 0;
      if (tot + 4 < 32) n_padded++;
      while (tot + 4 < 32) begin exp_q.push_back(16'h0); exp_last.push_back(0); tot++; end
      exp_q.push_back(16'(len)); exp_last.push_back(0);
      exp_q.push_back(16'hFFFD); exp_last.push_back(0);
      exp_q.push_back(16'hFFFE); exp_last.push_back(0);
      exp_q.push_back(16'hFFFF); exp_last.push_back(1);
      exp_len.push_back(tot + 4);
      repeat ($urandom % 30) @(negedge clk);
    end
    repeat (1000) @(negedge clk);
    check(exp_q.size() == 0, "all frames sent");
    check(n_pkt == 25, $sformatf("frames %0d", n_pkt));
    check(n_padded > 0, "some frames padded");
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
