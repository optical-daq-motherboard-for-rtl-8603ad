// tb_vme_command: VME cycles through the command decoder.
//
// A VME master drives AS*/DS*/WRITE*, address and data; simple device models
// answer a strobe of device d after d+1 cycles with data {d, cmd}. The
// testbench checks, for random addresses: exactly one strobe, on the device in
// address bits 15:12; the command, write flag and data handed over; the data
// on vme_dout while DTACK* is low; DTACK* released after DS* rises; absent
// devices answered with 0; one cmd_seen pulse per cycle; a device that never
// answers is acknowledged with 0 after TIMEOUT cycles.
module tb_vme_command;
  import odmb_pkg::*;

  logic clk = 0, rst = 1;
  logic as_n = 1, ds_n = 1, write_n = 1, dtack_n, cmd_seen;
  logic [15:0] addr, din, dout, dev_strobe, dev_dtack;
  logic [15:0][15:0] dev_rdata;
  vme_cmd_t req;
  int checks = 0, failures = 0, strobes = 0, seen = 0;
  int cnt [16];
  logic [15:0] last_strobe;

  always #5 clk = !clk;

  vme_command #(.TIMEOUT(64)) dut (.clk, .rst, .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n),
    .vme_addr(addr), .vme_din(din), .vme_dout(dout), .vme_dtack_n(dtack_n),
    .dev_strobe, .req, .dev_dtack, .dev_rdata, .cmd_seen);

  // device models
  always @(posedge clk) begin
    dev_dtack <= '0;
    for (int d = 0; d < 16; d++) begin
      if (dev_strobe[d]) cnt[d] = d + 1;
      else if (cnt[d] > 0) begin
        cnt[d]--;
        if (cnt[d] == 0 && req.cmd != 12'hBAD) begin dev_dtack[d] <= 1'b1; dev_rdata[d] <= {4'(d), req.cmd}; end
      end
    end
    if (dev_strobe != 0) begin strobes++; last_strobe = dev_strobe; end
    if (cmd_seen) seen++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cycle(input logic wr, input logic [15:0] a, input logic [15:0] d, output logic [15:0] rd);
    int t;
    @(negedge clk);
    addr = a; din = d; write_n = !wr;
    @(negedge clk) as_n = 0;
    @(negedge clk) ds_n = 0;
    t = 0;
    while (dtack_n && t < 200) begin @(negedge clk); t++; end
    check(t < 200, "DTACK timeout");
    rd = dout;
    repeat (3) @(negedge clk);
    check(!dtack_n, "DTACK held while DS low");
    ds_n = 1; as_n = 1;
    t = 0;
    while (!dtack_n && t < 20) begin @(negedge clk); t++; end
    check(dtack_n, "DTACK released");
  endtask

  initial begin
    logic [15:0] a, d, rd;
    logic [15:0] present;
    int s0;
    present = 16'h813E;
    foreach (cnt[i]) cnt[i] = 0;
    dev_rdata = '0; addr = '0; din = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 40; k++) begin
      a = 16'($urandom); d = 16'($urandom);
      s0 = strobes;
      cycle(k % 2, a, d, rd);
      if (present[a[15:12]]) begin
        check(strobes == s0 + 1 && last_strobe == 16'(1 << a[15:12]), $sformatf("strobe for %h", a));
        check(req.cmd == a[11:0] && req.write == (k % 2) && req.wdata == d, "command fields");
        check(rd == {a[15:12], a[11:0]}, $sformatf("read data %h for %h", rd, a));
      end else begin
        check(strobes == s0, "no strobe for absent device");
        check(rd == 0, "absent device reads 0");
      end
    end
    check(seen == 40, $sformatf("cmd_seen %0d", seen));
    // a device that never answers: the time-out acknowledges with 0
    begin
      int t0;
      t0 = $time;
      cycle(0, 16'h3BAD, 16'h0, rd);
      check(rd == 0, "time-out data");
      check(($time - t0) / 10 >= 64 && ($time - t0) / 10 < 64 + 16, $sformatf("time-out after %0d cycles", ($time - t0) / 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
