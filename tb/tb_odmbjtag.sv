// tb_odmbjtag: reads the FPGA usercode through device 2.
//
// A behavioural TAP with usercode 0101dbdb is on the chain. Following the
// board's procedure (2018 reset, 291C <- 3C8, 2F04, 2F14, 2F08, 2F14) the
// testbench expects DBDB then 0101, checks the cycle count of a 16-bit
// shift with header (19 TCK periods) and that the TAP ends in Run-Test/Idle.
// Then 300 random commands of every kind (shift with each framing,
// instruction shift, TAP reset) are checked TCK edge by TCK edge: the TMS
// sequence must match the one worked out here and TDI must carry the data
// LSB first.
module tb_odmbjtag;
  import odmb_pkg::*;

  localparam int TCK_HALF = 3;
  logic clk = 0, rst = 1, strobe = 0, dtack;
  vme_cmd_t req;
  logic [15:0] rdata;
  logic tck, tms, tdi, tdo;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  odmbjtag #(.TCK_HALF(TCK_HALF)) dut (.clk, .rst, .strobe, .req, .rdata, .dtack, .tck, .tms, .tdi, .tdo);
  jtag_tap_model #(.USERCODE(USERCODE)) u_tap (.tck, .tms, .tdi, .tdo);

  task automatic access(input logic wr, input logic [11:0] cmd, input logic [15:0] wd,
                        output logic [15:0] rd, output int cyc);
    req = '{write: wr, cmd: cmd, wdata: wd};
    @(negedge clk) strobe = 1;
    @(negedge clk) strobe = 0;
    cyc = 1;
    while (!dtack) begin @(negedge clk); cyc++; end
    rd = rdata;
    @(negedge clk);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask


  // TMS/TDI seen at each rising TCK of the monitored TAP
  logic q_tms[$], q_tdi[$];
  always @(posedge tck) begin q_tms.push_back(tms); q_tdi.push_back(tdi); end

  // Random commands of every kind: the TMS sequence must be exactly the
  // header, Y+1 shift bits (TMS high on the last one with a tailer) and the
  // tailer, or the reset sequence, and TDI must carry the data LSB first.
  task automatic random_shifts(input int n);
    logic [15:0] rd;
    int cyc;
    for (int k = 0; k < n; k++) begin
      logic [3:0]  y = 4'($urandom);
      logic [15:0] d = 16'($urandom);
      int          m = $urandom_range(0, 5);
      logic [7:0]  code [6] = '{8'h00, 8'h04, 8'h08, 8'h0C, 8'h1C, 8'h18};
      logic        exp_tms [$];
      int          first;
      bit          ok_tms = 1, ok_tdi = 1;
      bit hdr = (m == 1 || m == 3 || m == 4), tlr = (m == 2 || m == 3 || m == 4);
      q_tms.delete(); q_tdi.delete();
      access(1, (m == 5) ? 12'h018 : {y, code[m]}, d, rd, cyc);
      if (m == 5) exp_tms = '{1, 1, 1, 1, 1, 0};
      else begin
        if (hdr) exp_tms = (m == 4) ? '{1, 1, 0, 0} : '{1, 0, 0};
        first = exp_tms.size();
        for (int i = 0; i <= int'(y); i++) exp_tms.push_back(tlr && i == int'(y));
        if (tlr) begin exp_tms.push_back(1); exp_tms.push_back(0); end
      end
      check(q_tms.size() == exp_tms.size(),
            $sformatf("command %0d Y=%0d: %0d TCK edges, expected %0d", m, y, q_tms.size(), exp_tms.size()));
      if (q_tms.size() == exp_tms.size()) begin
        foreach (exp_tms[i]) if (q_tms[i] != exp_tms[i]) ok_tms = 0;
        if (m != 5) for (int i = 0; i <= int'(y); i++) if (q_tdi[first + i] != d[i]) ok_tdi = 0;
      end
      check(ok_tms, $sformatf("TMS sequence of command %0d Y=%0d", m, y));
      check(ok_tdi, $sformatf("TDI bits of command %0d Y=%0d data %h", m, y, d));
    end
  endtask

  initial begin
    logic [15:0] rd;
    int cyc;
    req = '0;
    repeat (4) @(negedge clk);
    rst = 0;
    access(1, 12'h018, 16'h0, rd, cyc);
    check(u_tap.st == 1, "TAP in Run-Test/Idle after reset");
    access(1, 12'h91C, 16'h03C8, rd, cyc);
    check(u_tap.ir == 10'h3C8, $sformatf("IR %h", u_tap.ir));
    access(1, 12'hF04, 16'h0, rd, cyc);
    check(cyc >= 19*2*TCK_HALF && cyc <= 19*2*TCK_HALF + 3, $sformatf("DR cycles %0d", cyc));
    access(0, 12'hF14, 16'h0, rd, cyc);
    check(rd == 16'hdbdb, $sformatf("usercode low %h", rd));
    check(cyc <= 3, "read latency");
    access(1, 12'hF08, 16'h0, rd, cyc);
    access(0, 12'hF14, 16'h0, rd, cyc);
    check(rd == FW_VERSION, $sformatf("usercode high %h", rd));
    check(u_tap.st == 1, "TAP back in Run-Test/Idle");
    random_shifts(300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
