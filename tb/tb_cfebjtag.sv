// tb_cfebjtag: reads the 32-bit usercode of DCFEB 3 through device 1.
//
// Seven behavioural TAPs with different usercodes hang on the DCFEB JTAG
// ports. The testbench follows the board's procedure: TAP reset (1018),
// select DCFEB 3 (1020 <- 4), instruction 3C8 (191C), shift 16 bits with
// header (1F04), read TDO (1F14), shift 16 bits with tailer (1F08), read
// again. It checks both halves, the selection read-back (1024), that only the
// selected DCFEB saw TCK edges, and the number of cycles each shift takes
// (one TCK period of 2*TCK_HALF cycles per step).
// Then 300 random commands of every kind (shift with each framing,
// instruction shift, TAP reset) are checked TCK edge by TCK edge: the TMS
// sequence must match the one worked out here and TDI must carry the data
// LSB first.
module tb_cfebjtag;
  import odmb_pkg::*;

  localparam int TCK_HALF = 2;
  logic clk = 0, rst = 1, strobe = 0, dtack;
  vme_cmd_t req;
  logic [15:0] rdata;
  logic [6:0] tck, tdo;
  logic tms, tdi;
  int checks = 0, failures = 0;
  int tck_edges [7];

  always #5 clk = !clk;

  cfebjtag #(.TCK_HALF(TCK_HALF)) dut (.clk, .rst, .strobe, .req, .rdata, .dtack,
    .dcfeb_tck(tck), .dcfeb_tms(tms), .dcfeb_tdi(tdi), .dcfeb_tdo(tdo));

  for (genvar i = 0; i < 7; i++) begin : g_tap
    jtag_tap_model #(.USERCODE({16'h0101, 16'hdb00 + 16'(i + 1)})) u_tap (
      .tck(tck[i]), .tms, .tdi, .tdo(tdo[i]));
    initial tck_edges[i] = 0;
    always @(posedge tck[i]) tck_edges[i]++;
  end

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
  always @(posedge tck[2]) begin q_tms.push_back(tms); q_tdi.push_back(tdi); end

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
    access(1, 12'h020, 16'h007F, rd, cyc);       // all selected for the reset
    access(1, 12'h018, 16'h0, rd, cyc);          // TAP reset: 6 steps
    check(cyc >= 6*2*TCK_HALF && cyc <= 6*2*TCK_HALF + 3, $sformatf("reset cycles %0d", cyc));
    access(1, 12'h020, 16'h0004, rd, cyc);       // select DCFEB 3
    access(0, 12'h024, 16'h0, rd, cyc);
    check(rd == 16'h0004, $sformatf("select read %h", rd));
    for (int i = 0; i < 7; i++) tck_edges[i] = 0;
    access(1, 12'h91C, 16'h03C8, rd, cyc);       // 10-bit IR, header 4 + tailer 2
    check(cyc >= 16*2*TCK_HALF && cyc <= 16*2*TCK_HALF + 3, $sformatf("IR cycles %0d", cyc));
    access(1, 12'hF04, 16'h0, rd, cyc);          // 16 bits with header: 19 steps
    check(cyc >= 19*2*TCK_HALF && cyc <= 19*2*TCK_HALF + 3, $sformatf("DR cycles %0d", cyc));
    access(0, 12'hF14, 16'h0, rd, cyc);
    check(rd == 16'hdb03, $sformatf("usercode low %h", rd));
    access(1, 12'hF08, 16'h0, rd, cyc);          // 16 bits with tailer: 18 steps
    check(cyc >= 18*2*TCK_HALF && cyc <= 18*2*TCK_HALF + 3, $sformatf("DR2 cycles %0d", cyc));
    access(0, 12'hF14, 16'h0, rd, cyc);
    check(rd == 16'h0101, $sformatf("usercode high %h", rd));
    check(tck_edges[2] == 16 + 19 + 18, $sformatf("TCK edges DCFEB3 %0d", tck_edges[2]));
    check(tck_edges[0] == 0 && tck_edges[6] == 0, "unselected DCFEBs saw TCK");
    check(g_tap[2].u_tap.st == 1, "TAP of DCFEB 3 back in Run-Test/Idle");
    // an 8-bit shift without header/tailer after a data header lands in bits 15:8
    access(1, 12'h304, 16'h0, rd, cyc);           // 4 bits after header
    access(1, 12'h300, 16'h0, rd, cyc);           // 4 more bits, still in Shift-DR
    access(0, 12'h314, 16'h0, rd, cyc);
    check(rd[15:8] == 8'h03, $sformatf("partial shift %h", rd));
    random_shifts(300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
