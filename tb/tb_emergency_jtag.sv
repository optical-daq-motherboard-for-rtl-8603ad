// tb_emergency_jtag: reads the FPGA usercode bit by bit through address FFFC.
//
// Replays the board's example: five TMS=1 and one TMS=0 to reach
// Run-Test/Idle, the TMS/TDI writes that load instruction 3C8, then to
// Shift-DR and 32 times "write 0, read bit". The 32 bits read must form the
// usercode 0101dbdb of the behavioural TAP; each bit is also checked as it
// is read. Every write must give exactly one TCK rising edge with TMS and TDI
// equal to data bits 0 and 1 at that edge (checked for the whole run and for
// 64 writes of random data), reads must leave TCK alone and return only
// bit 0, and another command of device F must be acknowledged with 0.
module tb_emergency_jtag;
  import odmb_pkg::*;

  logic clk = 0, rst = 1, strobe = 0, dtack;
  vme_cmd_t req;
  logic [15:0] rdata;
  logic tck, tms, tdi, tdo;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  // every rising TCK: count it and record TMS/TDI
  int n_tck = 0;
  logic tms_at_edge, tdi_at_edge;
  always @(posedge tck) begin n_tck++; tms_at_edge = tms; tdi_at_edge = tdi; end

  emergency_jtag dut (.clk, .rst, .strobe, .req, .rdata, .dtack, .tck, .tms, .tdi, .tdo);
  jtag_tap_model #(.USERCODE(USERCODE)) u_tap (.tck, .tms, .tdi, .tdo);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic access(input logic wr, input logic [15:0] wd, output logic [15:0] rd,
                        input logic [11:0] cmd = 12'hFFC);
    int n0 = n_tck;
    req = '{write: wr, cmd: cmd, wdata: wd};
    @(negedge clk) strobe = 1;
    @(negedge clk) strobe = 0;
    while (!dtack) @(negedge clk);
    rd = rdata;
    @(negedge clk);
    if (cmd != 12'hFFC) return;
    if (wr) begin
      check(n_tck == n0 + 1, $sformatf("one TCK per write (%0d)", n_tck - n0));
      check(tms_at_edge == wd[0] && tdi_at_edge == wd[1],
            $sformatf("TMS/TDI %b%b for data %h", tdi_at_edge, tms_at_edge, wd));
    end else begin
      check(n_tck == n0, "no TCK on a read");
      check(rd[15:1] == 0, $sformatf("read data %h", rd));
    end
  endtask

  initial begin
    logic [15:0] rd;
    logic [31:0] code;
    // TMS/TDI values of the example, from Run-Test/Idle to Shift-DR
    logic [1:0] seq [19] = '{1, 1, 0, 0, 0, 0, 0, 2, 0, 0, 2, 2, 2, 3, 1, 0, 1, 0, 0};
    req = '0;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (5) access(1, 16'd1, rd);
    access(1, 16'd0, rd);
    check(u_tap.st == 1, "Run-Test/Idle");
    foreach (seq[i]) access(1, 16'(seq[i]), rd);
    check(u_tap.ir == 10'h3C8, $sformatf("IR %h", u_tap.ir));
    check(u_tap.st == 4, "in Shift-DR");
    for (int b = 0; b < 32; b++) begin
      access(0, 16'd0, rd);
      code[b] = rd[0];
      check(rd[0] == USERCODE[b], $sformatf("usercode bit %0d", b));
      access(1, 16'd0, rd);
    end
    check(code == USERCODE, $sformatf("usercode %h", code));
    // random TMS/TDI values, each must appear at its TCK edge
    for (int n = 0; n < 64; n++) access(1, 16'($urandom), rd);
    // another command of device F
    access(0, 16'd0, rd, 12'h123);
    check(rd == 0, $sformatf("other command of device F reads %h", rd));
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
