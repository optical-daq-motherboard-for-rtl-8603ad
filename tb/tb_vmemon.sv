// tb_vmemon: device 3 registers, auto-reset bits and the ODMB_DATA read.
//
// Checks that ODMB_CTRL, DCFEB_CTRL, TP_SEL, LOOPBACK and DIFFCTRL read back
// what was written (cut to width, auto-reset bits reading 0), that
// ODMB_CTRL[8] and DCFEB_CTRL[0..4] appear as one-cycle pulses while the
// other bits stay, and that R 3YZC drives the selection YZ and returns the
// data the counter block presents for it (here a function of YZ).
module tb_vmemon;
  import odmb_pkg::*;

  logic clk = 0, rst = 1, strobe = 0, dtack;
  vme_cmd_t req;
  logic [15:0] rdata, odmb_ctrl, tp_sel, odmb_data;
  logic [7:0] dcfeb_ctrl, odmb_data_sel;
  logic [2:0] loopback;
  logic [3:0] diffctrl;
  int checks = 0, failures = 0;
  int pulses_odmb8 = 0, pulses_dcfeb [8];
  int cyc_hi5 = 0;

  always #5 clk = !clk;

  vmemon dut (.clk, .rst, .strobe, .req, .rdata, .dtack, .odmb_ctrl, .dcfeb_ctrl, .tp_sel,
              .loopback, .diffctrl, .odmb_data_sel, .odmb_data);

  assign odmb_data = {odmb_data_sel, ~odmb_data_sel};

  always @(posedge clk) if (!rst) begin
    if (odmb_ctrl[8]) pulses_odmb8++;
    for (int i = 0; i < 8; i++) if (dcfeb_ctrl[i]) pulses_dcfeb[i]++;
  end

  task automatic access(input logic wr, input logic [11:0] cmd, input logic [15:0] wd,
                        output logic [15:0] rd);
    req = '{write: wr, cmd: cmd, wdata: wd};
    @(negedge clk) strobe = 1;
    @(negedge clk) strobe = 0;
    while (!dtack) @(negedge clk);
    rd = rdata;
    @(negedge clk);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [15:0] rd;
    logic [7:0] yz;
    req = '0;
    foreach (pulses_dcfeb[i]) pulses_dcfeb[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    access(1, 12'h000, 16'hFFFF, rd);
    access(0, 12'h000, 16'h0, rd);
    check(rd == 16'h1EFF, $sformatf("ODMB_CTRL read %h", rd));
    check(odmb_ctrl == 16'h1EFF, $sformatf("ODMB_CTRL out %h", odmb_ctrl));
    check(pulses_odmb8 == 1, $sformatf("ODMB_CTRL[8] pulses %0d", pulses_odmb8));
    access(1, 12'h010, 16'h00FF, rd);
    access(0, 12'h010, 16'h0, rd);
    check(rd == 16'h00E0, $sformatf("DCFEB_CTRL read %h", rd));
    for (int i = 0; i < 5; i++) check(pulses_dcfeb[i] == 1, $sformatf("DCFEB_CTRL[%0d] pulses %0d", i, pulses_dcfeb[i]));
    check(dcfeb_ctrl == 8'hE0, "DCFEB_CTRL levels");
    access(1, 12'h020, 16'hA5C3, rd); access(0, 12'h020, 16'h0, rd);
    check(rd == 16'hA5C3 && tp_sel == 16'hA5C3, "TP_SEL");
    access(1, 12'h100, 16'h0002, rd); access(0, 12'h100, 16'h0, rd);
    check(rd == 16'h0002 && loopback == 3'd2, "LOOPBACK");
    access(1, 12'h110, 16'h00FF, rd); access(0, 12'h110, 16'h0, rd);
    check(rd == 16'h000F && diffctrl == 4'hF, "DIFFCTRL");
    for (int k = 0; k < 8; k++) begin
      yz = 8'($urandom);
      access(0, {yz, 4'hC}, 16'h0, rd);
      check(rd == {yz, ~yz}, $sformatf("ODMB_DATA %h read %h", yz, rd));
    end
    access(1, 12'h000, 16'h0000, rd);
    check(odmb_ctrl == 16'h0, "ODMB_CTRL cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
