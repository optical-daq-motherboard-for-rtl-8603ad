// tb_vmeconfregs: writes and reads back every device 4 register.
//
// Each register gets a random value; the read-back must equal the value cut
// to the register's width (LCT_L1A_DLY 6 bits, the delays 5 bits, CALLCT_DLY
// 4 bits, KILL bits 9:1, CRATEID 7 bits), the cfg output must show it, the
// firmware version must read 0101 and every access is acknowledged after one
// cycle.
module tb_vmeconfregs;
  import odmb_pkg::*;

  logic clk = 0, rst = 1, strobe = 0, dtack;
  vme_cmd_t req;
  logic [15:0] rdata;
  conf_regs_t cfg;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  vmeconfregs dut (.clk, .rst, .strobe, .req, .rdata, .dtack, .cfg);

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

  initial begin
    logic [15:0] rd, v, mask;
    int cyc;
    logic [11:0] addr [9] = '{12'h000, 12'h004, 12'h008, 12'h00C, 12'h010, 12'h014, 12'h018, 12'h01C, 12'h020};
    logic [15:0] msk  [9] = '{16'h3F, 16'h1F, 16'h1F, 16'h1F, 16'h1F, 16'h1F, 16'h0F, 16'h3FE, 16'h7F};
    logic [15:0] vals [9];
    req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 3; r++) begin
      foreach (addr[i]) begin
        vals[i] = 16'($urandom);
        access(1, addr[i], vals[i], rd, cyc);
        check(cyc == 1, "write latency");
      end
      foreach (addr[i]) begin
        access(0, addr[i], 16'h0, rd, cyc);
        check(rd == (vals[i] & msk[i]), $sformatf("reg %h read %h want %h", addr[i], rd, vals[i] & msk[i]));
      end
      check(cfg.lct_l1a_dly == vals[0][5:0] && cfg.kill == vals[7][9:1] && cfg.crateid == vals[8][6:0]
            && cfg.inj_dly == vals[4][4:0] && cfg.callct_dly == vals[6][3:0], "cfg outputs");
    end
    access(0, 12'h024, 16'h0, rd, cyc);
    check(rd == 16'h0101, $sformatf("firmware version %h", rd));
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
