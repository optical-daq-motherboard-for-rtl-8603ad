// tb_testfifos_capacity: capacity of the test FIFOs at their full size.
//
// The board's test FIFOs hold up to 2,000 18-bit words (36 kb). With the
// default DEPTH of 2048, this testbench writes 2100 words into the DDU TX
// FIFO (5300) and 2100 into DCFEB 4's FIFO (selected through 5010, read
// through 5000), one word per cycle as a data stream would arrive. It then
// checks that each count reads 2048, i.e. that at least the 2,000 words of the
// specification fit and the surplus is dropped. Next it reads every word back
// over VME against the stored copy, in order, and checks that both counts end
// at 0 and an empty FIFO reads 0.
module tb_testfifos_capacity;
  import odmb_pkg::*;

  localparam int DEPTH = 2048;
  localparam int NWR   = 2100;
  logic clk = 0, rst = 1, strobe = 0, dtack;
  vme_cmd_t req;
  logic [15:0] rdata;
  logic [12:0] wr_en;
  logic [12:0][17:0] wr_data;
  int checks = 0, failures = 0;
  logic [17:0] q [13][$];

  always #5 clk = !clk;

  testfifos dut (.clk, .rst, .strobe, .req, .rdata, .dtack, .wr_en, .wr_data);

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
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [15:0] rd;
    int errs;
    req = '0; wr_en = '0; wr_data = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // both streams at once, one word per cycle each
    for (int k = 0; k < NWR; k++) begin
      @(negedge clk);
      wr_en = '0; wr_en[9] = 1'b1; wr_en[3] = 1'b1;
      wr_data[9] = 18'($urandom); wr_data[3] = 18'($urandom);
      if (q[9].size() < DEPTH) q[9].push_back(wr_data[9]);
      if (q[3].size() < DEPTH) q[3].push_back(wr_data[3]);
    end
    @(negedge clk) wr_en = '0;
    access(1, 12'h010, 16'h0008, rd);             // select DCFEB 4
    access(0, 12'h30C, 16'h0, rd);
    check(rd == DEPTH, $sformatf("DDU TX count %0d", rd));
    check(rd >= 2000, "DDU TX holds 2,000 words");
    access(0, 12'h00C, 16'h0, rd);
    check(rd == DEPTH, $sformatf("DCFEB 4 count %0d", rd));
    check(rd >= 2000, "DCFEB 4 FIFO holds 2,000 words");
    for (int f = 0; f < 13; f++) if (f != 3 && f != 9) begin
      access(0, (f < 7) ? 12'h00C : {4'(f - 6), 8'h0C}, 16'h0, rd);
      // the DCFEB commands read the selected FIFO (4), others must be empty
      if (f >= 7) check(rd == 0, $sformatf("FIFO %0d untouched: %0d", f, rd));
    end
    errs = 0;
    for (int k = 0; k < DEPTH; k++) begin
      access(0, 12'h300, 16'h0, rd);
      if (rd != q[9][k][15:0]) errs++;
    end
    check(errs == 0, $sformatf("DDU TX read-back: %0d wrong words", errs));
    errs = 0;
    for (int k = 0; k < DEPTH; k++) begin
      access(0, 12'h000, 16'h0, rd);
      if (rd != q[3][k][15:0]) errs++;
    end
    check(errs == 0, $sformatf("DCFEB 4 read-back: %0d wrong words", errs));
    access(0, 12'h30C, 16'h0, rd); check(rd == 0, $sformatf("DDU TX count after reading %0d", rd));
    access(0, 12'h00C, 16'h0, rd); check(rd == 0, $sformatf("DCFEB 4 count after reading %0d", rd));
    access(0, 12'h300, 16'h0, rd); check(rd == 0, "empty FIFO reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
