// tb_testfifos: fills, reads, counts and resets the device 5 test FIFOs.
//
// With DEPTH shrunk to 16 words, random words are written into every FIFO.
// The testbench checks the word counts (5Z0C, and 500C for the selected
// DCFEB FIFO), reads words back in order (5Z00 / 5000) against a queue per
// FIFO, that a full FIFO drops words (count stays 16), that an empty FIFO
// reads 0, the selection read-back (5010), the per-FIFO reset (5Z20) and the
// DCFEB reset mask (5020), and that a word read takes two cycles.
module tb_testfifos;
  import odmb_pkg::*;

  localparam int DEPTH = 16;
  logic clk = 0, rst = 1, strobe = 0, dtack;
  vme_cmd_t req;
  logic [15:0] rdata;
  logic [12:0] wr_en;
  logic [12:0][17:0] wr_data;
  int checks = 0, failures = 0;
  logic [17:0] q [13][$];

  always #5 clk = !clk;

  testfifos #(.DEPTH(DEPTH)) dut (.clk, .rst, .strobe, .req, .rdata, .dtack, .wr_en, .wr_data);

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

  task automatic push(input int f, input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      wr_en = '0; wr_en[f] = 1'b1; wr_data[f] = 18'($urandom);
      if (q[f].size() < DEPTH) q[f].push_back(wr_data[f]);
    end
    @(negedge clk) wr_en = '0;
  endtask

  // VME command prefix of FIFO index f (DCFEB FIFOs through the selection)
  function automatic logic [3:0] zof(input int f);
    return (f < 7) ? 4'd0 : 4'(f - 6);
  endfunction

  initial begin
    logic [15:0] rd;
    int cyc, n;
    req = '0; wr_en = '0; wr_data = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 13; f++) push(f, (f == 3) ? 20 : 3 + f);
    for (int f = 0; f < 13; f++) begin
      if (f < 7) access(1, 12'h010, 16'(1 << f), rd, cyc);
      access(0, {zof(f), 8'h0C}, 16'h0, rd, cyc);
      check(rd == 16'(q[f].size()), $sformatf("count fifo %0d: %0d want %0d", f, rd, q[f].size()));
      n = q[f].size();
      for (int k = 0; k < n - 1; k++) begin
        logic [17:0] w;
        w = q[f].pop_front();
        access(0, {zof(f), 8'h00}, 16'h0, rd, cyc);
        check(rd == w[15:0], $sformatf("fifo %0d word %0d: %h want %h", f, k, rd, w[15:0]));
        check(cyc == 2, "read latency");
      end
    end
    access(0, 12'h010, 16'h0, rd, cyc);
    check(rd == 16'h0040, "selection read-back");
    // FIFO 5 (OTMB) reset by 5520, FIFO Z=1 untouched
    access(1, 12'h520, 16'h0, rd, cyc);
    access(0, 12'h50C, 16'h0, rd, cyc);
    check(rd == 0, "OTMB FIFO reset");
    access(0, 12'h10C, 16'h0, rd, cyc);
    check(rd == 1, "PC TX FIFO kept");
    // DCFEB mask reset: clear DCFEB 1 and 2, keep 3
    push(0, 2); push(1, 2); push(2, 2);
    access(1, 12'h020, 16'h0003, rd, cyc);
    access(1, 12'h010, 16'h0001, rd, cyc); access(0, 12'h00C, 16'h0, rd, cyc);
    check(rd == 0, "DCFEB 1 reset");
    access(1, 12'h010, 16'h0004, rd, cyc); access(0, 12'h00C, 16'h0, rd, cyc);
    check(rd == 3, $sformatf("DCFEB 3 kept %0d", rd));
    // empty FIFO reads 0
    access(0, 12'h500, 16'h0, rd, cyc);
    check(rd == 0, "empty read");
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
