// tb_lvdbmon: device 8 power-on and ADC select registers and an ADC read.
//
// An ADC model on the serial lines receives the 8 control bits and answers
// with {control byte, ADC number, 5'h15}, MSB first. The testbench checks the
// control byte seen by the ADC, that only the selected chip select was low,
// the result read with 8004, the register read-backs and the transfer time
// (8 + RES_BITS SCLK periods of 2*SCLK_HALF cycles).
module tb_lvdbmon;
  import odmb_pkg::*;

  localparam int SCLK_HALF = 2;
  logic clk = 0, rst = 1, strobe = 0, dtack;
  vme_cmd_t req;
  logic [15:0] rdata;
  logic [6:0] cs_n;
  logic sclk, din, dout;
  logic [7:0] pon;
  int checks = 0, failures = 0;
  // ADC model
  logic [7:0] rx;
  logic [15:0] tx;
  int nb = 0;
  logic [6:0] cs_seen;

  always #5 clk = !clk;

  lvdbmon #(.SCLK_HALF(SCLK_HALF)) dut (.clk, .rst, .strobe, .req, .rdata, .dtack, .adc_cs_n(cs_n),
    .adc_sclk(sclk), .adc_din(din), .adc_dout(dout), .pon);

  always @(posedge sclk) if (cs_n != '1) begin
    cs_seen = cs_seen | ~cs_n;
    if (nb < 8) rx = {rx[6:0], din};
    nb++;
    if (nb == 8) begin
      int a;
      a = 0;
      for (int i = 0; i < 7; i++) if (!cs_n[i]) a = i;
      tx = {rx, 3'(a), 5'h15};
    end
  end
  always @(negedge sclk) if (nb >= 8) begin dout = tx[15]; tx = {tx[14:0], 1'b0}; end

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
    logic [15:0] rd;
    int cyc;
    logic [7:0] cb;
    req = '0; dout = 0; rx = '0; tx = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    access(0, 12'h014, 16'h0, rd, cyc);
    check(rd == 16'h00FF && pon == 8'hFF, "power-on reset value");
    access(1, 12'h010, 16'h005A, rd, cyc); access(0, 12'h014, 16'h0, rd, cyc);
    check(rd == 16'h005A && pon == 8'h5A, "power-on register");
    for (int a = 0; a < 7; a += 3) begin
      access(1, 12'h020, 16'(a), rd, cyc); access(0, 12'h024, 16'h0, rd, cyc);
      check(rd == 16'(a), "ADC select read-back");
      cb = 8'($urandom); nb = 0; cs_seen = '0;
      access(1, 12'h000, {8'h0, cb}, rd, cyc);
      check(cyc >= 24*2*SCLK_HALF && cyc <= 24*2*SCLK_HALF + 3, $sformatf("transfer cycles %0d", cyc));
      check(rx == cb, $sformatf("control byte %h want %h", rx, cb));
      check(cs_seen == 7'(1 << a), $sformatf("chip selects %b", cs_seen));
      access(0, 12'h004, 16'h0, rd, cyc);
      check(rd == {cb, 3'(a), 5'h15}, $sformatf("ADC result %h", rd));
    end
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
