// tb_odmb_counters: the R 3YZC monitoring values against a reference model.
//
// Random event pulses (L1A, L1A_MATCH, LCT, packets stored/shipped, DDU/PC
// packets, good CRC) are applied for some hundred cycles while the reference
// counts them; then every selection YZ from 00 to FF is read and compared:
// counts for 21-29, 41-49, 4A, 4B, 51-59, 61-67, 71-77, the gap between the
// last LCT and the latest L1A for 31-37, the L1A_COUNTER halves for 3A/3B,
// the available packets for 78/79, and 0 for every other code.
module tb_odmb_counters;
  import odmb_pkg::*;

  logic clk = 0, rst = 1;
  logic [7:0] sel = 0;
  logic [15:0] data, otmb_avail, alct_avail;
  logic [23:0] l1a_counter;
  logic l1a = 0, ddu_pkt = 0, pc_pkt = 0;
  logic [9:1] l1a_match = 0, pkt_stored = 0, pkt_shipped = 0;
  logic [7:1] lct = 0, good_crc = 0;
  int checks = 0, failures = 0;
  int m_match[10], m_st[10], m_sh[10], m_crc[8], m_lct[8], m_since[8], m_gap[8];
  int m_ddu = 0, m_pc = 0;

  always #5 clk = !clk;

  odmb_counters dut (.clk, .rst, .sel, .data, .l1a_counter, .l1a, .l1a_match, .lct, .pkt_stored,
    .pkt_shipped, .ddu_pkt, .pc_pkt, .good_crc, .otmb_avail, .alct_avail);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int expect_of(input logic [7:0] s);
    int y, z;
    y = s[7:4]; z = s[3:0];
    if (y == 2 && z >= 1 && z <= 9) return m_match[z] & 16'hFFFF;
    if (y == 3 && z == 10) return l1a_counter[23:16];
    if (y == 3 && z == 11) return l1a_counter[15:0];
    if (y == 3 && z >= 1 && z <= 7) return m_gap[z];
    if (y == 4 && z >= 1 && z <= 9) return m_st[z];
    if (y == 4 && z == 10) return m_ddu;
    if (y == 4 && z == 11) return m_pc;
    if (y == 5 && z >= 1 && z <= 9) return m_sh[z];
    if (y == 6 && z >= 1 && z <= 7) return m_crc[z];
    if (y == 7 && z >= 1 && z <= 7) return m_lct[z];
    if (y == 7 && z == 8) return otmb_avail;
    if (y == 7 && z == 9) return alct_avail;
    return 0;
  endfunction

  initial begin
    for (int i = 0; i < 10; i++) begin m_match[i] = 0; m_st[i] = 0; m_sh[i] = 0; end
    for (int i = 0; i < 8; i++) begin m_crc[i] = 0; m_lct[i] = 0; m_since[i] = 65535; m_gap[i] = 0; end
    l1a_counter = 24'h5A1234; otmb_avail = 16'd3; alct_avail = 16'd4;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 600; c++) begin
      l1a = ($urandom % 5 == 0);
      l1a_match = l1a ? 9'($urandom) : '0;
      lct = ($urandom % 6 == 0) ? 7'($urandom) : '0;
      pkt_stored = 9'($urandom); pkt_shipped = 9'($urandom);
      good_crc = 7'($urandom); ddu_pkt = $urandom % 2; pc_pkt = $urandom % 3 == 0;
      for (int i = 1; i <= 9; i++) begin
        m_match[i] += l1a_match[i]; m_st[i] += pkt_stored[i]; m_sh[i] += pkt_shipped[i];
      end
      for (int i = 1; i <= 7; i++) begin
        m_crc[i] += good_crc[i]; m_lct[i] += lct[i];
        if (l1a) m_gap[i] = lct[i] ? 0 : ((m_since[i] < 65535) ? m_since[i] + 1 : 65535);
        if (lct[i]) m_since[i] = 0; else if (m_since[i] < 65535) m_since[i]++;
      end
      m_ddu += ddu_pkt; m_pc += pc_pkt;
      @(negedge clk);
    end
    l1a = 0; l1a_match = 0; lct = 0; pkt_stored = 0; pkt_shipped = 0; good_crc = 0; ddu_pkt = 0; pc_pkt = 0;
    @(negedge clk);
    for (int s = 0; s < 256; s++) begin
      sel = 8'(s);
      #1;
      check(int'(data) == expect_of(8'(s)), $sformatf("YZ=%h read %0d want %0d", s, data, expect_of(8'(s))));
    end
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
