// odmb_counters: the monitoring counters read with R 3YZC (ODMB_DATA).
//
// Counters of CW bits, wrapping, cleared by reset, for the boards 1-7 (DCFEB),
// 8 (OTMB) and 9 (ALCT). The selection YZ picks the value:
//   3A / 3B  L1A_COUNTER bits 23:16 / 15:0
//   21-29    L1A_MATCHes sent to board 1-9
//   31-37    gap, in bunch crossings, between the last LCT of DCFEB 1-7 and
//            the latest L1A
//   41-49    packets stored for board 1-9
//   4A / 4B  packets sent to the DDU / to the PC
//   51-59    packets shipped to DDU and PC for board 1-9
//   61-67    packets received with good CRC from DCFEB 1-7
//   71-77    LCTs of DCFEB 1-7
//   78 / 79  available OTMB / ALCT packets (passed through)
// Every other selection reads 0. Event inputs are one-cycle pulses. The gap
// counter of a DCFEB restarts at 0 with each of its LCTs, counts crossings
// (saturating) and is captured at each L1A. data is combinational from the
// registered counters. The selection codes are the board's; widths, wrapping
// and the exact gap definition are this design's choices.
module odmb_counters
  import odmb_pkg::*;
#(
  parameter int CW = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [7:0]       sel,
  output logic [15:0]      data,
  input  logic [23:0]      l1a_counter,
  input  logic             l1a,
  input  logic [9:1]       l1a_match,
  input  logic [NCFEB:1]   lct,
  input  logic [9:1]       pkt_stored,
  input  logic [9:1]       pkt_shipped,
  input  logic             ddu_pkt,
  input  logic             pc_pkt,
  input  logic [NCFEB:1]   good_crc,
  input  logic [15:0]      otmb_avail,
  input  logic [15:0]      alct_avail
);

  logic [CW-1:0] n_match  [1:9];
  logic [CW-1:0] n_stored [1:9];
  logic [CW-1:0] n_ship   [1:9];
  logic [CW-1:0] n_crc    [1:NCFEB];
  logic [CW-1:0] n_lct    [1:NCFEB];
  logic [CW-1:0] since    [1:NCFEB];
  logic [CW-1:0] gap      [1:NCFEB];
  logic [CW-1:0] n_ddu, n_pc;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i <= 9; i++) begin n_match[i] <= '0; n_stored[i] <= '0; n_ship[i] <= '0; end
      for (int i = 1; i <= NCFEB; i++) begin n_crc[i] <= '0; n_lct[i] <= '0; since[i] <= '1; gap[i] <= '0; end
      n_ddu <= '0; n_pc <= '0;
    end else begin
      for (int i = 1; i <= 9; i++) begin
        if (l1a_match[i])   n_match[i]  <= n_match[i] + 1'b1;
        if (pkt_stored[i])  n_stored[i] <= n_stored[i] + 1'b1;
        if (pkt_shipped[i]) n_ship[i]   <= n_ship[i] + 1'b1;
      end
      for (int i = 1; i <= NCFEB; i++) begin
        if (good_crc[i]) n_crc[i] <= n_crc[i] + 1'b1;
        if (lct[i]) begin
          n_lct[i] <= n_lct[i] + 1'b1;
          since[i] <= '0;
        end else if (since[i] != '1) since[i] <= since[i] + 1'b1;
        if (l1a) gap[i] <= lct[i] ? '0 : ((since[i] != '1) ? since[i] + 1'b1 : since[i]);
      end
      if (ddu_pkt) n_ddu <= n_ddu + 1'b1;
      if (pc_pkt)  n_pc  <= n_pc + 1'b1;
    end
  end

  always_comb begin
    logic [3:0] y, z;
    y = sel[7:4];
    z = sel[3:0];
    data = '0;
    unique case (y)
      4'h2: if (z >= 4'd1 && z <= 4'd9) data = 16'(n_match[z]);
      4'h3: if (z == 4'hA) data = {8'd0, l1a_counter[23:16]};
            else if (z == 4'hB) data = l1a_counter[15:0];
            else if (z >= 4'd1 && 32'(z) <= NCFEB) data = 16'(gap[z]);
      4'h4: if (z >= 4'd1 && z <= 4'd9) data = 16'(n_stored[z]);
            else if (z == 4'hA) data = 16'(n_ddu);
            else if (z == 4'hB) data = 16'(n_pc);
      4'h5: if (z >= 4'd1 && z <= 4'd9) data = 16'(n_ship[z]);
      4'h6: if (z >= 4'd1 && 32'(z) <= NCFEB) data = 16'(n_crc[z]);
      4'h7: if (z >= 4'd1 && 32'(z) <= NCFEB) data = 16'(n_lct[z]);
            else if (z == 4'h8) data = otmb_avail;
            else if (z == 4'h9) data = alct_avail;
      default: ;
    endcase
  end

endmodule
