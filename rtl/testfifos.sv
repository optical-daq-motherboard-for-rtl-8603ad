// testfifos: VME device 5, test FIFOs.
//
// Thirteen FIFOs of DEPTH 18-bit words keep a copy of the data that passes
// through the board, for reading over VME:
//   index 0-6  DCFEB 1-7 data as it arrives
//   index 7    PC TX   (Ethernet-wrapped packets before transmission)   Z=1
//   index 8    PC RX                                                  Z=2
//   index 9    DDU TX  (DDU packets before transmission)              Z=3
//   index 10   DDU RX                                                 Z=4
//   index 11   OTMB data as it arrives                                Z=5
//   index 12   ALCT data as it arrives                                Z=6
// Commands:  R 5000 / 500C  read one word / word count of the selected DCFEB FIFO
//            W/R 5010       DCFEB FIFO selection, one bit per DCFEB (lowest set bit used)
//            W 5020         reset DCFEB FIFOs, one bit per FIFO
//            R 5Z00 / 5Z0C  read one word / word count of FIFO Z
//            W 5Z20         reset FIFO Z
// A read returns bits 15:0 of the word, two cycles after the strobe (the FIFO
// read port is registered); everything else is acknowledged after one cycle.
// A full FIFO drops further words; an empty one reads as 0. The command map
// and the 36 kb size (2048 x 18) are the board's; the read width, the
// selection coding and the full/empty behaviour are this design's choices.
module testfifos
  import odmb_pkg::*;
#(
  parameter int DEPTH = 2048,
  localparam int NF = 13,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               strobe,
  input  vme_cmd_t           req,
  output logic [15:0]        rdata,
  output logic               dtack,
  input  logic [NF-1:0]      wr_en,
  input  logic [NF-1:0][17:0] wr_data
);

  logic [NCFEB-1:0]     sel;
  logic [NF-1:0]        rd_en, clr, empty, full;
  logic [NF-1:0][17:0]  rd_data;
  logic [NF-1:0][AW:0]  count;
  logic [3:0]           cur, rd_idx;
  logic                 rd_pend, rd_was_empty;
  logic [3:0]           z;
  logic [7:0]           code;

  assign z    = req.cmd[11:8];
  assign code = req.cmd[7:0];

  // FIFO addressed by the command: Z=0 -> selected DCFEB, Z=1..6 -> 7..12
  always_comb begin
    cur = 4'd0;
    for (int i = NCFEB - 1; i >= 0; i--) if (sel[i]) cur = 4'(i);
    if (z >= 4'd1 && z <= 4'd6) cur = z + 4'd6;
  end

  always_comb begin
    rd_en = '0; clr = '0;
    if (strobe && !req.write && code == 8'h00 && (z <= 4'd6)) rd_en[cur] = 1'b1;
    if (strobe && req.write && code == 8'h20) begin
      if (z == 4'd0) clr[NCFEB-1:0] = req.wdata[NCFEB-1:0];
      else if (z <= 4'd6) clr[cur] = 1'b1;
    end
  end

  for (genvar i = 0; i < NF; i++) begin : g_fifo
    sync_fifo #(.WIDTH(18), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst, .clr(clr[i]), .wr_en(wr_en[i]), .wr_data(wr_data[i]),
      .rd_en(rd_en[i]), .rd_data(rd_data[i]), .count(count[i]),
      .empty(empty[i]), .full(full[i])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sel <= '0; rdata <= '0; dtack <= 1'b0; rd_pend <= 1'b0; rd_idx <= '0; rd_was_empty <= 1'b0;
    end else begin
      dtack   <= 1'b0;
      rd_pend <= 1'b0;
      if (rd_pend) begin
        rdata <= rd_was_empty ? 16'd0 : rd_data[rd_idx][15:0];
        dtack <= 1'b1;
      end
      if (strobe) begin
        rdata <= '0;
        if (!req.write && code == 8'h00 && z <= 4'd6) begin
          rd_pend <= 1'b1; rd_idx <= cur; rd_was_empty <= empty[cur];
        end else begin
          dtack <= 1'b1;
          if (!req.write && code == 8'h0C && z <= 4'd6) rdata <= 16'(count[cur]);
          if (z == 4'd0 && code == 8'h10) begin
            if (req.write) sel <= req.wdata[NCFEB-1:0];
            else rdata <= 16'(sel);
          end
        end
      end
    end
  end

endmodule
