// pc_builder: wraps DDU packets into Ethernet frames for the PC link (PCFIFO).
//
// The DDU packet stream (din, din_valid, din_last on the final word) is
// stored in a FIFO of DEPTH words; a packet counter tells when a whole packet
// is in. For each packet a frame is sent on dout, one word per dout_valid:
//   4 header words ETH_HDR[0..3]
//   the DDU packet
//   0 words of padding, as many as needed for a frame of MIN_WORDS words
//   4 trailer words: number of packet words, then ETH_TRL[1..3]
// dout_last marks the final trailer word and pc_pkt pulses with it. Packet
// words are read one every two cycles (registered FIFO read, the last-word
// flag is checked before the next read). The 4+4 wrapping words and the
// 32-word minimum are the board's; the header/trailer contents and padding
// before the trailer are this design's choices.
module pc_builder #(
  parameter int DEPTH = 2048,
  parameter int MIN_WORDS = 32,
  parameter logic [3:0][15:0] ETH_HDR = {16'h0003, 16'h0002, 16'h0001, 16'h0000},
  parameter logic [3:1][15:0] ETH_TRL = {16'hFFFF, 16'hFFFE, 16'hFFFD},
  localparam int AW = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] din,
  input  logic        din_valid,
  input  logic        din_last,
  output logic [15:0] dout,
  output logic        dout_valid,
  output logic        dout_last,
  output logic        pc_pkt
);

  typedef enum logic [2:0] {P_IDLE, P_HDR, P_REQ, P_DAT, P_PAD, P_TRL} pstate_e;

  pstate_e     state;
  logic        rd_en, empty, full, in_last_ok;
  logic [16:0] rd_data;
  logic [AW:0] count;
  logic [15:0] npkt, nw, fw;   // stored packets, packet words, frame words
  logic [1:0]  widx;
  logic        pkt_done;

  sync_fifo #(.WIDTH(17), .DEPTH(DEPTH)) u_buf (
    .clk, .rst, .clr(1'b0), .wr_en(din_valid), .wr_data({din_last, din}),
    .rd_en, .rd_data, .count, .empty, .full
  );

  assign in_last_ok = din_valid && din_last && !full;
  assign rd_en      = (state == P_REQ);
  assign pkt_done   = (state == P_DAT) && rd_data[16];

  always_ff @(posedge clk) begin
    if (rst) npkt <= '0;
    else npkt <= npkt + 16'(in_last_ok) - 16'(pkt_done);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= P_IDLE; nw <= '0; fw <= '0; widx <= '0;
      dout <= '0; dout_valid <= 1'b0; dout_last <= 1'b0; pc_pkt <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      dout_last  <= 1'b0;
      pc_pkt     <= 1'b0;
      unique case (state)
        P_IDLE: if (npkt != 0) begin
          state <= P_HDR; widx <= '0; nw <= '0; fw <= '0;
        end
        P_HDR: begin
          dout <= ETH_HDR[widx]; dout_valid <= 1'b1; fw <= fw + 16'd1;
          widx <= widx + 2'd1;
          if (widx == 2'd3) state <= P_REQ;
        end
        P_REQ: state <= P_DAT;
        P_DAT: begin
          dout <= rd_data[15:0]; dout_valid <= 1'b1;
          fw <= fw + 16'd1; nw <= nw + 16'd1;
          if (rd_data[16]) state <= (32'(fw) + 1 + 4 < MIN_WORDS) ? P_PAD : P_TRL;
          else state <= P_REQ;
        end
        P_PAD: begin
          dout <= '0; dout_valid <= 1'b1; fw <= fw + 16'd1;
          if (32'(fw) + 1 + 4 >= MIN_WORDS) state <= P_TRL;
        end
        P_TRL: begin
          dout <= (widx == 2'd0) ? nw : ETH_TRL[widx];
          dout_valid <= 1'b1; fw <= fw + 16'd1;
          widx <= widx + 2'd1;
          if (widx == 2'd3) begin
            dout_last <= 1'b1; pc_pkt <= 1'b1; state <= P_IDLE;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

endmodule
