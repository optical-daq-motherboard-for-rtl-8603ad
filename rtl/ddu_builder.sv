// ddu_builder: data FIFOs, event manager and DDU packet builder.
//
// Each board (1-7 DCFEB, 8 OTMB, 9 ALCT) writes its packets, 18-bit words
// with bit 17 marking the last word, into its own data FIFO of DATA_DEPTH
// words; a per-board counter holds how many whole packets are stored.
// Every L1A puts {L1A_COUNTER, L1A_MATCH} into an event queue of EV_DEPTH
// entries. The builder takes the oldest event, waits until every matched
// board has a whole packet stored, and sends on ddu_data, one word per
// ddu_valid cycle:
//   4 header words 9xxx: L1A number [11:0], [23:12], match mask, CRATEID
//   4 header words Axxx: A000..A003
//   the packet of the ALCT, then of the OTMB, then of DCFEB 1..7, for each
//   board whose L1A_MATCH bit is set (bits 15:0 of each word)
//   4 trailer words Fxxx: L1A number [11:0], packet word count, F002, F003
//   4 trailer words Exxx: E000..E003, the last one with ddu_last
// The section order and the leading digits 9, A, F, E are the board's DDU
// packet layout; the rest of the header/trailer contents, the queue sizes and
// waiting without a time-out are this design's choices. Board words are read
// one every two cycles (registered FIFO read, the last-word flag is checked
// before the next read). pkt_stored/pkt_shipped pulse per board when a
// packet's last word enters / leaves its FIFO; ddu_pkt pulses with ddu_last.
module ddu_builder
  import odmb_pkg::*;
#(
  parameter int DATA_DEPTH = 2048,
  parameter int EV_DEPTH   = 16,
  localparam int DAW = $clog2(DATA_DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             l1a,
  input  logic [9:1]       l1a_match,
  input  logic [23:0]      l1a_counter,
  input  logic [6:0]       crateid,
  input  logic [9:1][17:0] din,
  input  logic [9:1]       dv,
  output logic [15:0]      ddu_data,
  output logic             ddu_valid,
  output logic             ddu_last,
  output logic             ddu_pkt,
  output logic [9:1]       pkt_stored,
  output logic [9:1]       pkt_shipped,
  output logic [15:0]      otmb_avail,
  output logic [15:0]      alct_avail
);

  typedef enum logic [2:0] {B_IDLE, B_LOAD, B_WAIT, B_HDR, B_REQ, B_DAT, B_TRL} bstate_e;

  // ---------------- data FIFOs ----------------
  logic [9:1]          rd_en, full, empty, wr_ok;
  logic [9:1][17:0]    rd_data;
  logic [9:1][DAW:0]   count;
  logic [15:0]         avail [1:9];

  for (genvar i = 1; i <= 9; i++) begin : g_data
    sync_fifo #(.WIDTH(18), .DEPTH(DATA_DEPTH)) u_fifo (
      .clk, .rst, .clr(1'b0), .wr_en(dv[i]), .wr_data(din[i]),
      .rd_en(rd_en[i]), .rd_data(rd_data[i]), .count(count[i]),
      .empty(empty[i]), .full(full[i])
    );
    assign wr_ok[i] = dv[i] && !full[i];
  end

  // ---------------- event queue ----------------
  logic        ev_rd, ev_empty, ev_full;
  logic [32:0] ev_data;
  logic [$clog2(EV_DEPTH):0] ev_count;

  sync_fifo #(.WIDTH(33), .DEPTH(EV_DEPTH)) u_ev (
    .clk, .rst, .clr(1'b0), .wr_en(l1a), .wr_data({l1a_counter, l1a_match}),
    .rd_en(ev_rd), .rd_data(ev_data), .count(ev_count), .empty(ev_empty), .full(ev_full)
  );

  // ---------------- builder ----------------
  bstate_e     state;
  logic [23:0] ev_l1a;
  logic [9:1]  ev_match;
  logic [3:0]  bidx;         // position in board order 0..8
  logic [3:0]  widx;
  logic [15:0] wc;
  logic [3:0]  board;        // board number of position bidx
  logic [9:1]  ready;

  // board order: ALCT (9), OTMB (8), DCFEB 1..7
  function automatic logic [3:0] board_at(input logic [3:0] p);
    unique case (p)
      4'd0: return 4'd9;
      4'd1: return 4'd8;
      default: return p - 4'd1;
    endcase
  endfunction

  assign board = board_at(bidx);

  always_comb begin
    for (int i = 1; i <= 9; i++) ready[i] = !ev_match[i] || (avail[i] != 0);
  end

  // first position at or after p whose board is matched, 9 if none
  function automatic logic [3:0] next_pos(input logic [3:0] p, input logic [9:1] m);
    for (int q = 0; q < 9; q++)
      if (4'(q) >= p && m[board_at(4'(q))]) return 4'(q);
    return 4'd9;
  endfunction

  always_comb begin
    rd_en = '0;
    if (state == B_REQ) rd_en[board] = 1'b1;
  end
  assign ev_rd = (state == B_IDLE) && !ev_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= B_IDLE; ev_l1a <= '0; ev_match <= '0; bidx <= '0; widx <= '0; wc <= '0;
      ddu_data <= '0; ddu_valid <= 1'b0; ddu_last <= 1'b0; ddu_pkt <= 1'b0; pkt_shipped <= '0;
    end else begin
      ddu_valid   <= 1'b0;
      ddu_last    <= 1'b0;
      ddu_pkt     <= 1'b0;
      pkt_shipped <= '0;
      unique case (state)
        B_IDLE: if (!ev_empty) state <= B_LOAD;
        B_LOAD: begin
          ev_l1a   <= ev_data[32:9];
          ev_match <= ev_data[8:0];
          state    <= B_WAIT;
        end
        B_WAIT: if (&ready) begin
          state <= B_HDR; widx <= '0; wc <= '0;
        end
        B_HDR: begin
          ddu_valid <= 1'b1;
          wc        <= wc + 16'd1;
          unique case (widx)
            4'd0: ddu_data <= {4'h9, ev_l1a[11:0]};
            4'd1: ddu_data <= {4'h9, ev_l1a[23:12]};
            4'd2: ddu_data <= {4'h9, 3'd0, ev_match};
            4'd3: ddu_data <= {4'h9, 5'd0, crateid};
            default: ddu_data <= {4'hA, 10'd0, widx[1:0]};
          endcase
          if (widx == 4'd7) begin
            bidx  <= next_pos(4'd0, ev_match);
            state <= (next_pos(4'd0, ev_match) == 4'd9) ? B_TRL : B_REQ;
            widx  <= '0;
          end else widx <= widx + 4'd1;
        end
        B_REQ: state <= B_DAT;
        B_DAT: begin
          ddu_valid <= 1'b1;
          ddu_data  <= rd_data[board][15:0];
          wc        <= wc + 16'd1;
          if (rd_data[board][17]) begin
            pkt_shipped[board] <= 1'b1;
            bidx  <= next_pos(bidx + 4'd1, ev_match);
            state <= (next_pos(bidx + 4'd1, ev_match) == 4'd9) ? B_TRL : B_REQ;
          end else state <= B_REQ;
        end
        B_TRL: begin
          ddu_valid <= 1'b1;
          wc        <= wc + 16'd1;
          unique case (widx)
            4'd0: ddu_data <= {4'hF, ev_l1a[11:0]};
            4'd1: ddu_data <= {4'hF, wc[11:0] + 12'd7};  // words in the whole packet
            4'd2: ddu_data <= 16'hF002;
            4'd3: ddu_data <= 16'hF003;
            default: ddu_data <= {4'hE, 10'd0, widx[1:0]};
          endcase
          if (widx == 4'd7) begin
            ddu_last <= 1'b1; ddu_pkt <= 1'b1; state <= B_IDLE;
          end
          widx <= widx + 4'd1;
        end
        default: state <= B_IDLE;
      endcase
    end
  end

  // packets stored per board
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i <= 9; i++) avail[i] <= '0;
      pkt_stored <= '0;
    end else begin
      for (int i = 1; i <= 9; i++) begin
        pkt_stored[i] <= wr_ok[i] && din[i][17];
        avail[i] <= avail[i] + 16'(wr_ok[i] && din[i][17])
                            - 16'(state == B_DAT && board == 4'(i) && rd_data[i][17]);
      end
    end
  end

  assign otmb_avail = avail[OTMB_IDX];
  assign alct_avail = avail[ALCT_IDX];

endmodule
