// dummy_data_gen: dummy board data source (dummy DCFEB, ALCT or OTMB).
//
// Stands in for a front-end board when the dummy data path is selected
// (ODMB_CTRL[7]). Every L1A_MATCH pulse asks for one packet; requests are
// counted, so matches that arrive during a packet are served afterwards.
// A packet is NWORDS consecutive 18-bit words, one per clock with dv high:
//   {last, 1'b0, ID[3:0], word index[3:0], packet number[7:0]}
// where last (bit 17) marks the final word and the packet number counts the
// packets of this source from 0. The packet format is this design's choice.
module dummy_data_gen #(
  parameter int          NWORDS = 8,
  parameter logic [3:0]  ID     = 4'd0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        l1a_match,
  output logic [17:0] dout,
  output logic        dv
);

  logic [7:0] pending, pkt_no;
  logic [3:0] widx;
  logic       active;

  always_ff @(posedge clk) begin
    if (rst) begin
      pending <= '0; pkt_no <= '0; widx <= '0; active <= 1'b0; dout <= '0; dv <= 1'b0;
    end else begin
      dv <= 1'b0;
      if (active) begin
        dv   <= 1'b1;
        dout <= {(32'(widx) == NWORDS - 1), 1'b0, ID, widx, pkt_no};
        if (32'(widx) == NWORDS - 1) begin
          active <= 1'b0; widx <= '0; pkt_no <= pkt_no + 8'd1;
        end else widx <= widx + 4'd1;
      end
      // start the next packet when idle
      if (!active && (pending != 0 || l1a_match)) begin
        active  <= 1'b1;
        pending <= pending + 8'(l1a_match) - 8'd1;
      end else if (l1a_match) pending <= pending + 8'd1;
    end
  end

endmodule
