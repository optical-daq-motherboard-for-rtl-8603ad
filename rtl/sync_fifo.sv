// sync_fifo: single-clock FIFO with a synchronous read port.
//
// DEPTH words of WIDTH bits in a memory array (a block RAM in the FPGA).
// A write with wr_en stores wr_data unless the FIFO is full, in which case the
// word is dropped. rd_en pops the oldest word; it appears on rd_data on the
// next clock edge (registered read, as a block RAM does). count is the number
// of stored words; clr empties the FIFO.
// The depth of the board's FIFOs (36 kb, 2048 x 18) comes from the board;
// the drop-when-full and registered-read behaviour are this design's choices.
module sync_fifo #(
  parameter int WIDTH = 18,
  parameter int DEPTH = 2048,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic [AW:0]      count,
  output logic             empty,
  output logic             full
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
    if (do_rd) rd_data <= mem[rp];
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule
