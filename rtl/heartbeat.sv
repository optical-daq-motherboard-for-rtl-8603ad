// heartbeat: square wave of FREQ_HZ from a clock of CLK_HZ.
//
// A counter toggles q every CLK_HZ/(2*FREQ_HZ) cycles. rst_async may come
// from another clock domain: it is passed through two flops and then resets
// the counter and q synchronously. Interface: clk, rst_async in, q out; q
// changes on clk edges only. The LED rates it serves are the board's; the
// counter is this design's way of making them.
module heartbeat #(
  parameter int CLK_HZ  = 40_000_000,
  parameter int FREQ_HZ = 1
) (
  input  logic clk,
  input  logic rst_async,
  output logic q
);

  localparam int HALF = (CLK_HZ / (2 * FREQ_HZ) > 0) ? CLK_HZ / (2 * FREQ_HZ) : 1;

  logic [1:0] rs;
  int unsigned cnt;

  always_ff @(posedge clk) begin
    rs <= {rs[0], rst_async};
    if (rs[1]) begin
      cnt <= 0; q <= 1'b0;
    end else if (cnt >= HALF - 1) begin
      cnt <= 0; q <= !q;
    end else cnt <= cnt + 1;
  end

endmodule
