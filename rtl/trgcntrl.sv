// trgcntrl: trigger control (L1A, LCT and L1A_MATCH).
//
// Source selection: with sel_int = 0 (ODMB_CTRL[9]) the L1A and the seven
// raw LCTs come from the CCB, with sel_int = 1 from the internal generators;
// in internal mode every delayed LCT also produces the L1A itself, so an
// internal (calibration) LCT is followed by an L1A with a matching L1A_MATCH.
// The LCTs are delayed by BASE_DLY + lct_l1a_dly bunch crossings
// (2400 + 25*LCT_L1A_DLY ns at 25 ns per crossing) in a shift register. An
// L1A matches DCFEB i when DCFEB i had an LCT exactly that many crossings
// before it; the OTMB (bit 8) and ALCT (bit 9) match every L1A. A test L1A
// (push button PB1 or DCFEB_CTRL[4]) is sent together with an L1A_MATCH to
// all seven DCFEBs. Boards whose KILL bit is set never get an L1A_MATCH;
// kill_l1a (ODMB_CTRL[11]) blocks the L1A and kill_match (ODMB_CTRL[12])
// all L1A_MATCHes. l1a_counter counts the L1As sent and is cleared by reset
// and by resync (DCFEB_CTRL[1]).
// Timing: l1a and l1a_match are registered, one cycle after the L1A input.
// lct_dly gives the delayed LCTs. The delay formula, the masks and the
// controls are the board's; the exact-coincidence match (no window) and
// matching OTMB/ALCT on every L1A are this design's choices.
module trgcntrl
  import odmb_pkg::*;
#(
  parameter int BASE_DLY = 96
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              sel_int,
  input  logic              ccb_l1a,
  input  logic [NCFEB-1:0]  ccb_lct,
  input  logic              int_l1a,
  input  logic [NCFEB-1:0]  int_lct,
  input  logic              test_l1a,
  input  logic              kill_l1a,
  input  logic              kill_match,
  input  logic [9:1]        kill,
  input  logic [5:0]        lct_l1a_dly,
  input  logic              resync,
  output logic              l1a,
  output logic [9:1]        l1a_match,
  output logic [NCFEB-1:0]  lct,       // selected raw LCTs, registered
  output logic [NCFEB-1:0]  lct_dly,   // LCTs delayed to the L1A
  output logic [23:0]       l1a_counter
);

  localparam int HLEN = BASE_DLY + 64;

  logic [NCFEB-1:0] hist [HLEN];
  logic             l1a_in, l1a_now;
  logic [NCFEB-1:0] lct_in, tap;
  logic [9:1]       m;

  // internal mode: an L1A also follows every delayed internal LCT
  assign l1a_in  = sel_int ? (int_l1a || |tap) : ccb_l1a;
  assign lct_in  = sel_int ? int_lct : ccb_lct;
  assign l1a_now = (l1a_in || test_l1a) && !kill_l1a;

  // hist[k] holds the LCTs of k+1 crossings ago
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < HLEN; k++) hist[k] <= '0;
    end else begin
      hist[0] <= lct_in;
      for (int k = 1; k < HLEN; k++) hist[k] <= hist[k-1];
    end
  end

  assign tap = hist[BASE_DLY - 1 + int'(lct_l1a_dly)];

  always_comb begin
    m = '0;
    m[NCFEB:1]  = test_l1a ? '1 : tap;
    m[OTMB_IDX] = 1'b1;
    m[ALCT_IDX] = 1'b1;
    m = m & ~kill;
    if (kill_match || !l1a_now) m = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      l1a <= 1'b0; l1a_match <= '0; lct <= '0; lct_dly <= '0; l1a_counter <= '0;
    end else begin
      l1a       <= l1a_now;
      l1a_match <= m;
      lct       <= lct_in;
      lct_dly   <= tap;
      if (resync) l1a_counter <= '0;
      else if (l1a_now) l1a_counter <= l1a_counter + 24'd1;
    end
  end

endmodule
