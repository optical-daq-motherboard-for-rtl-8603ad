// test_points: drives the board's logic test points TP6-TP42.
//
// Most test points carry fixed signals (the board's test-point list):
//   TP6,8,..,18   RAW_LCT(1..7)      TP7,9,..,19  L1A_MATCH(1..7)
//   TP20 L1A     TP21 DDU_DATA_VALID TP22 OTMBDAV  TP23 ALCTDAV
//   TP29 DCFEB_DAV(1)  TP30 DCFEB_DAV(2)  TP31 DDU_DATA_VALID  TP32 PC_DATA_VALID
//   TP33..39      RAWLCT(1..7)
// TP27, TP28, TP41 and TP42 show a signal chosen by the TP_SEL register
// (VME 3020). Here each of them has its own 4-bit field of TP_SEL:
// [3:0] TP27, [7:4] TP28, [11:8] TP41, [15:12] TP42, and the field value is
// the index into the 16 candidate signals sel_src that the top collects.
// Interface: tp[k] is test point TPk. Bits 24-26 (not on the list) and
// TP40 (LCT_ERROR, whose condition is not defined) are driven low.
// Timing: every test point is registered, one clk cycle after its source,
// so that all of them line up on a scope. The fixed assignments are the
// board's; the TP_SEL coding, the candidate list, showing the selected LCTs
// on both RAW_LCT and RAWLCT, and the output register are this design's
// choices.
module test_points #(
  parameter int NSRC = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [15:0]     tp_sel,
  input  logic [NSRC-1:0] sel_src,
  input  logic [7:1]      raw_lct,
  input  logic [7:1]      l1a_match,
  input  logic            l1a,
  input  logic            ddu_valid,
  input  logic            pc_valid,
  input  logic            otmb_dav,
  input  logic            alct_dav,
  input  logic [2:1]      dcfeb_dav,
  output logic [42:6]     tp
);

  logic [42:6] tp_next;

  always_comb begin
    tp_next = '0;
    for (int i = 1; i <= 7; i++) begin
      tp_next[4 + 2*i] = raw_lct[i];        // TP6, 8, .. 18
      tp_next[5 + 2*i] = l1a_match[i];      // TP7, 9, .. 19
      tp_next[32 + i]  = raw_lct[i];        // TP33 .. 39
    end
    tp_next[20] = l1a;
    tp_next[21] = ddu_valid;
    tp_next[22] = otmb_dav;
    tp_next[23] = alct_dav;
    tp_next[29] = dcfeb_dav[1];
    tp_next[30] = dcfeb_dav[2];
    tp_next[31] = ddu_valid;
    tp_next[32] = pc_valid;
    tp_next[27] = sel_src[tp_sel[3:0]];
    tp_next[28] = sel_src[tp_sel[7:4]];
    tp_next[41] = sel_src[tp_sel[11:8]];
    tp_next[42] = sel_src[tp_sel[15:12]];
  end

  always_ff @(posedge clk) begin
    if (rst) tp <= '0;
    else     tp <= tp_next;
  end

endmodule
