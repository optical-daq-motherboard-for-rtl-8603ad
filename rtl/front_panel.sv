// front_panel: push buttons PB0/PB1 and the twelve firmware LEDs.
//
// LEDs (led[k] is front-panel LED k, 1 = on):
//   1  4 Hz square wave from the DDU data clock     2,4,6,8,10  L1A_COUNTER bits 0-4
//   3  2 Hz square wave from the PC data clock      12  on for STRETCH_MS after each
//   5  1 Hz square wave from the internal clock         VME command, and while PB1 is held
//   7  internal PLL locked
//   9  L1A and LCTs taken from the CCB (ODMB_CTRL[9] = 0)
//   11 real DCFEB data path selected (ODMB_CTRL[7] = 0)
// PB0, or the auto-reset bit ODMB_CTRL[8], starts a soft reset: soft_rst is
// high for 17 cycles and for BLINK_S seconds LEDs 1-12 blink at four
// different rates taken from a free-running counter. PB1 gives one test L1A
// (pb1_l1a, one cycle). The buttons pass through two-flop synchronisers and
// act on the press edge. The heartbeat of LED 1 runs in the clk_ddu domain
// and that of LED 3 in clk_pc; each domain resets from a synchronised rst.
// The LED meanings and the ~3 s blinking are the board's; clock rates, the
// LED 12 hold time and the blink rates are this design's choices.
module front_panel #(
  parameter int CLK_HZ     = 40_000_000,
  parameter int DDU_CLK_HZ = 80_000_000,
  parameter int PC_CLK_HZ  = 62_500_000,
  parameter int BLINK_S    = 3,
  parameter int STRETCH_MS = 100
) (
  input  logic        clk,
  input  logic        clk_ddu,
  input  logic        clk_pc,
  input  logic        rst,
  input  logic        pb0,
  input  logic        pb1,
  input  logic        ctrl_rst,      // ODMB_CTRL[8] pulse
  input  logic        pll_locked,
  input  logic        sel_int,       // ODMB_CTRL[9]
  input  logic        dummy_data,    // ODMB_CTRL[7]
  input  logic [4:0]  l1a_cnt,
  input  logic        cmd_seen,
  output logic [12:1] led,
  output logic        soft_rst,
  output logic        pb1_l1a,
  output logic        blinking
);

  localparam longint BLINK_CYC   = longint'(BLINK_S) * CLK_HZ;
  localparam longint STRETCH_CYC = longint'(CLK_HZ) / 1000 * STRETCH_MS;
  localparam int     BB          = ($clog2(CLK_HZ) > 6) ? $clog2(CLK_HZ) - 4 : 2;

  logic [1:0]  pb0_s, pb1_s;
  logic        pb0_q, pb1_q, hb5, hb1, hb3;
  logic [4:0]  rst_cnt;
  longint      blink_cnt, stretch_cnt;
  logic [31:0] free;
  logic [12:1] normal;

  // heartbeat: toggles every HZ/(2*f) cycles of its own clock
  heartbeat #(.CLK_HZ(CLK_HZ),     .FREQ_HZ(1)) u_hb5 (.clk(clk),     .rst_async(rst), .q(hb5));
  heartbeat #(.CLK_HZ(DDU_CLK_HZ), .FREQ_HZ(4)) u_hb1 (.clk(clk_ddu), .rst_async(rst), .q(hb1));
  heartbeat #(.CLK_HZ(PC_CLK_HZ),  .FREQ_HZ(2)) u_hb3 (.clk(clk_pc),  .rst_async(rst), .q(hb3));

  always_ff @(posedge clk) begin
    if (rst) begin
      pb0_s <= '0; pb1_s <= '0; pb0_q <= 1'b0; pb1_q <= 1'b0;
      rst_cnt <= '0; blink_cnt <= 0; stretch_cnt <= 0; free <= '0;
      soft_rst <= 1'b0; pb1_l1a <= 1'b0;
    end else begin
      pb0_s <= {pb0_s[0], pb0};
      pb1_s <= {pb1_s[0], pb1};
      pb0_q <= pb0_s[1];
      pb1_q <= pb1_s[1];
      free  <= free + 32'd1;
      pb1_l1a <= pb1_s[1] && !pb1_q;
      if ((pb0_s[1] && !pb0_q) || ctrl_rst) begin
        rst_cnt   <= 5'd16;
        blink_cnt <= BLINK_CYC;
      end else begin
        if (rst_cnt != 0) rst_cnt <= rst_cnt - 5'd1;
        if (blink_cnt != 0) blink_cnt <= blink_cnt - 1;
      end
      soft_rst <= (rst_cnt != 0) || (pb0_s[1] && !pb0_q) || ctrl_rst;
      if (cmd_seen) stretch_cnt <= STRETCH_CYC;
      else if (stretch_cnt != 0) stretch_cnt <= stretch_cnt - 1;
    end
  end

  assign blinking = (blink_cnt != 0);

  always_comb begin
    normal[1]  = hb1;
    normal[3]  = hb3;
    normal[5]  = hb5;
    normal[7]  = pll_locked;
    normal[9]  = !sel_int;
    normal[11] = !dummy_data;
    normal[2]  = l1a_cnt[0];
    normal[4]  = l1a_cnt[1];
    normal[6]  = l1a_cnt[2];
    normal[8]  = l1a_cnt[3];
    normal[10] = l1a_cnt[4];
    normal[12] = (stretch_cnt != 0) || pb1_s[1];
    for (int k = 1; k <= 12; k++)
      led[k] = blinking ? free[BB + (k % 4)] : normal[k];
  end

endmodule
