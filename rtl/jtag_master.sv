// jtag_master: JTAG sequencer shared by the VME JTAG devices 1 and 2.
//
// One VME command becomes one sequence on TCK/TMS/TDI, starting and ending in
// Run-Test/Idle (or in Shift-DR when no tailer is asked for):
//   header (optional)  data:        TMS 1,0,0   -> Select-DR, Capture-DR, Shift-DR
//                      instruction: TMS 1,1,0,0 -> Select-DR, Select-IR, Capture-IR, Shift-IR
//   shift              nbits bits of din, LSB first, TMS=0 except on the last
//                      bit when a tailer follows (TMS=1 -> Exit1)
//   tailer (optional)  TMS 1,0     -> Update, Run-Test/Idle
//   reset              TMS 1,1,1,1,1,0 and nothing shifted.
// Each step is one TCK period of 2*TCK_HALF clk cycles: TMS/TDI change while
// TCK is low, TCK rises after TCK_HALF cycles. At the rising edge of every
// shifted bit TDO is sampled into tdo_reg from the top (bit 15), so after 16
// bits the first one sits in bit 0 ("last 16 shifted bits").
// start is accepted only while busy is low; done pulses when the sequence ends.
// The TMS sequences match the bit-by-bit example of the board's emergency JTAG
// path; the TCK rate is this design's choice.
module jtag_master
  import odmb_pkg::*;
#(
  parameter int TCK_HALF = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        hdr,       // send the header
  input  logic        tlr,       // send the tailer
  input  logic        ir,        // instruction-register header
  input  logic        reset_seq, // TAP reset sequence, nothing shifted
  input  logic [4:0]  nbits,     // 1..16 bits
  input  logic [15:0] din,
  output logic        busy,
  output logic        done,
  output logic        tck,
  output logic        tms,
  output logic        tdi,
  input  logic        tdo,
  output logic [15:0] tdo_reg
);

  jtag_state_e state;
  logic [5:0]  hdr_pat;    // TMS pattern, LSB first
  logic [2:0]  hdr_len, step;
  logic [4:0]  bitn, nb;
  logic [15:0] sreg;
  logic        do_tlr, is_shift;
  int unsigned hcnt;

  // Drive the next step's TMS/TDI (TCK low phase)
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= JS_IDLE; tck <= 1'b0; tms <= 1'b0; tdi <= 1'b0;
      busy <= 1'b0; done <= 1'b0; tdo_reg <= '0; hcnt <= 0;
      hdr_pat <= '0; hdr_len <= '0; step <= '0; bitn <= '0; nb <= '0;
      sreg <= '0; do_tlr <= 1'b0; is_shift <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state == JS_IDLE) begin
        tck <= 1'b0;
        if (start) begin
          busy   <= 1'b1;
          sreg   <= din;
          nb     <= nbits;
          bitn   <= '0;
          step   <= '0;
          hcnt   <= 0;
          do_tlr <= tlr && !reset_seq;
          if (reset_seq) begin
            hdr_pat <= 6'b011111; hdr_len <= 3'd6; state <= JS_HDR;
          end else if (hdr) begin
            hdr_pat <= ir ? 6'b000011 : 6'b000001;
            hdr_len <= ir ? 3'd4 : 3'd3;
            state   <= JS_HDR;
          end else begin
            state <= JS_SHIFT;
          end
          is_shift <= 1'b0;
        end
      end else begin
        // one TCK period: phase 0 sets TMS/TDI, TCK_HALF later TCK rises,
        // 2*TCK_HALF later TCK falls and the step ends
        if (hcnt == 0) begin
          tck <= 1'b0;
          unique case (state)
            JS_HDR:   begin tms <= hdr_pat[step]; tdi <= 1'b0; is_shift <= 1'b0; end
            JS_SHIFT: begin tms <= do_tlr && (bitn == nb - 5'd1); tdi <= sreg[bitn[3:0]]; is_shift <= 1'b1; end
            JS_TLR:   begin tms <= (step == 0); tdi <= 1'b0; is_shift <= 1'b0; end
            default:  ;
          endcase
          hcnt <= hcnt + 1;
        end else if (hcnt == TCK_HALF) begin
          tck <= 1'b1;
          if (is_shift) tdo_reg <= {tdo, tdo_reg[15:1]};
          hcnt <= hcnt + 1;
        end else if (hcnt == 2*TCK_HALF - 1) begin
          tck  <= 1'b0;
          hcnt <= 0;
          unique case (state)
            JS_HDR: if (step == hdr_len - 3'd1) begin
                      step <= '0;
                      if (hdr_len == 3'd6) begin state <= JS_IDLE; busy <= 1'b0; done <= 1'b1; end
                      else state <= JS_SHIFT;
                    end else step <= step + 3'd1;
            JS_SHIFT: if (bitn == nb - 5'd1) begin
                      if (do_tlr) state <= JS_TLR;
                      else begin state <= JS_IDLE; busy <= 1'b0; done <= 1'b1; end
                    end else bitn <= bitn + 5'd1;
            JS_TLR: if (step == 3'd1) begin
                      step <= '0; state <= JS_IDLE; busy <= 1'b0; done <= 1'b1;
                    end else step <= step + 3'd1;
            default: ;
          endcase
        end else begin
          hcnt <= hcnt + 1;
        end
      end
    end
  end

endmodule
