// vme_command: VME protocol handling (COMMAND).
//
// Brings a VME slave cycle into the clk domain and turns it into one command
// on the internal device bus. AS*, DS* and WRITE* pass through two-flop
// synchronisers; when AS* and DS* are both low the address and data are
// taken, the first hex digit of the 16-bit offset address selects the device
// (1 CFEB JTAG, 2 ODMB JTAG, 3 control, 4 configuration, 5 test FIFOs,
// 8 LV monitoring, F emergency JTAG) and the other three digits form the
// command. The addressed device gets a one-cycle strobe in dev_strobe; its
// one-cycle dev_dtack returns the read data, which is held on vme_dout while
// DTACK* is driven low until DS* goes high again. A cycle to a device number
// listed as absent in DEV_PRESENT is acknowledged at once with data 0, and a
// device that does not answer within TIMEOUT cycles (a strobe that arrived
// while the device was held in soft reset) is acknowledged with data 0 too,
// so the VME bus never hangs.
// cmd_seen pulses once per command (it lights LED 12).
//
// The device numbering and command layout follow the register map of the
// board; the synchroniser, the handshake with the devices, the time-out and the handling
// of absent devices are this design's choices (AM codes and slot addressing are
// left to the board's address decoding and are not modelled).
module vme_command
  import odmb_pkg::*;
#(
  parameter logic [15:0] DEV_PRESENT = 16'h813E,
  parameter int          TIMEOUT     = 4096
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              vme_as_n,
  input  logic              vme_ds_n,
  input  logic              vme_write_n,
  input  logic [15:0]       vme_addr,
  input  logic [15:0]       vme_din,
  output logic [15:0]       vme_dout,
  output logic              vme_dtack_n,
  output logic [15:0]       dev_strobe,
  output vme_cmd_t          req,
  input  logic [15:0]       dev_dtack,
  input  logic [15:0][15:0] dev_rdata,
  output logic              cmd_seen
);

  typedef enum logic [1:0] {C_IDLE, C_WAIT, C_HOLD} cstate_e;
  cstate_e     state;
  logic [1:0]  as_s, ds_s, wr_s;
  logic [3:0]  dev;
  logic        active;
  logic [$clog2(TIMEOUT+1)-1:0] wait_cnt;

  assign active = !as_s[1] && !ds_s[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      as_s <= 2'b11; ds_s <= 2'b11; wr_s <= 2'b11;
    end else begin
      as_s <= {as_s[0], vme_as_n};
      ds_s <= {ds_s[0], vme_ds_n};
      wr_s <= {wr_s[0], vme_write_n};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= C_IDLE;
      dev_strobe  <= '0;
      req         <= '0;
      dev         <= '0;
      vme_dout    <= '0;
      vme_dtack_n <= 1'b1;
      cmd_seen    <= 1'b0;
      wait_cnt    <= '0;
    end else begin
      dev_strobe <= '0;
      cmd_seen   <= 1'b0;
      unique case (state)
        C_IDLE: if (active) begin
          dev       <= vme_addr[15:12];
          req.write <= !wr_s[1];
          req.cmd   <= vme_addr[11:0];
          req.wdata <= vme_din;
          cmd_seen  <= 1'b1;
          wait_cnt  <= '0;
          if (DEV_PRESENT[vme_addr[15:12]]) begin
            dev_strobe[vme_addr[15:12]] <= 1'b1;
            state <= C_WAIT;
          end else begin
            vme_dout    <= '0;
            vme_dtack_n <= 1'b0;
            state       <= C_HOLD;
          end
        end
        C_WAIT: if (dev_dtack[dev]) begin
          vme_dout    <= dev_rdata[dev];
          vme_dtack_n <= 1'b0;
          state       <= C_HOLD;
        end else if (32'(wait_cnt) == TIMEOUT - 1) begin
          vme_dout    <= '0;          // device did not answer (e.g. held in soft reset)
          vme_dtack_n <= 1'b0;
          state       <= C_HOLD;
        end else wait_cnt <= wait_cnt + 1'b1;
        C_HOLD: if (ds_s[1]) begin
          vme_dtack_n <= 1'b1;
          state       <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
