// odmb_pkg: types and constants shared by the ODMB firmware blocks.
//
// The VME offset address of a command is split as {device[3:0], cmd[11:0]}:
// "W 4024" is device 4, command 0x024. COMMAND hands every device the same
// vme_cmd_t plus a one-cycle strobe of its own; the device answers with a
// one-cycle dtack and its read data. That internal bus is a choice of this
// design; the device numbers and command codes are the register map's.
// Board numbering follows the KILL register: index 1-7 are DCFEB 1-7,
// 8 is the OTMB (TMB) and 9 the ALCT.
package odmb_pkg;

  localparam int NCFEB = 7;              // DCFEBs per ODMB
  localparam int NDEV  = 9;              // 7 DCFEBs + OTMB + ALCT
  localparam int OTMB_IDX = 8;
  localparam int ALCT_IDX = 9;

  // Firmware tag V01-01 -> version XYZK = 0101, usercode XYZKdbdb.
  localparam logic [15:0] FW_VERSION = 16'h0101;
  localparam logic [31:0] USERCODE   = {FW_VERSION, 16'hdbdb};

  // Device numbers (address bits 15:12)
  localparam logic [3:0] DEV_CFEBJTAG = 4'h1;
  localparam logic [3:0] DEV_ODMBJTAG = 4'h2;
  localparam logic [3:0] DEV_VMEMON   = 4'h3;
  localparam logic [3:0] DEV_CONFREGS = 4'h4;
  localparam logic [3:0] DEV_TESTFIFO = 4'h5;
  localparam logic [3:0] DEV_LVDBMON  = 4'h8;
  localparam logic [3:0] DEV_EMERG    = 4'hF;

  // JTAG command codes (cmd[7:0]) of devices 1 and 2
  localparam logic [7:0] JT_SHIFT_NONE = 8'h00;
  localparam logic [7:0] JT_SHIFT_HDR  = 8'h04;
  localparam logic [7:0] JT_SHIFT_TLR  = 8'h08;
  localparam logic [7:0] JT_SHIFT_BOTH = 8'h0C;
  localparam logic [7:0] JT_READ_TDO   = 8'h14;
  localparam logic [7:0] JT_RESET      = 8'h18;
  localparam logic [7:0] JT_SHIFT_IR   = 8'h1C;
  localparam logic [7:0] JT_SELECT     = 8'h20;
  localparam logic [7:0] JT_READ_SEL   = 8'h24;

  typedef struct packed {
    logic        write;   // 1 = W, 0 = R
    logic [11:0] cmd;     // address bits 11:0
    logic [15:0] wdata;
  } vme_cmd_t;

  // Device 4 configuration registers
  typedef struct packed {
    logic [5:0] lct_l1a_dly;  // total LCT delay 2400 + 25*dly ns
    logic [4:0] otmb_dly;
    logic [4:0] push_dly;
    logic [4:0] alct_dly;
    logic [4:0] inj_dly;      // 12.5 ns steps
    logic [4:0] ext_dly;      // 12.5 ns steps
    logic [3:0] callct_dly;   // 25 ns steps
    logic [9:1] kill;         // ALCT + TMB + 7 DCFEBs
    logic [6:0] crateid;
  } conf_regs_t;

  // JTAG sequences (step patterns sent LSB first)
  typedef enum logic [1:0] {JS_IDLE, JS_HDR, JS_SHIFT, JS_TLR} jtag_state_e;

endpackage
