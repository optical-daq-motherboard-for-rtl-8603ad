// odmb_top: firmware of the Optical DAQ MotherBoard (ODMB) of the ME1/1
// cathode strip chambers.
//
// The ODMB sits between the front-end boards of one chamber (7 DCFEBs, the
// OTMB and the ALCT), the trigger (CCB) and the readout (DDU over an optical
// link, a PC over Gigabit Ethernet). This top wires together:
//   - VME slave: vme_command decodes offset addresses {device, command} and
//     serves device 1 (cfebjtag), 2 (odmbjtag), 3 (vmemon + odmb_counters),
//     4 (vmeconfregs), 5 (testfifos), 8 (lvdbmon) and F (emergency_jtag);
//   - trigger: trgcntrl selects CCB or internal L1A/LCTs, forms L1A_MATCH
//     from LCTs delayed by 2400 + 25*LCT_L1A_DLY ns; calibtrg makes the
//     INJPLS/EXTPLS calibration pulses and the calibration LCT (clk80);
//   - readout: board data (real from the receivers, or from dummy_data_gen
//     when ODMB_CTRL[7] = 1) goes into ddu_builder, which emits DDU packets;
//     pc_builder wraps them into Ethernet frames; testfifos keep copies of
//     every stream for VME; with LOOPBACK (3100) nonzero the DDU and PC RX
//     FIFOs take the transmitted streams instead of the link inputs (the
//     internal loopback of the links, made here in front of the FIFOs);
//   - front_panel: LEDs 1-12 and push buttons PB0 (soft reset) and PB1
//     (test L1A);
//   - test_points: the logic test points TP6-TP42, four of them chosen by
//     TP_SEL from the list next to the instance.
// The optical transceivers (DCFEB receivers, DDU and PC links) and the dummy
// LVMB are outside this RTL: their signals are ports. Soft reset (PB0 or ODMB_CTRL[8]) resets everything except the VME
// protocol block and the front panel. All trigger and VME logic runs on clk
// (40 MHz, one bunch crossing per cycle); calibtrg runs on clk80, which must
// be phase aligned with clk; clk_ddu and clk_pc only drive the LED 1 and
// LED 3 heartbeats (the link streams are given on clk).
module odmb_top
  import odmb_pkg::*;
#(
  parameter int CLK_HZ     = 40_000_000,
  parameter int FIFO_DEPTH = 2048,
  parameter int TCK_HALF   = 2
) (
  input  logic              clk,
  input  logic              clk80,
  input  logic              clk_ddu,
  input  logic              clk_pc,
  input  logic              rst,
  input  logic              pll_locked,
  // VME
  input  logic              vme_as_n,
  input  logic              vme_ds_n,
  input  logic              vme_write_n,
  input  logic [15:0]       vme_addr,
  input  logic [15:0]       vme_din,
  output logic [15:0]       vme_dout,
  output logic              vme_dtack_n,
  // CCB
  input  logic              ccb_l1a,
  input  logic [NCFEB-1:0]  ccb_lct,
  // to the front-end boards
  output logic              l1a,
  output logic [9:1]        l1a_match,     // 1-7 DCFEB, 8 OTMB, 9 ALCT
  output logic              dcfeb_resync,
  output logic              dcfeb_reprogram,
  output logic              dcfeb_injpls,
  output logic              dcfeb_extpls,
  output logic              otmb_lct_rqst,
  output logic              otmb_ext_trig,
  output logic              opt_reset,
  output logic [NCFEB-1:0]  dcfeb_tck,
  output logic              dcfeb_tms,
  output logic              dcfeb_tdi,
  input  logic [NCFEB-1:0]  dcfeb_tdo,
  // FPGA JTAG chain: device 2 and the emergency path
  output logic              odmb_tck,
  output logic              odmb_tms,
  output logic              odmb_tdi,
  input  logic              odmb_tdo,
  output logic              em_tck,
  output logic              em_tms,
  output logic              em_tdi,
  input  logic              em_tdo,
  // received board data (from the optical receivers and the OTMB/ALCT)
  input  logic [9:1][17:0]  rx_data,
  input  logic [9:1]        rx_dv,
  input  logic [NCFEB:1]    rx_good_crc,
  // DDU and PC links
  output logic [15:0]       ddu_data,
  output logic              ddu_valid,
  output logic              ddu_last,
  input  logic [15:0]       ddu_rx_data,
  input  logic              ddu_rx_valid,
  output logic [15:0]       pc_data,
  output logic              pc_valid,
  output logic              pc_last,
  input  logic [15:0]       pc_rx_data,
  input  logic              pc_rx_valid,
  output logic [2:0]        loopback,
  output logic [3:0]        diffctrl,
  // LV monitoring board
  output logic [6:0]        adc_cs_n,
  output logic              adc_sclk,
  output logic              adc_din,
  input  logic              adc_dout,
  output logic [7:0]        pon,
  output logic              lvmb_dummy,
  // front panel and test points
  input  logic              pb0,
  input  logic              pb1,
  output logic [12:1]       led,
  output logic [15:0]       tp_sel,
  output logic [42:6]       tp             // tp[k] = test point TPk
);

  logic        rst_i, soft_rst, cmd_seen, pb1_l1a, blinking;
  logic [15:0] dev_strobe, dev_dtack;
  logic [15:0][15:0] dev_rdata;
  vme_cmd_t    req;
  conf_regs_t  cfg;
  logic [15:0] odmb_ctrl;
  logic [7:0]  dcfeb_ctrl, odmb_data_sel;
  logic [15:0] odmb_data, otmb_avail, alct_avail;
  logic [23:0] l1a_counter;
  logic [NCFEB-1:0] lct, lct_dly, cal_lct;
  logic [9:1][17:0] dummy_data, brd_data;
  logic [9:1]  dummy_dv, brd_dv, pkt_stored, pkt_shipped;
  logic        ddu_pkt, pc_pkt;
  logic [12:0] tf_wr;
  logic [12:0][17:0] tf_data;
  logic [15:0] tp_src;
  logic        lb_on;

  assign rst_i = rst || soft_rst;

  // ---------------- VME ----------------
  vme_command u_command (
    .clk, .rst, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_addr, .vme_din,
    .vme_dout, .vme_dtack_n, .dev_strobe, .req, .dev_dtack, .dev_rdata, .cmd_seen
  );

  always_comb begin
    for (int d = 0; d < 16; d++) if (!(d inside {1, 2, 3, 4, 5, 8, 15})) begin
      dev_dtack[d] = 1'b0; dev_rdata[d] = '0;
    end
  end

  cfebjtag #(.TCK_HALF(TCK_HALF)) u_cfebjtag (
    .clk, .rst(rst_i), .strobe(dev_strobe[DEV_CFEBJTAG]), .req,
    .rdata(dev_rdata[DEV_CFEBJTAG]), .dtack(dev_dtack[DEV_CFEBJTAG]),
    .dcfeb_tck, .dcfeb_tms, .dcfeb_tdi, .dcfeb_tdo
  );

  odmbjtag #(.TCK_HALF(TCK_HALF)) u_odmbjtag (
    .clk, .rst(rst_i), .strobe(dev_strobe[DEV_ODMBJTAG]), .req,
    .rdata(dev_rdata[DEV_ODMBJTAG]), .dtack(dev_dtack[DEV_ODMBJTAG]),
    .tck(odmb_tck), .tms(odmb_tms), .tdi(odmb_tdi), .tdo(odmb_tdo)
  );

  vmemon u_vmemon (
    .clk, .rst(rst_i), .strobe(dev_strobe[DEV_VMEMON]), .req,
    .rdata(dev_rdata[DEV_VMEMON]), .dtack(dev_dtack[DEV_VMEMON]),
    .odmb_ctrl, .dcfeb_ctrl, .tp_sel, .loopback, .diffctrl, .odmb_data_sel, .odmb_data
  );

  vmeconfregs u_confregs (
    .clk, .rst(rst_i), .strobe(dev_strobe[DEV_CONFREGS]), .req,
    .rdata(dev_rdata[DEV_CONFREGS]), .dtack(dev_dtack[DEV_CONFREGS]), .cfg
  );

  testfifos #(.DEPTH(FIFO_DEPTH)) u_testfifos (
    .clk, .rst(rst_i), .strobe(dev_strobe[DEV_TESTFIFO]), .req,
    .rdata(dev_rdata[DEV_TESTFIFO]), .dtack(dev_dtack[DEV_TESTFIFO]),
    .wr_en(tf_wr), .wr_data(tf_data)
  );

  lvdbmon u_lvdbmon (
    .clk, .rst(rst_i), .strobe(dev_strobe[DEV_LVDBMON]), .req,
    .rdata(dev_rdata[DEV_LVDBMON]), .dtack(dev_dtack[DEV_LVDBMON]),
    .adc_cs_n, .adc_sclk, .adc_din, .adc_dout, .pon
  );

  emergency_jtag u_emergency (
    .clk, .rst, .strobe(dev_strobe[DEV_EMERG]), .req,
    .rdata(dev_rdata[DEV_EMERG]), .dtack(dev_dtack[DEV_EMERG]),
    .tck(em_tck), .tms(em_tms), .tdi(em_tdi), .tdo(em_tdo)
  );

  odmb_counters u_counters (
    .clk, .rst(rst_i), .sel(odmb_data_sel), .data(odmb_data), .l1a_counter,
    .l1a, .l1a_match, .lct, .pkt_stored, .pkt_shipped, .ddu_pkt, .pc_pkt,
    .good_crc(rx_good_crc), .otmb_avail, .alct_avail
  );

  // ---------------- trigger and calibration ----------------
  assign dcfeb_reprogram = dcfeb_ctrl[0];
  assign dcfeb_resync    = dcfeb_ctrl[1];
  assign otmb_lct_rqst   = dcfeb_ctrl[5];
  assign otmb_ext_trig   = dcfeb_ctrl[6];
  assign opt_reset       = dcfeb_ctrl[7];
  assign lvmb_dummy      = odmb_ctrl[10];

  trgcntrl u_trgcntrl (
    .clk, .rst(rst_i), .sel_int(odmb_ctrl[9]), .ccb_l1a, .ccb_lct,
    .int_l1a(1'b0), .int_lct(cal_lct), .test_l1a(pb1_l1a || dcfeb_ctrl[4]),
    .kill_l1a(odmb_ctrl[11]), .kill_match(odmb_ctrl[12]), .kill(cfg.kill),
    .lct_l1a_dly(cfg.lct_l1a_dly), .resync(dcfeb_ctrl[1]),
    .l1a, .l1a_match, .lct, .lct_dly, .l1a_counter
  );

  calibtrg u_calibtrg (
    .clk_fast(clk80), .rst(rst_i), .inj_req(dcfeb_ctrl[2]), .ext_req(dcfeb_ctrl[3]),
    .inj_dly(cfg.inj_dly), .ext_dly(cfg.ext_dly), .callct_dly(cfg.callct_dly),
    .cal_mode(odmb_ctrl[4]), .cal_trgen(odmb_ctrl[3:0]), .cal_trgsel(odmb_ctrl[5]),
    .injpls(dcfeb_injpls), .extpls(dcfeb_extpls), .cal_lct
  );

  // ---------------- readout ----------------
  for (genvar i = 1; i <= 9; i++) begin : g_dummy
    dummy_data_gen #(.NWORDS(8), .ID(4'(i))) u_dummy (
      .clk, .rst(rst_i), .l1a_match(l1a_match[i] && odmb_ctrl[7]),
      .dout(dummy_data[i]), .dv(dummy_dv[i])
    );
  end

  assign brd_data = odmb_ctrl[7] ? dummy_data : rx_data;
  assign brd_dv   = odmb_ctrl[7] ? dummy_dv   : rx_dv;

  ddu_builder #(.DATA_DEPTH(FIFO_DEPTH)) u_ddu (
    .clk, .rst(rst_i), .l1a, .l1a_match, .l1a_counter, .crateid(cfg.crateid),
    .din(brd_data), .dv(brd_dv), .ddu_data, .ddu_valid, .ddu_last, .ddu_pkt,
    .pkt_stored, .pkt_shipped, .otmb_avail, .alct_avail
  );

  pc_builder #(.DEPTH(FIFO_DEPTH)) u_pc (
    .clk, .rst(rst_i), .din(ddu_data), .din_valid(ddu_valid), .din_last(ddu_last),
    .dout(pc_data), .dout_valid(pc_valid), .dout_last(pc_last), .pc_pkt
  );

  // LOOPBACK 1 or 2: the transmitted DDU and PC streams come back into the RX
  // test FIFOs in place of the link receivers
  assign lb_on = (loopback != 3'd0);

  // test FIFO copies: 0-6 DCFEB, 7 PC TX, 8 PC RX, 9 DDU TX, 10 DDU RX, 11 OTMB, 12 ALCT
  always_comb begin
    for (int i = 0; i < NCFEB; i++) begin
      tf_wr[i] = brd_dv[i+1]; tf_data[i] = brd_data[i+1];
    end
    tf_wr[7]  = pc_valid;     tf_data[7]  = {1'b0, pc_last, pc_data};
    tf_wr[8]  = lb_on ? pc_valid  : pc_rx_valid;
    tf_data[8]  = lb_on ? {1'b0, pc_last, pc_data}   : {2'b00, pc_rx_data};
    tf_wr[9]  = ddu_valid;    tf_data[9]  = {1'b0, ddu_last, ddu_data};
    tf_wr[10] = lb_on ? ddu_valid : ddu_rx_valid;
    tf_data[10] = lb_on ? {1'b0, ddu_last, ddu_data} : {2'b00, ddu_rx_data};
    tf_wr[11] = brd_dv[OTMB_IDX]; tf_data[11] = brd_data[OTMB_IDX];
    tf_wr[12] = brd_dv[ALCT_IDX]; tf_data[12] = brd_data[ALCT_IDX];
  end

  // ---------------- front panel ----------------
  front_panel #(.CLK_HZ(CLK_HZ), .DDU_CLK_HZ(2 * CLK_HZ), .PC_CLK_HZ(CLK_HZ * 25 / 16)) u_panel (
    .clk, .clk_ddu, .clk_pc, .rst, .pb0, .pb1, .ctrl_rst(odmb_ctrl[8]), .pll_locked,
    .sel_int(odmb_ctrl[9]), .dummy_data(odmb_ctrl[7]), .l1a_cnt(l1a_counter[4:0]),
    .cmd_seen, .led, .soft_rst, .pb1_l1a, .blinking
  );

  // ---------------- test points ----------------
  // TP_SEL field value -> signal: 0 L1A, 1 DDU last word, 2 PC last word,
  // 3 soft reset, 4 VME command, 5 PB1 L1A, 6 test L1A request, 7 resync,
  // 8-14 delayed LCT of DCFEB 1-7, 15 LEDs blinking
  assign tp_src = {blinking, lct_dly, dcfeb_ctrl[1], dcfeb_ctrl[4], pb1_l1a, cmd_seen,
                   soft_rst, pc_last, ddu_last, l1a};

  test_points u_tp (
    .clk, .rst(rst_i), .tp_sel, .sel_src(tp_src), .raw_lct(lct), .l1a_match(l1a_match[7:1]),
    .l1a, .ddu_valid, .pc_valid, .otmb_dav(brd_dv[OTMB_IDX]), .alct_dav(brd_dv[ALCT_IDX]),
    .dcfeb_dav(brd_dv[2:1]), .tp
  );

endmodule
