// hub_fpga_top: firmware of the Hub FPGA in logical slot 1 of an L1Calo
// FEX shelf.
//
// The Hub is the shelf's hub for timing and control.  It receives TTC
// (L1A, BCR, ECR) and privileged-readout requests, and the Readout_Ctrl
// link from its ROD (link resets, ROD busy, channel-up flags).  It merges
// both into one Combined_TTC message per LHC clock for each of 14
// destinations -- the FEX slots 3..14, its own ROD and the other Hub -- so
// every module sees the same TTC signals, event number and link resets
// in the same bunch crossing.
//
// Data path per LHC clock:
//   Readout_Ctrl words -> shadow_reg_rx (comma align, CRC check)
//        -> decoded fields (busy, Aurora_Init, channel up, slot resets)
//   TTC in -> ttc_pro_pipeline (delay + PRO FIFO) -> ttc_counters (L1ID)
//   both -> 14 x cttc_word_builder (per-slot link-reset routing)
//        -> 14 x ctrl_reg_tx (comma, CRC-9, 4 words) -> transceivers
// The Combined_TTC link coming back from the other Hub is received by a
// second shadow_reg_rx; its Shadow registers are only monitored (IPbus).
// Control: hub_init_seq runs the ROD power-up handshake (PWR_CON1..3), the
// Combined_TTC GT reset pulse and the Aurora channel reset timer; the
// IPbus fabric serves hub_regs (the four common registers) and
// link_mon_regs; hub_safe_config drives and monitors the board pins.
//
// Clocking: everything runs on one word clock 'clk' (160 MHz: four 32-bit
// words per 40 MHz LHC clock).  bc_stb, one clock in four, marks the LHC
// clock; TTC inputs are sampled at bc_stb.  Timer parameters are in cycles
// of clk.  Destination index d of the cttc_tx_* arrays: 0 = this ROD,
// 1 = other Hub, d = 2..13 = FEX slot d+1.  Transceivers, Aurora cores,
// Ethernet MAC/PHY, the IPbus UDP master and the TTC decoder are outside
// this design; their signals are the ports below.  The single clock, the
// 32-bit word interface and the index map are this design's choices.
module hub_fpga_top
  import hub_pkg::*;
#(
  parameter int PIPE_DELAY      = 8,
  parameter int PRO_DEPTH       = 16,
  parameter int GT_PULSE_CYCLES = 125_000_000,
  parameter int GT_CYCLES       = 1250,
  parameter int RST_CYCLES      = 2500
) (
  input  logic                         clk,
  input  logic                         rst,
  output logic                         bc_stb,
  // Readout_Ctrl from this Hub's ROD (transceiver user side)
  input  logic [31:0]                  rdc_rx_data,
  input  logic [3:0]                   rdc_rx_charisk,
  // Combined_TTC link from the other Hub (transceiver user side)
  input  logic [31:0]                  ohub_rx_data,
  input  logic [3:0]                   ohub_rx_charisk,
  // Combined_TTC outputs
  output logic [N_DEST-1:0][31:0]      cttc_tx_data,
  output logic [N_DEST-1:0][3:0]       cttc_tx_charisk,
  output logic                         cttc_gt_reset,
  // TTC interface and privileged readout requests
  input  logic                         ttc_l1a,
  input  logic                         ttc_bcr,
  input  logic                         ttc_ecr,
  input  logic                         pro_wr,
  input  logic                         pro_bit,
  // other Combined_TTC contents
  input  logic [11:0]                  other_chan_up,
  input  logic                         link_enable,
  input  logic [N_DEST-1:0][3:0]       sys_reset,
  // Aurora readout receivers
  output logic                         aurora_tx_gtreset,
  output logic                         aurora_tx_reset,
  output logic                         aurora_rx_gtreset,
  output logic                         aurora_rx_reset,
  output init_step_t                   init_step,
  // IPbus from the IPbus master
  input  ipb_wbus_t                    ipb_in,
  output ipb_rbus_t                    ipb_out,
  // board pins (safe configuration)
  input  logic                         pll_4008_lock,
  input  logic                         pll_32064_lock,
  input  logic [2:0]                   sw_loop_detected,
  input  logic [7:0]                   iso_slot_hw_adrs,
  input  logic [7:0]                   shelf_adrs_pins,
  input  logic [1:0]                   minipod_intr_b,
  input  logic [1:0]                   phy_int_b,
  input  logic                         hubs_smb_alert_b,
  input  logic                         all_hub_power_good,
  input  logic                         rod_present_b,
  input  logic [2:0]                   rod_power_control,
  input  logic                         rods_smbalert_b,
  output logic                         select_input_second_40_fanout,
  output logic [2:0]                   sw_atc_loop_det,
  output logic [2:0]                   sw_mdc,
  output logic [7:0]                   overall_adrs,
  output logic [2:0]                   i2c_buf_enable,
  output logic [1:0]                   minipod_reset_b,
  output logic [1:0]                   minipod_scl,
  output logic [1:0]                   access_signal,
  output logic [2:0]                   led_drv,
  output logic [12:0]                  mgt_fo_equ_enb,
  output logic [3:0]                   spare_link,
  output logic                         rod_power_enable,
  output logic                         rod_power_enable_b,
  output logic                         fex_clk_dis
);

  // ---------------- LHC clock strobe ----------------
  logic [1:0] phase;
  always_ff @(posedge clk) begin
    if (rst) phase <= '0;
    else     phase <= phase + 2'd1;
  end
  assign bc_stb = (phase == 2'd3);

  // ---------------- Readout_Ctrl receiver ----------------
  msg_words_t  roc_shadow;
  roc_fields_t roc;
  logic        roc_msg_ok, roc_crc_err, roc_frame_err, roc_aligned;
  logic [15:0] roc_crc_err_cnt;

  shadow_reg_rx #(.ERR_CNT_W(16)) u_roc_rx (
    .clk, .rst,
    .rx_data      (rdc_rx_data),
    .rx_charisk   (rdc_rx_charisk),
    .shadow_words (roc_shadow),
    .msg_ok       (roc_msg_ok),
    .crc_err      (roc_crc_err),
    .frame_err    (roc_frame_err),
    .aligned      (roc_aligned),
    .crc_err_cnt  (roc_crc_err_cnt)
  );
  assign roc = roc_unpack(roc_shadow);

  // ---------------- Combined_TTC receiver from the other Hub ----------------
  msg_words_t  ohub_shadow;
  logic        ohub_msg_ok, ohub_crc_err, ohub_frame_err, ohub_aligned;
  logic [15:0] ohub_crc_err_cnt;

  shadow_reg_rx #(.ERR_CNT_W(16)) u_ohub_rx (
    .clk, .rst,
    .rx_data      (ohub_rx_data),
    .rx_charisk   (ohub_rx_charisk),
    .shadow_words (ohub_shadow),
    .msg_ok       (ohub_msg_ok),
    .crc_err      (ohub_crc_err),
    .frame_err    (ohub_frame_err),
    .aligned      (ohub_aligned),
    .crc_err_cnt  (ohub_crc_err_cnt)
  );

  // ---------------- TTC ----------------
  ttc_bits_t   ttc;
  logic        pro_empty_err, pro_full_err;
  logic [11:0] bcid;
  logic [23:0] l1id;
  logic [7:0]  ecrid;

  ttc_pro_pipeline #(.DELAY(PIPE_DELAY), .PRO_DEPTH(PRO_DEPTH)) u_ttc_pipe (
    .clk, .rst, .bc_stb,
    .l1a_in (ttc_l1a), .bcr_in (ttc_bcr), .ecr_in (ttc_ecr),
    .pro_wr, .pro_bit,
    .ttc, .pro_empty_err, .pro_full_err
  );

  ttc_counters u_counters (
    .clk, .rst, .bc_stb,
    .l1a (ttc.l1a), .bcr (ttc.bcr), .ecr (ttc.ecr),
    .bcid, .l1id, .ecrid
  );

  // ---------------- board registers and pins ----------------
  hub_control_t ctrl;
  hub_alerts_t  alerts;
  logic [7:0]   shelf_adrs, slot_adrs, adrs_to_rod;
  logic         pwr_con1, pwr_con2, pwr_con3;

  hub_safe_config u_safe (
    .clk, .rst, .ctrl, .pwr_con1, .adrs_to_rod,
    .pll_4008_lock, .pll_32064_lock, .sw_loop_detected, .iso_slot_hw_adrs,
    .shelf_adrs_pins, .minipod_intr_b, .phy_int_b, .hubs_smb_alert_b,
    .all_hub_power_good, .rod_present_b, .rod_power_control, .rods_smbalert_b,
    .select_input_second_40_fanout, .sw_atc_loop_det, .sw_mdc, .overall_adrs,
    .i2c_buf_enable, .minipod_reset_b, .minipod_scl, .access_signal, .led_drv,
    .mgt_fo_equ_enb, .spare_link, .rod_power_enable, .rod_power_enable_b,
    .fex_clk_dis,
    .alerts, .shelf_adrs, .slot_adrs, .pwr_con2, .pwr_con3
  );

  // ---------------- start-up sequence ----------------
  logic cttc_link_reset;

  hub_init_seq #(
    .GT_PULSE_CYCLES(GT_PULSE_CYCLES), .GT_CYCLES(GT_CYCLES), .RST_CYCLES(RST_CYCLES)
  ) u_init (
    .clk, .rst,
    .rod_pwr_en (ctrl.rod_pwr_en),
    .pwr_con2, .pwr_con3,
    .roc_msg_ok, .aurora_init (roc.aurora_init),
    .pwr_con1, .cttc_gt_reset, .cttc_link_reset,
    .aurora_tx_gtreset, .aurora_tx_reset, .aurora_rx_gtreset, .aurora_rx_reset,
    .step (init_step)
  );

  // ---------------- Combined_TTC outputs ----------------
  msg_words_t [N_DEST-1:0] cttc_words;

  for (genvar d = 0; d < N_DEST; d++) begin : g_cttc
    localparam int SLOT = (d < 2) ? d : d + 1;
    cttc_word_builder #(.DEST_SLOT(SLOT)) u_build (
      .clk, .rst, .bc_stb,
      .ttc, .l1id, .ecrid, .roc, .other_chan_up,
      .sys_reset   (sys_reset[d]),
      .link_enable,
      .shelf       (shelf_adrs[2:0]),
      .ctrl_words  (cttc_words[d])
    );
    ctrl_reg_tx u_tx (
      .clk, .rst, .bc_stb,
      .ctrl_words (cttc_words[d]),
      .tx_data    (cttc_tx_data[d]),
      .tx_charisk (cttc_tx_charisk[d])
    );
  end

  // ---------------- IPbus ----------------
  ipb_wbus_t [1:0] ipb_w;
  ipb_rbus_t [1:0] ipb_r;

  ipbus_fabric #(.NSLV(2), .SEL_LSB(4)) u_fabric (
    .clk, .rst, .ipb_in, .ipb_out,
    .ipb_to_slaves (ipb_w), .ipb_from_slaves (ipb_r)
  );

  hub_regs u_hub_regs (
    .clk, .rst,
    .ipb_in (ipb_w[0]), .ipb_out (ipb_r[0]),
    .shelf_adrs, .slot_adrs, .alerts, .ctrl, .adrs_to_rod
  );

  link_mon_regs u_link_mon (
    .clk, .rst,
    .ipb_in (ipb_w[1]), .ipb_out (ipb_r[1]),
    .roc_shadow, .roc_crc_err_cnt, .roc_aligned,
    .step (init_step), .pro_empty_err, .pro_full_err,
    .l1id, .ecrid, .bcid,
    .rod_cttc_words (cttc_words[DEST_ROD]),
    .ohub_shadow, .ohub_crc_err_cnt, .ohub_aligned
  );

endmodule
