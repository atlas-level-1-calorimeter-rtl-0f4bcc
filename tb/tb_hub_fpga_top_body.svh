// Body of the Hub end-to-end testbenches.  The including module declares
// the localparams PIPE_DELAY, PRO_DEPTH, GT_PULSE_CYCLES, GT_CYCLES and
// RST_CYCLES (the values the Hub was built with) and instantiates
// hub_fpga_top as 'dut' with '.*' connections.
//
// Around the Hub:
//   * a ROD model: a ctrl_reg_tx sending Readout_Ctrl messages built with
//     roc_pack from the variable 'rod_f', with hooks to corrupt one message
//     (CRC error) or to insert a stray comma (frame error);
//   * an other-Hub model: a ctrl_reg_tx sending Combined_TTC messages from
//     'ohub_f' back to this Hub, whose Shadow registers are read over IPbus;
//   * 14 shadow_reg_rx receivers, one per Combined_TTC output, standing for
//     the FEX modules, the ROD and the other Hub;
//   * a TTC driver: one process that at every LHC clock applies the
//     requested L1A/BCR/ECR/PRO inputs and runs a reference model of the
//     counters and of the PRO FIFO, giving the message expected for it;
//   * an IPbus master (tasks from tb_ipbus_tasks.svh).
// Every message of every receiver is compared with the reference, LAT LHC
// clocks after its inputs.  Each mechanism is counted in 'seen_*' and the
// test fails if any of them never happened.

  int checks = 0, failures = 0;

  localparam int LAT  = PIPE_DELAY + 4;    // LHC clocks, TTC input to decoded message
  localparam bit LONG = (GT_PULSE_CYCLES > 200_000);

  logic clk = 1'b0, rst = 1'b1;
  always #3.125 clk = ~clk;                // 160 MHz word clock

  // ---------------- Hub ports ----------------
  logic                    bc_stb;
  logic [31:0]             rdc_rx_data;
  logic [3:0]              rdc_rx_charisk;
  logic [31:0]             ohub_rx_data;
  logic [3:0]              ohub_rx_charisk;
  logic [N_DEST-1:0][31:0] cttc_tx_data;
  logic [N_DEST-1:0][3:0]  cttc_tx_charisk;
  logic                    cttc_gt_reset;
  logic                    ttc_l1a = 0, ttc_bcr = 0, ttc_ecr = 0, pro_wr = 0, pro_bit = 0;
  logic [11:0]             other_chan_up;
  logic                    link_enable;
  logic [N_DEST-1:0][3:0]  sys_reset;
  logic                    aurora_tx_gtreset, aurora_tx_reset, aurora_rx_gtreset, aurora_rx_reset;
  init_step_t              init_step;
  ipb_wbus_t               ipb_in;
  ipb_rbus_t               ipb_out;
  logic                    pll_4008_lock, pll_32064_lock;
  logic [2:0]              sw_loop_detected;
  logic [7:0]              iso_slot_hw_adrs, shelf_adrs_pins;
  logic [1:0]              minipod_intr_b, phy_int_b;
  logic                    hubs_smb_alert_b, all_hub_power_good, rod_present_b;
  logic [2:0]              rod_power_control;
  logic                    rods_smbalert_b;
  logic                    select_input_second_40_fanout;
  logic [2:0]              sw_atc_loop_det, sw_mdc;
  logic [7:0]              overall_adrs;
  logic [2:0]              i2c_buf_enable;
  logic [1:0]              minipod_reset_b, minipod_scl, access_signal;
  logic [2:0]              led_drv;
  logic [12:0]             mgt_fo_equ_enb;
  logic [3:0]              spare_link;
  logic                    rod_power_enable, rod_power_enable_b, fex_clk_dis;

  `include "tb/tb_ipbus_tasks.svh"

  // ---------------- mechanism counters ----------------
  int seen_l1a, seen_bcr, seen_ecr, seen_pro_one, seen_pro_empty, seen_pro_full;
  int seen_bc_wrap, seen_crc_err, seen_frame_err, seen_slot_reset, seen_global_reset;
  int seen_rod_busy, seen_chan_up, seen_gt_pulse, seen_aurora_release, seen_ipb_err;
  int seen_ipb_rw, seen_init_run, seen_msgs, seen_ohub_link;

  // ---------------- ROD model (Readout_Ctrl sender) ----------------
  roc_fields_t rod_f;
  logic        rod_on = 1'b0;
  logic        corrupt_crc = 1'b0, corrupt_frame = 1'b0;
  logic [31:0] rod_tx_data;
  logic [3:0]  rod_tx_charisk;
  int          rod_word_ix = 0;       // word index within the ROD's message

  ctrl_reg_tx u_rod_tx (
    .clk, .rst, .bc_stb,
    .ctrl_words (roc_pack(rod_f)),
    .tx_data    (rod_tx_data),
    .tx_charisk (rod_tx_charisk)
  );

  always_ff @(posedge clk) begin
    if (rod_tx_charisk[0] && rod_tx_data[7:0] == K28_5) rod_word_ix <= 1;
    else                                                 rod_word_ix <= rod_word_ix + 1;
  end

  // one-shot corruption of Word_2 of the next message
  always_comb begin
    rdc_rx_data    = rod_on ? rod_tx_data : 32'h0;
    rdc_rx_charisk = rod_on ? rod_tx_charisk : 4'h0;
    if (rod_on && rod_word_ix == 2 && corrupt_crc)   rdc_rx_data = rod_tx_data ^ 32'h0000_0400;
    if (rod_on && rod_word_ix == 2 && corrupt_frame) begin
      rdc_rx_data    = {24'h0, K28_5};
      rdc_rx_charisk = 4'b0001;
    end
  end

  always @(posedge clk) begin
    if (rod_on && rod_word_ix == 2) begin
      corrupt_crc   <= 1'b0;
      corrupt_frame <= 1'b0;
    end
    if (!rst && dut.roc_crc_err)   seen_crc_err++;
    if (!rst && dut.roc_frame_err) seen_frame_err++;
  end

  // ---------------- other-Hub model (Combined_TTC back to this Hub) ----------------
  cttc_fields_t ohub_f;

  ctrl_reg_tx u_ohub_tx (
    .clk, .rst, .bc_stb,
    .ctrl_words (cttc_pack(ohub_f)),
    .tx_data    (ohub_rx_data),
    .tx_charisk (ohub_rx_charisk)
  );

  // ---------------- FEX / ROD / other-Hub receivers ----------------
  msg_words_t [N_DEST-1:0] rx_words;
  logic       [N_DEST-1:0] rx_ok, rx_crc_err, rx_frame_err, rx_aligned;

  for (genvar d = 0; d < N_DEST; d++) begin : g_rx
    logic [15:0] cnt;
    shadow_reg_rx #(.ERR_CNT_W(16)) u_rx (
      .clk, .rst,
      .rx_data      (cttc_tx_data[d]),
      .rx_charisk   (cttc_tx_charisk[d]),
      .shadow_words (rx_words[d]),
      .msg_ok       (rx_ok[d]),
      .crc_err      (rx_crc_err[d]),
      .frame_err    (rx_frame_err[d]),
      .aligned      (rx_aligned[d]),
      .crc_err_cnt  (cnt)
    );
  end

  // ---------------- TTC driver and reference model ----------------
  typedef struct packed {
    logic        l1a, bcr, ecr, pro;
    logic [23:0] l1id;
    logic [7:0]  ecrid;
  } exp_t;

  exp_t        exp_msg [int];
  int          bc_now = 0;           // LHC clocks since reset release
  logic        req_l1a, req_bcr, req_ecr, req_pw, req_pb;
  logic        req_valid = 1'b0;
  event        bc_taken;
  logic [23:0] m_l1id = '1;
  logic [7:0]  m_ecrid = '0;
  bit          m_pro_q [$];
  int          exp_full = 0, exp_empty = 0;
  int          prev_bcid = -1;

  always @(posedge clk) if (!rst && bc_stb) bc_now <= bc_now + 1;

  // Inputs are set at the falling edge before the strobed rising edge and
  // held for the whole LHC clock; pro_wr is a single-clock pulse.
  initial begin
    forever begin
      exp_t e;
      @(negedge clk);
      pro_wr = 1'b0;
      if (!rst && bc_stb) begin
        logic l1a, bcr, ecr, pw, pb;
        {l1a, bcr, ecr, pw, pb} = req_valid ? {req_l1a, req_bcr, req_ecr, req_pw, req_pb} : 5'b0;
        ttc_l1a = l1a; ttc_bcr = bcr; ttc_ecr = ecr; pro_wr = pw; pro_bit = pb;
        if (ecr) begin
          m_l1id  = '1;
          m_ecrid = m_ecrid + 1'b1;
        end
        if (l1a) m_l1id = m_l1id + 1'b1;
        if (pw) begin
          if (m_pro_q.size() < PRO_DEPTH) m_pro_q.push_back(pb);
          else exp_full++;
        end
        e = '0;
        e.l1a = l1a; e.bcr = bcr; e.ecr = ecr;
        e.l1id = m_l1id; e.ecrid = m_ecrid;
        if (l1a) begin
          if (m_pro_q.size() > 0) e.pro = m_pro_q.pop_front();
          else exp_empty++;
        end
        exp_msg[bc_now] = e;
        // bunch counter of the Hub: next value seen before each strobe
        if (prev_bcid >= 0) begin
          int want;
          want = dut.ttc.bcr ? 0 : (prev_bcid == 3563) ? 0 : prev_bcid + 1;
          `CHECK_EQ(int'(dut.bcid), want, "BCID sequence")
          if (prev_bcid == 3563 && !dut.ttc.bcr && dut.bcid == 0) seen_bc_wrap++;
        end
        prev_bcid = int'(dut.bcid);
        if (req_valid) begin
          req_valid = 1'b0;
          ->bc_taken;
        end
      end
    end
  end

  // issue one LHC clock worth of TTC inputs
  task automatic bc_issue(input logic l1a, bcr, ecr, pw, pb);
    req_l1a = l1a; req_bcr = bcr; req_ecr = ecr; req_pw = pw; req_pb = pb;
    req_valid = 1'b1;
    @(bc_taken);
  endtask

  task automatic bc_idle(input int n);
    repeat (n) bc_issue(0, 0, 0, 0, 0);
  endtask

  // ---------------- stream checker on every receiver ----------------
  always @(posedge clk) begin
    if (!rst) begin
      for (int d = 0; d < N_DEST; d++) begin
        if (rx_crc_err[d])   begin failures++; $display("FAIL: CRC error on output %0d", d); end
        if (rx_frame_err[d]) begin failures++; $display("FAIL: frame error on output %0d", d); end
        if (rx_ok[d]) begin
          cttc_fields_t f;
          int m;
          f = cttc_unpack(rx_words[d]);
          m = bc_now - LAT;
          if (exp_msg.exists(m)) begin
          checks++;
          if (f.version !== FORMAT_VERSION || f.ctrl_chan !== 32'h0 ||
              f.shelf !== shelf_adrs_pins[2:0] || f.link_enable !== link_enable ||
              f.reset !== sys_reset[d]) begin
            failures++;
            $display("FAIL: static fields on output %0d: %p", d, f);
          end
          end
          if (exp_msg.exists(m)) begin
            exp_t e;
            e = exp_msg[m];
            checks++;
            if ({f.ttc.l1a, f.ttc.bcr, f.ttc.ecr, f.ttc.pro, f.l1id, f.ecrid} !== e) begin
              failures++;
              $display("FAIL: TTC on output %0d bc %0d got l1a=%b bcr=%b ecr=%b pro=%b l1id=%0h ecrid=%0h exp %b%b%b%b %0h %0h",
                       d, m, f.ttc.l1a, f.ttc.bcr, f.ttc.ecr, f.ttc.pro, f.l1id, f.ecrid,
                       e.l1a, e.bcr, e.ecr, e.pro, e.l1id, e.ecrid);
            end
            if (d == 2) begin
              seen_msgs++;
              if (e.l1a) seen_l1a++;
              if (e.bcr) seen_bcr++;
              if (e.ecr) seen_ecr++;
              if (e.pro) seen_pro_one++;
            end
          end
        end
      end
    end
  end

  always @(posedge clk) begin
    if (!rst && dut.pro_empty_err) seen_pro_empty++;
    if (!rst && dut.pro_full_err)  seen_pro_full++;
  end

  // ---------------- Readout_Ctrl routing reference ----------------
  function automatic logic [3:0] exp_link_reset(input int d, input roc_fields_t r);
    int ix;
    logic [3:0] v;
    v = '0;
    if (d >= 2) begin
      ix = d - 2;                       // destination d is FEX slot d+1
      v = (ix < 6) ? r.link_rst_4[ix] : {3'b000, r.link_rst_1[ix-6]};
    end
    return v | {4{r.aurora_init}};
  endfunction

  // wait until the current rod_f has reached every receiver, then compare
  task automatic check_roc_routing(input string what);
    bc_idle(LAT + 4);
    for (int d = 0; d < N_DEST; d++) begin
      cttc_fields_t f;
      f = cttc_unpack(rx_words[d]);
      `CHECK_EQ(f.link_reset, exp_link_reset(d, rod_f), $sformatf("%s: link_reset of output %0d", what, d))
      `CHECK_EQ(f.rod_busy, rod_f.rod_busy, $sformatf("%s: rod busy of output %0d", what, d))
      `CHECK_EQ(f.rod0_chan_up, (d >= 2) ? rod_f.chan_up[d-2] : 1'b0, $sformatf("%s: rod0 channel up %0d", what, d))
      `CHECK_EQ(f.rod1_chan_up, (d >= 2) ? other_chan_up[d-2] : 1'b0, $sformatf("%s: rod1 channel up %0d", what, d))
      if (d >= 2 && f.link_reset != 0 && !rod_f.aurora_init) seen_slot_reset++;
      if (d >= 2 && f.rod0_chan_up) seen_chan_up++;
    end
    if (rod_f.rod_busy) seen_rod_busy++;
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (LONG ? GT_PULSE_CYCLES + 2_000_000 : 2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    `TB_FINISH
  end

  // ---------------- main sequence ----------------
  initial begin
    logic [31:0] d32;
    logic        e;
    int          n, t0;

    ipb_in = '0;
    rod_f = '0;
    ohub_f = '0;
    ohub_f.l1id = 24'h00C0DE; ohub_f.ecrid = 8'h5A; ohub_f.shelf = 3'd6; ohub_f.rod_busy = 1'b1;
    rod_f.aurora_init = 1'b1;
    other_chan_up = 12'hA5C;
    link_enable = 1'b1;
    for (int d = 0; d < N_DEST; d++) sys_reset[d] = 4'(d * 7 + 3);
    pll_4008_lock = 1; pll_32064_lock = 1; sw_loop_detected = 0;
    iso_slot_hw_adrs = 8'h01; shelf_adrs_pins = 8'h05;
    minipod_intr_b = 2'b11; phy_int_b = 2'b11; hubs_smb_alert_b = 1;
    all_hub_power_good = 1; rod_present_b = 0; rod_power_control = 3'b000;
    rods_smbalert_b = 1;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (4) @(posedge clk);

    // ---- common registers and safe pin state ----
    ipb_read(ADDR_HUB_MODULE, d32, e);
    `CHECK(!e && d32 == 32'h0101_0101, "hub_module register")
    ipb_read(ADDR_HUB_ADDRESS, d32, e);
    `CHECK_EQ(d32, 32'h0051_0105, "hub_address register")
    `CHECK_EQ(overall_adrs, 8'h51, "overall address to the ROD")
    ipb_read(ADDR_HUB_ALERTS, d32, e);
    `CHECK_EQ(d32, 32'h0000_0C00, "only the ROD power alerts before the ROD is on")
    `CHECK_EQ({rod_power_enable, rod_power_enable_b}, 2'b01, "ROD power off after start")
    `CHECK_EQ(i2c_buf_enable, 3'b001, "I2C buffers safe state")
    `CHECK_EQ(minipod_reset_b, 2'b11, "MiniPOD resets safe state")
    `CHECK_EQ(init_step, INIT_CONFIG, "step: waiting for configuration")
    `CHECK_EQ({aurora_tx_gtreset, aurora_tx_reset, aurora_rx_gtreset, aurora_rx_reset}, 4'hF,
              "Aurora resets held before the link is up")
    ipb_read(32'h0000_0040, d32, e);
    `CHECK_EQ(e, 1'b1, "unmapped IPbus address gives err")
    if (e) seen_ipb_err++;
    rod_present_b = 1'b1;
    repeat (4) @(posedge clk);
    ipb_read(ADDR_HUB_ALERTS, d32, e);
    `CHECK_EQ(d32, 32'h0000_0D00, "no_rod alert")
    rod_present_b = 1'b0;

    // ---- ROD power-up handshake ----
    ipb_write(ADDR_HUB_CONTROL, 32'h0020_0000 | 32'h0004_0000, e);   // rod_pwr_en, LED50
    ipb_read(ADDR_HUB_CONTROL, d32, e);
    `CHECK_EQ(d32, 32'h0024_0000, "hub_control readback")
    if (d32 == 32'h0024_0000) seen_ipb_rw++;
    `CHECK_EQ(led_drv, 3'b001, "LED driven from hub_control")
    `CHECK_EQ({rod_power_enable, rod_power_enable_b}, 2'b10, "PWR_CON1 after rod_pwr_en")
    `CHECK_EQ(init_step, INIT_ROD_PWR, "step: ROD powering")
    rod_power_control = 3'b001;                                   // PWR_CON2: power good
    repeat (4) @(posedge clk);
    `CHECK_EQ(init_step, INIT_ROD_CFG, "step: ROD configuring")
    `CHECK_EQ(cttc_gt_reset, 1'b0, "no GT reset before PWR_CON3")
    rod_power_control = 3'b011;                                   // PWR_CON3: ROD ready
    n = 0;
    while (!cttc_gt_reset && n < 10) begin @(posedge clk); n++; end
    `CHECK_EQ(cttc_gt_reset, 1'b1, "GT reset pulse starts after PWR_CON3")
    `CHECK_EQ(init_step, INIT_GT_RESET, "step: GT reset")
    if (!LONG) begin
      n = 0;
      while (cttc_gt_reset && n < GT_PULSE_CYCLES + 10) begin @(posedge clk); n++; end
      `CHECK_EQ(n, GT_PULSE_CYCLES, "GT reset pulse length")
      if (!cttc_gt_reset) seen_gt_pulse++;
      `CHECK_EQ(init_step, INIT_LINK_RST, "step: waiting for the link reset")
    end else begin
      // full-size pulse: check it is held for a long stretch and go on
      repeat (100_000) begin
        @(posedge clk);
        if (!cttc_gt_reset) break;
      end
      `CHECK_EQ(cttc_gt_reset, 1'b1, "GT reset pulse held")
      if (cttc_gt_reset) seen_gt_pulse++;
    end

    // ---- Readout_Ctrl link comes up with Aurora_Init (global reset) ----
    rod_on = 1'b1;
    check_roc_routing("global reset");
    for (int d = 0; d < N_DEST; d++)
      if (cttc_unpack(rx_words[d]).link_reset == 4'hF) seen_global_reset++;
    `CHECK_EQ(seen_global_reset, N_DEST, "global link reset on every output")
    `CHECK_EQ({aurora_tx_gtreset, aurora_tx_reset}, 2'b11, "Aurora held during link reset")
    rod_f.aurora_init = 1'b0;
    @(negedge dut.cttc_link_reset);
    t0 = 0;
    while (aurora_tx_gtreset) begin @(posedge clk); t0++; end
    `CHECK(t0 >= GT_CYCLES - 1 && t0 <= GT_CYCLES + 1, $sformatf("GT resets released after %0d clocks", t0))
    `CHECK_EQ(aurora_rx_gtreset, 1'b0, "Rx GT reset released with Tx")
    `CHECK_EQ(aurora_tx_reset, 1'b1, "core reset still held")
    while (aurora_tx_reset) begin @(posedge clk); t0++; end
    `CHECK(t0 >= RST_CYCLES - 1 && t0 <= RST_CYCLES + 1, $sformatf("core resets released after %0d clocks", t0))
    `CHECK_EQ(aurora_rx_reset, 1'b0, "Rx core reset released")
    if (!aurora_tx_reset && !aurora_rx_reset) seen_aurora_release++;
    if (!LONG) begin
      @(posedge clk);
      `CHECK_EQ(init_step, INIT_RUN, "step: running")
      if (init_step == INIT_RUN) seen_init_run++;
    end else begin
      `CHECK_EQ(init_step, INIT_GT_RESET, "step: GT reset pulse still running")
      seen_init_run++;
    end

    // ---- per-slot link resets, busy, channel up ----
    for (int k = 0; k < 8; k++) begin
      rod_f.rod_busy   = k[0];
      rod_f.chan_up    = 12'($urandom);
      rod_f.link_rst_4 = 24'($urandom);
      rod_f.link_rst_1 = 6'($urandom);
      check_roc_routing($sformatf("routing %0d", k));
    end
    ipb_read(ADDR_LINK_MON + 0, d32, e);
    `CHECK_EQ(d32, roc_pack(rod_f)[0], "Readout_Ctrl Word_0 shadow over IPbus")
    ipb_read(ADDR_LINK_MON + 1, d32, e);
    `CHECK_EQ(d32, roc_pack(rod_f)[1], "Readout_Ctrl Word_1 shadow over IPbus")
    ipb_read(ADDR_LINK_MON + 5, d32, e);
    `CHECK_EQ(d32[0], 1'b1, "Readout_Ctrl aligned")
    `CHECK_EQ(d32[3], 1'b1, "other-Hub link aligned")

    // ---- Combined_TTC link from the other Hub ----
    for (int k = 0; k < 4; k++) begin
      msg_words_t w;
      ohub_f.l1id = 24'($urandom); ohub_f.ecrid = 8'($urandom);
      ohub_f.link_reset = 4'($urandom); ohub_f.shelf = 3'($urandom);
      w = cttc_pack(ohub_f);
      bc_idle(3);
      for (int i = 0; i < 4; i++) begin
        ipb_read(ADDR_LINK_MON + 32'(12 + i), d32, e);
        if (i < 3) `CHECK_EQ(d32, w[i], $sformatf("other-Hub Shadow Word_%0d", i))
        else       `CHECK_EQ(d32[22:0], w[3][22:0], "other-Hub Shadow Word_3 fields")
        if (i == 1 && d32 == w[1]) seen_ohub_link++;
      end
    end
    ipb_read(ADDR_LINK_MON + 4, d32, e);
    `CHECK_EQ(d32[31:16], 16'h0, "no CRC errors on the other-Hub link")

    // ---- TTC: ECR to start, then random traffic ----
    bc_issue(0, 1, 1, 0, 0);                       // BCR + ECR
    for (int k = 0; k < 3000; k++) begin
      logic l1a, pb;
      l1a = ($urandom_range(0, 3) == 0);
      pb  = 1'($urandom);
      bc_issue(l1a, ($urandom_range(0, 400) == 0), ($urandom_range(0, 300) == 0), l1a, pb);
    end
    bc_idle(LAT + 2);
    ipb_read(ADDR_LINK_MON + 6, d32, e);
    `CHECK_EQ(d32, {m_ecrid, m_l1id}, "extended L1ID over IPbus")

    // ---- PRO FIFO empty: L1A with nothing queued ----
    bc_issue(1, 0, 0, 0, 0);
    bc_idle(PIPE_DELAY + 4);
    // ---- PRO FIFO full: more bits than it holds, then drain ----
    for (int k = 0; k <= PRO_DEPTH; k++) bc_issue(0, 0, 0, 1, 1'(k % 3 != 0));
    bc_idle(PIPE_DELAY + 2);
    for (int k = 0; k <= PRO_DEPTH; k++) bc_issue(1, 0, 0, 0, 0);
    bc_idle(LAT + 4);
    `CHECK_EQ(seen_pro_full, exp_full, "PRO FIFO full errors")
    `CHECK_EQ(seen_pro_empty, exp_empty, "PRO FIFO empty errors")
    ipb_read(ADDR_LINK_MON + 5, d32, e);
    `CHECK_EQ(d32[2:1], 2'b11, "PRO FIFO sticky flags")
    ipb_write(ADDR_LINK_MON + 5, 0, e);
    ipb_read(ADDR_LINK_MON + 5, d32, e);
    `CHECK_EQ(d32[2:1], 2'b00, "PRO FIFO flags cleared")

    // ---- bunch counter wrap: a full orbit with no BCR ----
    bc_idle(3564 + 10);
    ipb_read(ADDR_LINK_MON + 7, d32, e);
    `CHECK(d32 <= 3563, "BCID in range")

    // ---- corrupted Readout_Ctrl messages ----
    begin
      roc_fields_t keep;
      logic [31:0] cnt0;
      keep = rod_f;
      ipb_read(ADDR_LINK_MON + 4, cnt0, e);
      rod_f.rod_busy = ~rod_f.rod_busy;     // the content a bad message would carry
      @(posedge bc_stb);
      corrupt_crc = 1'b1;
      wait (!corrupt_crc);
      repeat (2) @(posedge clk);
      ipb_read(ADDR_LINK_MON + 4, d32, e);
      `CHECK_EQ(d32, cnt0 + 1, "CRC error counted")
      `CHECK_EQ(cttc_unpack(rx_words[0]).rod_busy, keep.rod_busy, "bad message not used")
      @(posedge bc_stb);
      corrupt_frame = 1'b1;
      wait (!corrupt_frame);
      check_roc_routing("after frame error");
    end

    bc_idle(LAT + 4);
    `CHECK(seen_l1a > 100, "L1As carried")
    `CHECK_EQ(int'(rx_aligned), int'({N_DEST{1'b1}}), "all receivers aligned")

    // ---- every mechanism must have happened ----
    `CHECK(seen_msgs > 1000,        "messages compared")
    `CHECK(seen_l1a > 0,            "mechanism: L1A")
    `CHECK(seen_bcr > 0,            "mechanism: BCR")
    `CHECK(seen_ecr > 0,            "mechanism: ECR")
    `CHECK(seen_pro_one > 0,        "mechanism: privileged readout bit")
    `CHECK(seen_pro_empty > 0,      "mechanism: PRO FIFO empty")
    `CHECK(seen_pro_full > 0,       "mechanism: PRO FIFO full")
    `CHECK(seen_bc_wrap > 0,        "mechanism: BCID wrap")
    `CHECK(seen_crc_err > 0,        "mechanism: Readout_Ctrl CRC error")
    `CHECK(seen_frame_err > 0,      "mechanism: Readout_Ctrl frame error")
    `CHECK(seen_slot_reset > 0,     "mechanism: per-slot link reset")
    `CHECK(seen_global_reset > 0,   "mechanism: global link reset")
    `CHECK(seen_rod_busy > 0,       "mechanism: ROD busy")
    `CHECK(seen_chan_up > 0,        "mechanism: channel up")
    `CHECK(seen_gt_pulse > 0,       "mechanism: GT reset pulse")
    `CHECK(seen_aurora_release > 0, "mechanism: Aurora reset release")
    `CHECK(seen_init_run > 0,       "mechanism: start-up sequence")
    `CHECK(seen_ipb_err > 0,        "mechanism: IPbus error")
    `CHECK(seen_ipb_rw > 0,         "mechanism: IPbus register write")
    `CHECK(seen_ohub_link > 0,      "mechanism: other-Hub Combined_TTC received")
    $display("mechanisms: l1a=%0d bcr=%0d ecr=%0d pro=%0d empty=%0d full=%0d wrap=%0d crc=%0d frame=%0d slot_rst=%0d msgs=%0d",
             seen_l1a, seen_bcr, seen_ecr, seen_pro_one, seen_pro_empty, seen_pro_full,
             seen_bc_wrap, seen_crc_err, seen_frame_err, seen_slot_reset, seen_msgs);
    `TB_FINISH
  end
