// tb_hub_safe_config: checks the safe default of every controlled pin with
// hub_control all zero, the control-bit to pin mapping for random control
// words, and that each monitored pin reaches its alert bit (active-low pins
// inverted) exactly two clocks after it changes.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_hub_safe_config;
  import hub_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  hub_control_t ctrl;
  logic         pwr_con1;
  logic [7:0]   adrs_to_rod;
  logic         pll_4008_lock, pll_32064_lock;
  logic [2:0]   sw_loop_detected;
  logic [7:0]   iso_slot_hw_adrs, shelf_adrs_pins;
  logic [1:0]   minipod_intr_b, phy_int_b;
  logic         hubs_smb_alert_b, all_hub_power_good, rod_present_b;
  logic [2:0]   rod_power_control;
  logic         rods_smbalert_b;
  logic         select_input_second_40_fanout;
  logic [2:0]   sw_atc_loop_det, sw_mdc;
  logic [7:0]   overall_adrs;
  logic [2:0]   i2c_buf_enable;
  logic [1:0]   minipod_reset_b, minipod_scl, access_signal;
  logic [2:0]   led_drv;
  logic [12:0]  mgt_fo_equ_enb;
  logic [3:0]   spare_link;
  logic         rod_power_enable, rod_power_enable_b, fex_clk_dis;
  hub_alerts_t  alerts;
  logic [7:0]   shelf_adrs, slot_adrs;
  logic         pwr_con2, pwr_con3;

  hub_safe_config dut (.*);

  always #16 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  function automatic hub_alerts_t exp_alerts();
    hub_alerts_t x;
    x = '0;
    x.no_pll_lock    = {~pll_32064_lock, ~pll_4008_lock};
    x.phy_int        = ~phy_int_b;
    x.mpod_int       = ~minipod_intr_b;
    x.hub_smb_alert  = ~hubs_smb_alert_b;
    x.hub_pwr_not_ok = ~all_hub_power_good;
    x.no_rod         = rod_present_b;
    x.rod_smb_alert  = ~rods_smbalert_b;
    x.rod_status     = {1'b0, ~rod_power_control[1], ~rod_power_control[0]};
    x.no_sw_loop_det = sw_loop_detected;
    return x;
  endfunction

  task automatic randomise_pins();
    {pll_4008_lock, pll_32064_lock, sw_loop_detected, minipod_intr_b, phy_int_b,
     hubs_smb_alert_b, all_hub_power_good, rod_present_b, rod_power_control,
     rods_smbalert_b} = 18'($urandom);
    iso_slot_hw_adrs = 8'($urandom);
    shelf_adrs_pins  = 8'($urandom);
  endtask

  initial begin
    ctrl = '0; pwr_con1 = 0; adrs_to_rod = 8'h00;
    randomise_pins();
    repeat (3) @(posedge clk);
    rst <= 0;
    #1;
    // safe defaults
    `CHECK_EQ(select_input_second_40_fanout, 1'b0, "second 40 MHz select default 0")
    `CHECK_EQ(sw_atc_loop_det, 3'b000, "ATC loop detect default 0")
    `CHECK_EQ(sw_mdc, 3'b000, "switch MDC default 0")
    `CHECK_EQ(i2c_buf_enable, 3'b001, "I2C buffer 1501 enabled, others disabled")
    `CHECK_EQ(minipod_reset_b, 2'b11, "MiniPOD resets default 1")
    `CHECK_EQ(minipod_scl, 2'b00, "MiniPOD SCL default 0")
    `CHECK_EQ(access_signal, 2'b00, "access signals default 0")
    `CHECK_EQ(led_drv, 3'b000, "LEDs default 0")
    `CHECK_EQ(mgt_fo_equ_enb, 13'h0, "MGT equalisation default 0")
    `CHECK_EQ(spare_link, 4'h0, "spare links default 0")
    `CHECK_EQ(rod_power_enable, 1'b0, "ROD power enable default 0")
    `CHECK_EQ(rod_power_enable_b, 1'b1, "ROD power enable_b default 1")
    `CHECK_EQ(overall_adrs, 8'h00, "overall address")
    // control mapping
    for (int n = 0; n < 300; n++) begin
      ctrl = hub_control_t'($urandom);
      pwr_con1 = 1'($urandom);
      adrs_to_rod = 8'($urandom);
      #1;
      `CHECK_EQ(sw_atc_loop_det, ctrl.sw_loop_det, "loop detect control")
      `CHECK_EQ(i2c_buf_enable, 3'b001 ^ ctrl.i2c_buf_dis, "I2C buffer control")
      `CHECK_EQ(minipod_reset_b, ~ctrl.mpod_rst, "MiniPOD reset control")
      `CHECK_EQ(led_drv, ctrl.led_drv, "LED control")
      `CHECK_EQ(mgt_fo_equ_enb, ctrl.mgt_equ, "MGT equalisation control")
      `CHECK_EQ(fex_clk_dis, ctrl.fex_clk_dis, "FEX clock disable")
      `CHECK_EQ({rod_power_enable, rod_power_enable_b}, {pwr_con1, ~pwr_con1}, "ROD power enable pair")
      `CHECK_EQ(overall_adrs, adrs_to_rod, "overall address")
    end
    // monitored pins: two-clock synchroniser
    for (int n = 0; n < 300; n++) begin
      hub_alerts_t prev_alerts, want;
      logic [7:0] sh, sl;
      logic [2:0] pc;
      @(negedge clk);
      prev_alerts = alerts;
      randomise_pins();
      want = exp_alerts();
      sh = shelf_adrs_pins; sl = iso_slot_hw_adrs; pc = rod_power_control;
      @(posedge clk); #1;
      `CHECK_EQ(alerts, prev_alerts, "no change after one clock")
      @(posedge clk); #1;
      `CHECK_EQ(alerts, want, "alerts after two clocks")
      `CHECK_EQ(shelf_adrs, sh, "shelf address")
      `CHECK_EQ(slot_adrs, sl, "slot address")
      `CHECK_EQ({pwr_con3, pwr_con2}, pc[1:0], "PWR_CON2/3")
    end
    // all-good pins give all-zero alerts
    @(negedge clk);
    {pll_4008_lock, pll_32064_lock} = 2'b11; sw_loop_detected = 0; minipod_intr_b = 2'b11;
    phy_int_b = 2'b11; hubs_smb_alert_b = 1; all_hub_power_good = 1; rod_present_b = 0;
    rod_power_control = 3'b111; rods_smbalert_b = 1;
    repeat (2) @(posedge clk);
    #1;
    `CHECK_EQ(32'(alerts), 32'h0, "all alerts 0 in normal operation")
    `TB_FINISH
  end
endmodule
