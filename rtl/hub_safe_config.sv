// hub_safe_config: board control and monitoring pins of the Hub FPGA.
//
// This is the part of the firmware present in every Hub configuration: it
// puts every board control output into a safe state after power-on and
// collects every monitored board input.
//   * Outputs with a hub_control bit are driven from it; at power-on
//     hub_control is all zero, which gives the safe defaults of the pin
//     table: MGT fan-out equalisation, LEDs and switch loop-detect controls
//     0; MiniPOD resets (active low) 1; I2C buffer 1501 enabled, 1502/1503
//     disabled (ENABLE = default XOR i2c_buf_dis); ROD power enable 0 and
//     its active-low twin 1 (from PWR_CON1 of the start-up sequence);
//     OVERALL_ADRS carries the generated address to the ROD.
//   * Outputs with no control bit (second 40 MHz fan-out select, access
//     signals, spare links, switch MDC, MiniPOD SCL) stay at their default 0.
//   * Monitored inputs pass through two-flop synchronisers; active-low pins
//     are inverted so that every hub_alerts bit is 1 on a problem.
// The pin list, directions and default values follow the safe
// configuration table; the mapping of control bits and alert bits to pins
// (and rod_status = {0, ROD not ready, ROD not powered}) is this design's
// choice.  Differential clock buffers, I/O standards and locations belong
// to the board constraints and are not part of this logic.
module hub_safe_config
  import hub_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  hub_control_t ctrl,
  input  logic         pwr_con1,             // ROD power on request
  input  logic [7:0]   adrs_to_rod,
  // monitored pins
  input  logic         pll_4008_lock,
  input  logic         pll_32064_lock,
  input  logic [2:0]   sw_loop_detected,
  input  logic [7:0]   iso_slot_hw_adrs,
  input  logic [7:0]   shelf_adrs_pins,
  input  logic [1:0]   minipod_intr_b,       // {Trans, Recvr}
  input  logic [1:0]   phy_int_b,            // {U22, U21}
  input  logic         hubs_smb_alert_b,
  input  logic         all_hub_power_good,
  input  logic         rod_present_b,
  input  logic [2:0]   rod_power_control,    // PWR_CON2..PWR_CON4
  input  logic         rods_smbalert_b,
  // controlled pins
  output logic         select_input_second_40_fanout,
  output logic [2:0]   sw_atc_loop_det,
  output logic [2:0]   sw_mdc,
  output logic [7:0]   overall_adrs,
  output logic [2:0]   i2c_buf_enable,       // 1501, 1502, 1503
  output logic [1:0]   minipod_reset_b,      // {Trans, Recvr}
  output logic [1:0]   minipod_scl,
  output logic [1:0]   access_signal,
  output logic [2:0]   led_drv,              // LED50..52
  output logic [12:0]  mgt_fo_equ_enb,       // GRP_1..GRP_13
  output logic [3:0]   spare_link,
  output logic         rod_power_enable,
  output logic         rod_power_enable_b,
  output logic         fex_clk_dis,
  // to the rest of the firmware
  output hub_alerts_t  alerts,
  output logic [7:0]   shelf_adrs,
  output logic [7:0]   slot_adrs,
  output logic         pwr_con2,
  output logic         pwr_con3
);

  localparam logic [2:0] I2C_BUF_DEFAULT = 3'b001;

  // ---- monitored inputs: two-flop synchronisers ----
  localparam int NMON = 2 + 3 + 8 + 8 + 2 + 2 + 1 + 1 + 1 + 3 + 1;
  logic [NMON-1:0] mon_raw, mon_s1, mon_s2;

  assign mon_raw = {pll_4008_lock, pll_32064_lock, sw_loop_detected,
                    iso_slot_hw_adrs, shelf_adrs_pins, minipod_intr_b,
                    phy_int_b, hubs_smb_alert_b, all_hub_power_good,
                    rod_present_b, rod_power_control, rods_smbalert_b};

  always_ff @(posedge clk) begin
    if (rst) begin
      mon_s1 <= '0;
      mon_s2 <= '0;
    end else begin
      mon_s1 <= mon_raw;
      mon_s2 <= mon_s1;
    end
  end

  logic       s_pll_4008, s_pll_32064, s_hubs_smb_b, s_pwr_good, s_rod_present_b, s_rods_smb_b;
  logic [2:0] s_loop, s_rod_pc;
  logic [7:0] s_slot, s_shelf;
  logic [1:0] s_mpod_b, s_phy_b;

  assign {s_pll_4008, s_pll_32064, s_loop, s_slot, s_shelf, s_mpod_b, s_phy_b,
          s_hubs_smb_b, s_pwr_good, s_rod_present_b, s_rod_pc, s_rods_smb_b} = mon_s2;

  always_comb begin
    alerts                = '0;
    alerts.no_pll_lock    = {~s_pll_32064, ~s_pll_4008};
    alerts.phy_int        = ~s_phy_b;
    alerts.mpod_int       = ~s_mpod_b;
    alerts.hub_smb_alert  = ~s_hubs_smb_b;
    alerts.hub_pwr_not_ok = ~s_pwr_good;
    alerts.no_rod         = s_rod_present_b;
    alerts.rod_smb_alert  = ~s_rods_smb_b;
    alerts.rod_status     = {1'b0, ~s_rod_pc[1], ~s_rod_pc[0]};
    alerts.no_sw_loop_det = s_loop;
  end

  assign shelf_adrs = s_shelf;
  assign slot_adrs  = s_slot;
  assign pwr_con2   = s_rod_pc[0];
  assign pwr_con3   = s_rod_pc[1];

  // ---- controlled outputs ----
  assign select_input_second_40_fanout = 1'b0;
  assign sw_atc_loop_det    = ctrl.sw_loop_det;
  assign sw_mdc             = '0;
  assign overall_adrs       = adrs_to_rod;
  assign i2c_buf_enable     = I2C_BUF_DEFAULT ^ ctrl.i2c_buf_dis;
  assign minipod_reset_b    = ~ctrl.mpod_rst;
  assign minipod_scl        = '0;
  assign access_signal      = '0;
  assign led_drv            = ctrl.led_drv;
  assign mgt_fo_equ_enb     = ctrl.mgt_equ;
  assign spare_link         = '0;
  assign rod_power_enable   = pwr_con1;
  assign rod_power_enable_b = ~pwr_con1;
  assign fex_clk_dis        = ctrl.fex_clk_dis;

endmodule
