// hub_init_seq: Hub side of the ROD power-up and Aurora link start-up.
//
// Follows the numbered steps of the initialisation proposal:
//   1 Hub configured (firmware reset released);
//   2 Hub asserts PWR_CON1 (ROD power on) -- here when the hub_control bit
//     rod_pwr_en is set;
//   3 ROD answers PWR_CON2 (power good); 4 ROD asserts PWR_CON3 (ready);
//   4/5 on the rising edge of PWR_CON3 the Hub sends a Combined_TTC GT reset
//     pulse of GT_PULSE_CYCLES clocks (pulse_timer);
//   6 the Readout_Ctrl Aurora_Init (Global_Link_Reset) is propagated as the
//     Combined_TTC link reset; until a first good Readout_Ctrl message has
//     been received the link reset is held;
//   7/8 on its trailing edge the Aurora channel reset timer runs in every
//     end at once (aurora_reset_timer), releasing the Hub's Aurora resets;
//   9 the receivers report channel up (outside the Hub).
// 'step' reports the step reached, for monitoring.
//
// Interface: all inputs are synchronous to clk.  PWR_CON4 is reserved and
// not used.  The order of steps and the triggers come from the
// specification's sequence; gating by rod_pwr_en, holding the link reset
// until Readout_Ctrl is received and the 'step' encoding are this design's
// choices, as are the pulse and timer lengths (in clock cycles).
module hub_init_seq
  import hub_pkg::*;
#(
  parameter int GT_PULSE_CYCLES = 125_000_000,  // ~1 s at 125 MHz
  parameter int GT_CYCLES       = 1250,
  parameter int RST_CYCLES      = 2500
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rod_pwr_en,
  input  logic       pwr_con2,      // ROD power good
  input  logic       pwr_con3,      // ROD ready to run
  input  logic       roc_msg_ok,    // good Readout_Ctrl message received
  input  logic       aurora_init,   // Readout_Ctrl Global_Link_Reset
  output logic       pwr_con1,      // ROD power on
  output logic       cttc_gt_reset,
  output logic       cttc_link_reset,
  output logic       aurora_tx_gtreset,
  output logic       aurora_tx_reset,
  output logic       aurora_rx_gtreset,
  output logic       aurora_rx_reset,
  output init_step_t step
);

  logic config_done, pwr_con3_q, roc_seen, timer_busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      config_done <= 1'b0;
      pwr_con3_q  <= 1'b0;
      roc_seen    <= 1'b0;
    end else begin
      config_done <= 1'b1;
      pwr_con3_q  <= pwr_con3;
      if (roc_msg_ok) roc_seen <= 1'b1;
    end
  end

  assign pwr_con1        = config_done && rod_pwr_en;
  assign cttc_link_reset = !roc_seen || aurora_init;

  pulse_timer #(.WIDTH(32), .COUNT(32'(GT_PULSE_CYCLES))) u_gt_pulse (
    .clk, .rst,
    .trig (pwr_con3 && !pwr_con3_q && pwr_con1),
    .pulse(cttc_gt_reset)
  );

  aurora_reset_timer #(.GT_CYCLES(GT_CYCLES), .RST_CYCLES(RST_CYCLES)) u_aurora_timer (
    .clk, .rst,
    .link_reset (cttc_link_reset),
    .tx_gtreset (aurora_tx_gtreset),
    .tx_reset   (aurora_tx_reset),
    .rx_gtreset (aurora_rx_gtreset),
    .rx_reset   (aurora_rx_reset),
    .busy       (timer_busy)
  );

  always_comb begin
    if      (!pwr_con1)       step = INIT_CONFIG;
    else if (!pwr_con2)       step = INIT_ROD_PWR;
    else if (!pwr_con3)       step = INIT_ROD_CFG;
    else if (cttc_gt_reset)   step = INIT_GT_RESET;
    else if (cttc_link_reset) step = INIT_LINK_RST;
    else if (timer_busy)      step = INIT_AURORA;
    else                      step = INIT_RUN;
  end

endmodule
