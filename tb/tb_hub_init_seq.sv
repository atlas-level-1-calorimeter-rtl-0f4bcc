// tb_hub_init_seq: walks the Hub through the start-up steps with a model
// of the ROD handshake and checks each step: PWR_CON1 only after
// configuration and rod_pwr_en; the Combined_TTC GT reset pulse of
// GT_PULSE_CYCLES on the rising edge of PWR_CON3; the link reset held until
// Readout_Ctrl is received and while Aurora_Init is set; the Aurora resets
// released GT_CYCLES / RST_CYCLES after Aurora_Init drops; step = RUN last.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_hub_init_seq;
  import hub_pkg::*;
  localparam int GTP = 20, GT = 5, RST = 11;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic rod_pwr_en = 0, pwr_con2 = 0, pwr_con3 = 0, roc_msg_ok = 0, aurora_init = 0;
  logic pwr_con1, cttc_gt_reset, cttc_link_reset;
  logic aurora_tx_gtreset, aurora_tx_reset, aurora_rx_gtreset, aurora_rx_reset;
  init_step_t step;
  int n;

  hub_init_seq #(.GT_PULSE_CYCLES(GTP), .GT_CYCLES(GT), .RST_CYCLES(RST)) dut (.*);

  always #4 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk); #1;
    `CHECK_EQ(pwr_con1, 1'b0, "no ROD power before rod_pwr_en")
    `CHECK_EQ(step, INIT_CONFIG, "step 1")
    `CHECK_EQ(cttc_link_reset, 1'b1, "link reset held before Readout_Ctrl")
    // PWR_CON3 without power request: no GT pulse
    pwr_con3 <= 1; repeat (2) @(posedge clk); #1;
    `CHECK_EQ(cttc_gt_reset, 1'b0, "no GT pulse without PWR_CON1")
    pwr_con3 <= 0;
    rod_pwr_en <= 1; @(posedge clk); #1;
    `CHECK_EQ(pwr_con1, 1'b1, "PWR_CON1 follows rod_pwr_en")
    `CHECK_EQ(step, INIT_ROD_PWR, "step 2")
    repeat (3) @(posedge clk);
    pwr_con2 <= 1; @(posedge clk); #1;
    `CHECK_EQ(step, INIT_ROD_CFG, "step 3")
    repeat (3) @(posedge clk);
    pwr_con3 <= 1; @(posedge clk); #1;
    `CHECK_EQ(cttc_gt_reset, 1'b1, "GT pulse starts on PWR_CON3")
    `CHECK_EQ(step, INIT_GT_RESET, "step 4")
    // Readout_Ctrl arrives with Aurora_Init set
    aurora_init <= 1; roc_msg_ok <= 1; @(posedge clk); roc_msg_ok <= 0;
    n = 1; #1;
    while (cttc_gt_reset) begin n++; @(posedge clk); #1; end
    `CHECK_EQ(n, GTP, "GT pulse width")
    `CHECK_EQ(step, INIT_LINK_RST, "step 6: waiting for Aurora_Init to drop")
    `CHECK_EQ(cttc_link_reset, 1'b1, "link reset follows Aurora_Init")
    `CHECK(aurora_rx_reset && aurora_rx_gtreset && aurora_tx_reset && aurora_tx_gtreset, "Aurora held")
    repeat (5) @(posedge clk);
    aurora_init <= 0;
    // count from the first clock with the link reset released
    begin
      int ngt, nrst;
      ngt = 0; nrst = 0;
      for (int i = 0; i < RST + 5; i++) begin
        #1;
        if (i == 0) begin
          `CHECK_EQ(cttc_link_reset, 1'b0, "link reset released")
        end
        if (i == 2) begin
          `CHECK_EQ(step, INIT_AURORA, "step 7: channel reset timer running")
        end
        if (aurora_rx_gtreset) ngt++;
        if (aurora_rx_reset)   nrst++;
        @(posedge clk);
      end
      `CHECK_EQ(ngt, GT, "Aurora GT reset length")
      `CHECK_EQ(nrst, RST, "Aurora reset length")
    end
    #1;
    `CHECK_EQ(step, INIT_RUN, "step 8: running")
    // a later Aurora_Init (ROD re-initialises the links) restarts the timer
    aurora_init <= 1; repeat (3) @(posedge clk); #1;
    `CHECK_EQ(step, INIT_LINK_RST, "re-initialisation")
    aurora_init <= 0; repeat (RST + 3) @(posedge clk); #1;
    `CHECK_EQ(step, INIT_RUN, "back to running")
    `TB_FINISH
  end
endmodule
