// tb_hub_regs: reads the constant and pin-fed registers, writes random
// values to hub_control and reads them back, checks that writes to the
// read-only registers change nothing, that the ack comes one clock after
// the strobe and that reset brings hub_control back to all zero.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_hub_regs;
  import hub_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  ipb_wbus_t    ipb_in;
  ipb_rbus_t    ipb_out;
  logic [7:0]   shelf_adrs, slot_adrs, adrs_to_rod;
  hub_alerts_t  alerts;
  hub_control_t ctrl;

  `include "tb/tb_ipbus_tasks.svh"

  hub_regs #(.MODULE_TYPE(8'hA1), .HW_REVISION(8'hB2), .FW_TYPE(8'hC3), .FW_VERSION(8'hD4)) dut (.*);

  always #16 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    logic [31:0] d, model_ctrl;
    logic e;
    ipb_in = '0;
    shelf_adrs = 8'h05; slot_adrs = 8'h02; alerts = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    `CHECK_EQ(32'(ctrl), 32'h0, "hub_control zero after reset")
    ipb_read(ADDR_HUB_MODULE, d, e);
    `CHECK_EQ(e, 1'b0, "module read acked")
    `CHECK_EQ(ipb_latency, 1, "ack one clock after strobe")
    `CHECK_EQ(d, 32'hD4C3B2A1, "module register")
    model_ctrl = 0;
    for (int n = 0; n < 400; n++) begin
      shelf_adrs = 8'($urandom); slot_adrs = 8'($urandom);
      alerts = hub_alerts_t'($urandom);
      #1;
      `CHECK_EQ(adrs_to_rod, {shelf_adrs[3:0], slot_adrs[3:0]}, "adrs_to_rod formula")
      case (n % 6)
        0: begin
          ipb_read(ADDR_HUB_ADDRESS, d, e);
          `CHECK_EQ(d, {8'h0, shelf_adrs[3:0], slot_adrs[3:0], slot_adrs, shelf_adrs}, "hub_address")
        end
        1: begin
          ipb_read(ADDR_HUB_ALERTS, d, e);
          `CHECK_EQ(d, 32'(alerts), "hub_alerts")
        end
        2: begin
          model_ctrl = $urandom;
          ipb_write(ADDR_HUB_CONTROL, model_ctrl, e);
          `CHECK_EQ(e, 1'b0, "control write acked")
          `CHECK_EQ(32'(ctrl), model_ctrl, "control output follows write")
        end
        3: begin
          ipb_read(ADDR_HUB_CONTROL, d, e);
          `CHECK_EQ(d, model_ctrl, "control readback")
        end
        4: begin
          ipb_write(32'($urandom_range(0, 2)), $urandom, e);
          `CHECK_EQ(e, 1'b0, "read-only write acked")
          `CHECK_EQ(32'(ctrl), model_ctrl, "read-only write leaves control")
          ipb_read(ADDR_HUB_MODULE, d, e);
          `CHECK_EQ(d, 32'hD4C3B2A1, "module register unchanged")
        end
        default: begin
          ipb_read(ADDR_HUB_CONTROL, d, e);
          `CHECK_EQ(ipb_latency, 1, "ack latency")
          `CHECK_EQ(ctrl.rod_pwr_en, model_ctrl[21], "rod_pwr_en at bit 21")
          `CHECK_EQ(ctrl.mgt_equ, model_ctrl[14:2], "mgt_equ at bits 2..14")
        end
      endcase
    end
    // a held strobe gives one ack per two clocks, not a continuous ack
    ipb_in.strobe <= 1'b1; ipb_in.write <= 1'b0; ipb_in.addr <= ADDR_HUB_MODULE;
    begin
      int acks = 0;
      repeat (10) begin @(posedge clk); #1; if (ipb_out.ack) acks++; end
      `CHECK_EQ(acks, 5, "held strobe acked every other clock")
    end
    ipb_in.strobe <= 1'b0;
    rst <= 1'b1;
    @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    `CHECK_EQ(32'(ctrl), 32'h0, "reset clears hub_control")
    `TB_FINISH
  end
endmodule
