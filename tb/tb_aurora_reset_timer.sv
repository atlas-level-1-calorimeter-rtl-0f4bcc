// tb_aurora_reset_timer: after firmware reset and after every trailing edge
// of the link reset the GT resets must stay high exactly GT_CYCLES clocks
// and the core resets exactly RST_CYCLES clocks (Tx and Rx alike); while the
// link reset is high all four are held.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_aurora_reset_timer;
  localparam int GT = 13, RST = 31;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, link_reset = 0;
  logic tx_gtreset, tx_reset, rx_gtreset, rx_reset, busy;
  int n_gt, n_rst;

  aurora_reset_timer #(.GT_CYCLES(GT), .RST_CYCLES(RST)) dut (.*);

  always #4 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  // count the clocks from "now" for which each reset stays high
  task automatic measure();
    n_gt = 0; n_rst = 0;
    for (int i = 0; i < RST + 10; i++) begin
      #1;
      `CHECK_EQ(tx_gtreset, rx_gtreset, "Tx/Rx GT resets equal")
      `CHECK_EQ(tx_reset, rx_reset, "Tx/Rx resets equal")
      if (tx_gtreset) n_gt++;
      if (tx_reset)   n_rst++;
      @(posedge clk);
    end
  endtask

  initial begin
    @(posedge clk);
    rst <= 0;
    measure();
    `CHECK_EQ(n_gt, GT, "GT reset after firmware reset")
    `CHECK_EQ(n_rst, RST, "core reset after firmware reset")
    for (int k = 0; k < 10; k++) begin
      link_reset <= 1;
      repeat ($urandom_range(1, 50)) begin
        @(posedge clk); #1;
        `CHECK(tx_gtreset && tx_reset && rx_gtreset && rx_reset, "held during link reset")
      end
      link_reset <= 0;
      measure();
      `CHECK_EQ(n_gt, GT, "GT reset after trailing edge")
      `CHECK_EQ(n_rst, RST, "core reset after trailing edge")
      `CHECK_EQ(busy, 1'b0, "timer finished")
    end
    `TB_FINISH
  end
endmodule
