// tb_hub_fpga_top: end-to-end test of the Hub firmware with short timers
// and a short TTC pipeline, so that the whole start-up sequence (ROD power
// handshake, GT reset pulse, link reset, Aurora reset release) runs to the
// end.  Then TTC traffic, PRO FIFO empty/full, a BCID wrap, per-slot link
// resets, corrupted Readout_Ctrl messages and IPbus access are checked on
// all 14 Combined_TTC outputs.  The checking is in tb_hub_fpga_top_body.svh.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_hub_fpga_top;
  import hub_pkg::*;
  localparam int PIPE_DELAY      = 3;
  localparam int PRO_DEPTH       = 4;
  localparam int GT_PULSE_CYCLES = 40;
  localparam int GT_CYCLES       = 8;
  localparam int RST_CYCLES      = 16;

  `include "tb/tb_hub_fpga_top_body.svh"

  hub_fpga_top #(
    .PIPE_DELAY(PIPE_DELAY), .PRO_DEPTH(PRO_DEPTH), .GT_PULSE_CYCLES(GT_PULSE_CYCLES),
    .GT_CYCLES(GT_CYCLES), .RST_CYCLES(RST_CYCLES)
  ) dut (.*);
endmodule
