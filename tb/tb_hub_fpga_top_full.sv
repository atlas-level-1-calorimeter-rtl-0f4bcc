// tb_hub_fpga_top_full: the end-to-end test of tb_hub_fpga_top run on the
// Hub as built, with every parameter at its default (TTC pipeline of 8 LHC
// clocks, 16-entry PRO FIFO, 1 s Combined_TTC GT reset pulse, 1250/2500
// clock Aurora reset timer).  The GT reset pulse is 125 million clocks
// here, so the test checks that it starts and is held for 100 000 clocks
// and then runs the rest of the sequence (link reset, Aurora reset
// release, TTC, PRO FIFO, BCID wrap, routing, error injection, IPbus)
// while the pulse is still on.  The checking is in
// tb_hub_fpga_top_body.svh; the localparams below restate the defaults.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_hub_fpga_top_full;
  import hub_pkg::*;
  localparam int PIPE_DELAY      = 8;
  localparam int PRO_DEPTH       = 16;
  localparam int GT_PULSE_CYCLES = 125_000_000;
  localparam int GT_CYCLES       = 1250;
  localparam int RST_CYCLES      = 2500;

  `include "tb/tb_hub_fpga_top_body.svh"

  hub_fpga_top dut (.*);
endmodule
