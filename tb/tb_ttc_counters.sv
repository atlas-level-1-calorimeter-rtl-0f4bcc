// tb_ttc_counters: random L1A/BCR/ECR for more than one LHC orbit (3564
// bunch crossings) with a plain integer reference model: BCID wraps after
// 3563 and is cleared by BCR, L1ID counts L1As and restarts at -1 on ECR
// (first L1A after an ECR is 0), ECRID counts ECRs.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_ttc_counters;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, bc_stb = 0, l1a = 0, bcr = 0, ecr = 0;
  logic [11:0] bcid;
  logic [23:0] l1id;
  logic [7:0]  ecrid;
  int ref_bc, ref_l1, ref_ecr, wraps;

  ttc_counters dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    ref_bc = 3563; ref_l1 = 32'hFFFFFF; ref_ecr = 0; wraps = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 9000; n++) begin
      logic a, b, e;
      a = ($urandom_range(0, 9) == 0);
      b = (n > 8000) && ($urandom_range(0, 200) == 0);   // BCR late only, so wraps happen first
      e = ($urandom_range(0, 300) == 0);
      l1a <= a; bcr <= b; ecr <= e; bc_stb <= 1'b1;
      // reference: value including this crossing
      if (b || ref_bc == 3563) begin
        if (!b) wraps++;
        ref_bc = 0;
      end else ref_bc++;
      if (e) begin ref_l1 = 32'hFFFFFF; ref_ecr = (ref_ecr + 1) % 256; end
      if (a) ref_l1 = (ref_l1 + 1) % (1 << 24);
      #1;
      `CHECK_EQ(bcid,  12'(ref_bc), "BCID")
      `CHECK_EQ(l1id,  24'(ref_l1), $sformatf("L1ID n=%0d a=%0b e=%0b", n, a, e))
      `CHECK_EQ(ecrid, 8'(ref_ecr), "ECRID")
      @(posedge clk);
      // one idle clock in some cases: counters must hold without bc_stb
      if (n % 7 == 0) begin
        bc_stb <= 1'b0; l1a <= 1'b1; ecr <= 1'b0; bcr <= 1'b0;
        @(posedge clk);
      end
    end
    `CHECK(wraps >= 2, "bunch counter wrapped at 3563")
    `TB_FINISH
  end
endmodule
