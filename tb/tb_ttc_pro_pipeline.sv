// tb_ttc_pro_pipeline: L1A/BCR/ECR must come out exactly DELAY LHC clocks
// after they go in; each delayed L1A carries the oldest queued PRO bit
// (reference queue), an L1A with an empty FIFO sends 0 and flags
// pro_empty_err, a push into a full FIFO is dropped with pro_full_err.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_ttc_pro_pipeline;
  import hub_pkg::*;
  localparam int DELAY = 5, DEPTH = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, bc_stb = 0;
  logic l1a_in = 0, bcr_in = 0, ecr_in = 0, pro_wr = 0, pro_bit = 0;
  ttc_bits_t ttc;
  logic pro_empty_err, pro_full_err;
  logic [2:0] hist[$];
  logic q[$];
  int n_empty = 0, n_full = 0, n_pop = 0;

  ttc_pro_pipeline #(.DELAY(DELAY), .PRO_DEPTH(DEPTH)) dut (.*);

  always #3.125 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    for (int i = 0; i < DELAY; i++) hist.push_back(3'b000);
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      logic [2:0] t, o;
      logic exp_pro, exp_empty, exp_full, w, wb;
      // phase 0: the bc_stb clock, inputs of this crossing
      t = {$urandom_range(0, 2) == 0, $urandom_range(0, 20) == 0, $urandom_range(0, 30) == 0};
      w  = ($urandom_range(0, 3) == 0);
      wb = 1'($urandom_range(0, 1));
      {l1a_in, bcr_in, ecr_in} <= t;
      pro_wr <= w; pro_bit <= wb;
      bc_stb <= 1'b1;
      // reference for what the strobe does
      o = hist.pop_front();
      hist.push_back(t);
      exp_empty = o[2] && (q.size() == 0);
      exp_pro   = 1'b0;
      if (o[2] && q.size() > 0) begin exp_pro = q.pop_front(); n_pop++; end
      exp_full  = w && (q.size() >= DEPTH);
      if (w && !exp_full) q.push_back(wb);
      @(posedge clk); #1;
      `CHECK_EQ({ttc.l1a, ttc.bcr, ttc.ecr}, o, "delayed L1A/BCR/ECR")
      `CHECK_EQ(ttc.pro, exp_pro, "PRO bit aligned with its L1A")
      `CHECK_EQ(pro_empty_err, exp_empty, "empty FIFO flag")
      `CHECK_EQ(pro_full_err, exp_full, "full FIFO flag")
      if (exp_empty) n_empty++;
      if (exp_full)  n_full++;
      bc_stb <= 1'b0; pro_wr <= 1'b0;
      // the other three clocks of the LHC clock: outputs must hold
      repeat (3) begin
        @(posedge clk); #1;
        `CHECK_EQ({ttc.l1a, ttc.bcr, ttc.ecr}, o, "output held between strobes")
      end
    end
    `CHECK(n_empty > 0, "empty FIFO case exercised")
    `CHECK(n_full > 0, "full FIFO case exercised")
    `CHECK(n_pop > 0, "PRO bits popped")
    `TB_FINISH
  end
endmodule
