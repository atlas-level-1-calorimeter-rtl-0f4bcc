// tb_cttc_word_builder: builders for the ROD, the other Hub and FEX slots
// 3, 8, 9 and 14 get the same random inputs; each message is checked bit by
// bit against the Combined_TTC table, including the per-slot link-reset
// routing from the Readout_Ctrl word 1 bits and the Aurora_Init fan-out.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_cttc_word_builder;
  import hub_pkg::*;
  localparam int NB = 6;
  localparam int SLOTS [NB] = '{0, 1, 3, 8, 9, 14};
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, bc_stb = 0;
  ttc_bits_t   ttc;
  logic [23:0] l1id;
  logic [7:0]  ecrid;
  logic [127:0] roc_raw;     // Readout_Ctrl words as received
  roc_fields_t roc;
  logic [11:0] other_chan_up;
  logic [3:0]  sys_reset;
  logic        link_enable;
  logic [2:0]  shelf;
  msg_words_t  w [NB];
  int n_slot_rst = 0, n_glob = 0;

  assign roc = roc_unpack(roc_raw);

  for (genvar i = 0; i < NB; i++) begin : g
    cttc_word_builder #(.DEST_SLOT(SLOTS[i])) dut (
      .clk, .rst, .bc_stb, .ttc, .l1id, .ecrid, .roc, .other_chan_up,
      .sys_reset, .link_enable, .shelf, .ctrl_words(w[i]));
  end

  always #3.125 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      ttc           <= ttc_bits_t'($urandom);
      l1id          <= 24'($urandom);
      ecrid         <= 8'($urandom);
      roc_raw       <= {$urandom, $urandom, $urandom & ((n % 4 == 0) ? 32'hFFFF_FFFF : 32'hC000_0000), $urandom & 32'hFFFF_7FFF};
      if (n % 5 == 0) roc_raw[15] <= 1'b1;      // Aurora_Init (global link reset)
      other_chan_up <= 12'($urandom);
      sys_reset     <= 4'($urandom);
      link_enable   <= 1'($urandom);
      shelf         <= 3'($urandom);
      bc_stb        <= 1'b1;
      @(posedge clk);
      bc_stb <= 1'b0;
      #1;
      for (int i = 0; i < NB; i++) begin
        int s;
        logic [3:0] exp_rst;
        logic exp_c0, exp_c1;
        s = SLOTS[i];
        exp_rst = 4'b0;
        exp_c0 = 0; exp_c1 = 0;
        if (s >= 3 && s <= 8)  exp_rst = roc_raw[32 + 4*(s-3) +: 4];
        if (s >= 9 && s <= 14) exp_rst = {3'b0, roc_raw[32 + 24 + (s-9)]};
        if (exp_rst != 0) n_slot_rst++;
        if (roc_raw[15]) begin exp_rst = 4'hF; n_glob++; end
        if (s >= 3) begin exp_c0 = roc_raw[16 + s - 3]; exp_c1 = other_chan_up[s-3]; end
        `CHECK_EQ(w[i][0][7:0],   8'hBC,          "comma byte")
        `CHECK_EQ(w[i][0][11:8],  4'h0,           "version")
        `CHECK_EQ(w[i][0][15:12], sys_reset,      "Reset 3:0")
        `CHECK_EQ(w[i][0][19:16], {ttc.pro, ttc.ecr, ttc.bcr, ttc.l1a}, "L1A/BCR/ECR/PRO")
        `CHECK_EQ(w[i][0][31:20], 12'h0,          "TTC reserved")
        `CHECK_EQ(w[i][1],        {ecrid, l1id},  "ECRID/L1ID")
        `CHECK_EQ(w[i][2],        32'h0,          "control channel")
        `CHECK_EQ(w[i][3][3:0],   exp_rst,        $sformatf("link reset slot %0d", s))
        `CHECK_EQ(w[i][3][4],     roc_raw[14],    "ROD busy")
        `CHECK_EQ(w[i][3][5],     link_enable,    "link enable")
        `CHECK_EQ(w[i][3][7:6],   {exp_c1, exp_c0}, "rod channel up")
        `CHECK_EQ(w[i][3][19:8],  12'h0,          "ROD reserved")
        `CHECK_EQ(w[i][3][22:20], shelf,          "shelf")
      end
      // between strobes the registers hold
      begin
        msg_words_t keep;
        keep = w[2];
        ttc <= '0; l1id <= ~l1id;
        repeat (3) @(posedge clk);
        #1;
        `CHECK_EQ(w[2], keep, "held between strobes")
      end
    end
    `CHECK(n_slot_rst > 0 && n_glob > 0, "slot and global resets exercised")
    `TB_FINISH
  end
endmodule
