// tb_ctrl_reg_tx: drives random Control registers, starts a message every
// fourth clock (one per LHC clock) and checks that exactly the four framed
// words (comma, CRC from the reference) come out, Word_0 first with the K
// flag, that a register change during a message does not leak into it, and
// that an idle word follows when no new message is started.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_ctrl_reg_tx;
  import hub_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, bc_stb = 0;
  msg_words_t ctrl_words;
  logic [31:0] tx_data;
  logic [3:0]  tx_charisk;
  logic [127:0] exp_msg;

  ctrl_reg_tx dut (.*);

  always #3.125 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    ctrl_words = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    `CHECK_EQ(tx_charisk, 4'b0000, "no comma before the first message")
    for (int m = 0; m < 200; m++) begin
      ctrl_words <= {$urandom, $urandom, $urandom, $urandom};
      bc_stb     <= 1'b1;
      @(posedge clk);
      exp_msg = frame_ref(ctrl_words);
      bc_stb     <= 1'b0;
      ctrl_words <= {$urandom, $urandom, $urandom, $urandom};  // must not leak
      for (int w = 0; w < 4; w++) begin
        #1;
        `CHECK_EQ(tx_data, exp_msg[32*w +: 32], $sformatf("message %0d word %0d", m, w))
        `CHECK_EQ(tx_charisk, (w == 0) ? 4'b0001 : 4'b0000, "K flag on Word_0 only")
        if (w < 3) @(posedge clk);
      end
      // every 10th message leave a gap of one LHC clock
      if (m % 10 == 9) begin
        @(posedge clk); #1;
        `CHECK_EQ(tx_data, 32'h0, "idle word after Word_3")
        `CHECK_EQ(tx_charisk, 4'b0000, "idle word not a K")
        repeat (3) @(posedge clk);
      end
    end
    `TB_FINISH
  end
endmodule
