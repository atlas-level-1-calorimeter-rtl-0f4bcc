// tb_shadow_reg_rx: feeds framed messages built by the reference model and
// checks that the Shadow registers take each good message one clock after
// its Word_3, that a message with a bad CRC is dropped whole (registers
// unchanged, crc_err, counter +1), that a comma in the middle of a message
// gives frame_err, and that idle words between messages are ignored.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_shadow_reg_rx;
  import hub_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [31:0] rx_data = '0;
  logic [3:0]  rx_charisk = '0;
  msg_words_t  shadow_words;
  logic msg_ok, crc_err, frame_err, aligned;
  logic [15:0] crc_err_cnt;
  logic [127:0] good, last_good;
  int n_err = 0;

  shadow_reg_rx #(.ERR_CNT_W(16)) dut (.*);

  always #3.125 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  task automatic send(input logic [127:0] f, input int nwords = 4);
    for (int w = 0; w < nwords; w++) begin
      rx_data    <= f[32*w +: 32];
      rx_charisk <= (w == 0) ? 4'b0001 : 4'b0000;
      @(posedge clk);
    end
    rx_data    <= '0;
    rx_charisk <= '0;
  endtask

  initial begin
    last_good = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    `CHECK_EQ(aligned, 1'b0, "not aligned after reset")
    `CHECK_EQ(shadow_words, 128'h0, "shadow zero after reset")
    for (int m = 0; m < 300; m++) begin
      int kind;
      kind = $urandom_range(0, 9);
      good = frame_ref({$urandom, $urandom, $urandom, $urandom});
      if (kind == 0) begin
        // corrupt one covered bit or a CRC bit
        logic [127:0] bad;
        int b;
        bad = good;
        b   = $urandom_range(8, 127);
        bad[b] = ~bad[b];
        send(bad);
        #1;
        `CHECK_EQ(crc_err, 1'b1, "bad CRC flagged")
        `CHECK_EQ(msg_ok, 1'b0, "bad message not taken")
        `CHECK_EQ(shadow_words, last_good, "shadow unchanged after bad CRC")
        `CHECK_EQ(aligned, 1'b0, "alignment lost on CRC error")
        n_err++;
        `CHECK_EQ(crc_err_cnt, 16'(n_err), "CRC error counter")
      end else if (kind == 1) begin
        // truncated message followed at once by a new one
        send(good, 2);
        send(good);
        #1;
        `CHECK_EQ(msg_ok, 1'b1, "message after a truncated one")
        `CHECK_EQ(shadow_words, good, "shadow after truncated + good")
        last_good = good;
      end else begin
        send(good);
        #1;
        `CHECK_EQ(msg_ok, 1'b1, "good message taken")
        `CHECK_EQ(shadow_words, good, "shadow = message")
        `CHECK_EQ(aligned, 1'b1, "aligned")
        last_good = good;
      end
      if (kind == 1) begin end
      // idle gap of random length
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    // frame error flagged by itself
    send(good, 2);
    rx_data <= good[31:0]; rx_charisk <= 4'b0001;
    @(posedge clk); #1;
    `CHECK_EQ(frame_err, 1'b1, "comma inside a message gives frame_err")
    `TB_FINISH
  end
endmodule
