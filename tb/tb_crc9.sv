// tb_crc9: checks the CRC-9 against a long-division reference on random
// messages, checks that every covered bit changes the CRC and that the
// comma byte and the CRC field do not.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_crc9;
  import hub_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  msg_words_t msg;
  logic [8:0] crc, base;

  crc9 dut (.msg(msg), .crc(crc));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    // known value: all-zero message gives 0
    msg = '0; #1;
    `CHECK_EQ(crc, 9'h0, "zero message")
    // single bit at position 8 (the last bit shifted): remainder of x^9 = poly
    msg = '0; msg[0][8] = 1'b1; #1;
    `CHECK_EQ(crc, 9'h0FB, "x^9 mod G")
    for (int n = 0; n < 300; n++) begin
      msg = {$urandom, $urandom, $urandom, $urandom}; #1;
      `CHECK_EQ(crc, crc9_ref(msg), "random message vs reference")
    end
    msg = {$urandom, $urandom, $urandom, $urandom}; #1;
    base = crc;
    for (int b = 0; b < 128; b++) begin
      msg[b/32][b%32] = ~msg[b/32][b%32]; #1;
      if (b >= 8 && b <= 118) `CHECK(crc != base, "covered bit changes CRC")
      else                    `CHECK_EQ(crc, base, "uncovered bit leaves CRC")
      msg[b/32][b%32] = ~msg[b/32][b%32]; #1;
    end
    `TB_FINISH
  end
endmodule
