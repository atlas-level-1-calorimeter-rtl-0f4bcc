// ctrl_reg_tx: transmit side of a 128-bit control-register link.
//
// Four 32-bit Control registers (Word_0..Word_3) are sent continuously, one
// complete message per LHC clock, so that a copy of them (the Shadow
// registers) appears at the far end.  Used for every Combined_TTC output of
// the Hub; the ROD uses the same structure for Readout_Ctrl.
//
// How it works: on bc_stb (one clock in four of the 160 MHz word clock,
// i.e. the LHC clock edge) the four input words are snapshotted, the K28.5
// comma is forced into Word_0 bits 7:0 and the CRC-9 of the message is
// written into Word_3 bits 31:23.  Word_0 goes out on the next clock with
// tx_charisk = 0001 (byte 0 is a K character), followed by Word_1, Word_2
// and Word_3 with tx_charisk = 0000.  The snapshot keeps the four words and
// their CRC consistent even if the registers change mid-message.
//
// Interface: tx_data/tx_charisk feed the 8b/10b encoder of a transceiver
// with a 32-bit user interface.  Timing: tx_data holds Word_k in the clock
// cycle k+1 after bc_stb.  With no bc_stb after Word_3 an all-zero data
// word is sent.  The 32-bit/160 MHz word format, the word order (Word_0
// first), the snapshot and the idle word are this design's choices; the
// comma position, the CRC field and the one-message-per-LHC-clock rate
// follow the link specification.
module ctrl_reg_tx
  import hub_pkg::*;
(
  input  logic        clk,
  input  logic        rst,        // synchronous, active high
  input  logic        bc_stb,     // start a new message
  input  msg_words_t  ctrl_words, // Control registers
  output logic [31:0] tx_data,
  output logic [3:0]  tx_charisk
);

  msg_words_t framed, msg_q;
  logic [8:0] crc;
  logic [1:0] idx;      // next word to send
  logic       sending;  // words 1..3 still to go

  always_comb begin
    framed          = ctrl_words;
    framed[0][7:0]  = K28_5;
    framed[3][31:23] = '0;
  end

  crc9 u_crc (.msg(framed), .crc(crc));

  always_ff @(posedge clk) begin
    if (rst) begin
      msg_q      <= '0;
      idx        <= '0;
      sending    <= 1'b0;
      tx_data    <= '0;
      tx_charisk <= '0;
    end else if (bc_stb) begin
      msg_q            <= framed;
      msg_q[3][31:23]  <= crc;
      tx_data          <= framed[0];
      tx_charisk       <= 4'b0001;
      idx              <= 2'd1;
      sending          <= 1'b1;
    end else if (sending) begin
      tx_data    <= msg_q[idx];
      tx_charisk <= 4'b0000;
      idx        <= idx + 2'd1;
      sending    <= (idx != 2'd3);
    end else begin
      tx_data    <= '0;
      tx_charisk <= 4'b0000;
    end
  end

endmodule
