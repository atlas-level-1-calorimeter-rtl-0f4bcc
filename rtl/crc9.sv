// crc9: combinational CRC-9 of one 128-bit control-register message.
//
// Both control links (Readout_Ctrl and Combined_TTC) protect each message
// with a 9-bit CRC in Word_3 bits 31:23, polynomial
// x^9+x^7+x^6+x^5+x^4+x^3+x+1 (from the link specification).  This design
// covers message bits 8..118 -- everything except the K28.5 comma byte and
// the CRC field itself -- most significant bit first, starting from 0 with
// no final inversion; that coverage and ordering are this design's choice.
//
// Interface: msg is {Word_3, Word_2, Word_1, Word_0}; crc is the remainder.
// Purely combinational: the bit-serial shift register is unrolled over the
// 111 covered bits and synthesises to XOR trees.
module crc9
  import hub_pkg::*;
#(
  parameter logic [8:0] POLY = CRC9_POLY   // x^9 term implied
) (
  input  msg_words_t msg,
  output logic [8:0] crc
);

  always_comb begin
    logic [127:0] flat;
    logic [8:0]   c;
    logic         fb;
    flat = msg;
    c    = '0;
    for (int i = 118; i >= 8; i--) begin
      fb = c[8] ^ flat[i];
      c  = {c[7:0], 1'b0};
      if (fb) c = c ^ POLY;
    end
    crc = c;
  end

endmodule
