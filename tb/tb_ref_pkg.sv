// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL.
//  * crc9_ref: CRC-9 by polynomial long division of M(x)*x^9 by
//    G(x) = x^9+x^7+x^6+x^5+x^4+x^3+x+1 (0x2FB), M = message bits 118..8.
//  * frame_ref: the four words a transmitter must send for given Control
//    registers: K28.5 in Word_0[7:0], CRC in Word_3[31:23].
package tb_ref_pkg;

  function automatic logic [8:0] crc9_ref(input logic [127:0] m);
    logic [119:0] r;               // 111 message bits followed by 9 zeros
    r = {m[118:8], 9'b0};
    for (int i = 119; i >= 9; i--)
      if (r[i]) r[i -: 10] = r[i -: 10] ^ 10'h2FB;
    return r[8:0];
  endfunction

  function automatic logic [127:0] frame_ref(input logic [127:0] m);
    logic [127:0] f;
    f          = m;
    f[7:0]     = 8'hBC;
    f[127:119] = 9'h0;
    f[127:119] = crc9_ref(f);
    return f;
  endfunction

endpackage
