// crc_ref_pkg: reference model for the CRC testbenches.
//
// ref_crc is the textbook bit-serial CRC: a len-bit shift register preset
// to ones, polynomial given in the usual way (x^len term implicit, e.g.
// 32'h04C11DB7), data bytes taken MSB first, no final inversion. It is
// written independently of the design's top-aligned, byte-wise logic.
package crc_ref_pkg;

  typedef logic [7:0] byte_q_t[$];

  function automatic logic [31:0] ref_crc(input logic [31:0] poly, input int len,
                                          input byte_q_t msg);
    logic [31:0] r, m;
    m = (len >= 32) ? 32'hFFFF_FFFF : ((32'd1 << len) - 1);
    r = m;
    foreach (msg[n])
      for (int b = 7; b >= 0; b--) begin
        logic fb;
        fb = r[len-1] ^ msg[n][b];
        r  = ((r << 1) & m) ^ (fb ? (poly & m) : 32'd0);
      end
    return r;
  endfunction

  // Append the len-bit CRC (len a multiple of 8) MSB first.
  function automatic byte_q_t with_crc(input logic [31:0] poly, input int len,
                                       input byte_q_t msg);
    logic [31:0] s;
    byte_q_t out;
    out = msg;
    s = ref_crc(poly, len, msg);
    for (int b = len / 8 - 1; b >= 0; b--) out.push_back(s[8*b +: 8]);
    return out;
  endfunction

endpackage
