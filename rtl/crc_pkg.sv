// crc_pkg: constants and types shared by the configurable CRC design.
//
// The CRC register is CRC_W = 32 bits wide and is fed DATA_W = 8 bits per
// clock, the sizes of the radix-32 unit. A configuration is a generator
// polynomial plus a constraint length L (1..32). The polynomial is stored
// "top aligned": the L low-order coefficients g(L-1)..g(0) of g(x) (the x^L
// term is implicit) sit in bits 31..32-L of the 32-bit word, and the bits
// below are zero. In the same way an L-bit CRC occupies bits 31..32-L of the
// CRC register. Top alignment lets the feedback always come from bit 31,
// whatever L is, so a shorter CRC is obtained only by holding the low
// flip-flops in reset. Length 0 is the shut-down setting (all flip-flops
// held in reset). The encoding of the length field is a choice of this
// design.
package crc_pkg;

  localparam int unsigned CRC_W  = 32;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned LEN_W  = $clog2(CRC_W + 1);  // 6 bits hold 0..32

  typedef logic [CRC_W-1:0] crc_word_t;
  typedef logic [LEN_W-1:0] crc_len_t;

  typedef struct packed {
    crc_len_t  len;   // constraint length L, 0 = shut down
    crc_word_t poly;  // top-aligned polynomial, x^L term implicit
  } crc_cfg_t;

  localparam int unsigned CFG_W = $bits(crc_cfg_t);

  // Mask of the flip-flops in use for length len: bits 31..32-len.
  function automatic crc_word_t len_mask(input crc_len_t len);
    crc_word_t m;
    for (int unsigned k = 0; k < CRC_W; k++)
      m[k] = (k + int'(len) >= CRC_W);
    return m;
  endfunction

  // Top-align a conventional polynomial value (e.g. 32'h04C11DB7 for L = 32,
  // 16'h1021 for L = 16) so that it can be written to the configuration.
  function automatic crc_word_t align_poly(input crc_word_t poly, input crc_len_t len);
    if (len == 0) return '0;
    if (int'(len) >= CRC_W) return poly;
    return (poly << (CRC_W - int'(len))) & len_mask(len);
  endfunction

endpackage
