// crc_radix32: radix-32 configurable CRC unit, one byte per clock.
//
// The unit divides a byte stream by a programmable generator polynomial of
// any constraint length L from 1 to 32 and keeps the remainder in a 32-bit
// CRC register. It is the classic linear shift register with a switch on
// every loop-back tap (the switch state is the polynomial register), unrolled
// eight times so that a whole byte is absorbed in one clock:
//
//   LoopData(i) : the eight loop-back bits of the byte step. LoopData(7) is
//                 the first one (CRC bit 31 xor the byte's MSB); each later
//                 one also takes in the earlier loop-back bits through the
//                 top polynomial coefficients. They depend only on the top
//                 eight CRC bits, the top polynomial bits and the byte.
//   NEXTCRC(k)  = CRC(k-8) xor  sum over i=7..0 of Polynomial(k-i)*LoopData(i)
//
// (modulo-2 sum). Register and polynomial are top aligned (see crc_pkg): the
// L-bit CRC sits in bits 31..32-L and the loop-back always comes from bit 31.
// The flip-flops below bit 32-L are held in reset, which both sets the
// constraint length and, with L = 0, shuts the whole register down. At the
// start of a packet the used flip-flops are preset to one. The data bytes
// enter MSB first; the unit itself does no bit reflection and no final
// inversion, which are left to the user of the result.
//
// Interface and timing (all synchronous to clk, active-low async reset):
//   cfg_we/cfg_in  load a new polynomial and length; takes effect in the
//                  same cycle, so a reconfiguration costs no clock.
//   start          preset the register to ones (within the new length)
//                  for a new packet; may come with the packet's first byte.
//   in_valid/in_data  one byte per clock, no back-pressure.
//   crc            the register, top aligned; holds the CRC of all bytes
//                  accepted up to the previous clock edge.
//   crc_zero       the used CRC bits are all zero (receiver check).
//
// Following the document: the 8-bit input, the 32-bit maximum length, the
// shift-register structure with polynomial switches, the reset of unused
// flip-flops, the preset to one and the update equation. The top alignment,
// the length encoding, the shut-down at L = 0 and the same-cycle start and
// reconfiguration are choices of this design.
module crc_radix32
  import crc_pkg::*;
#(
  parameter int unsigned CRC_WIDTH  = CRC_W,
  parameter int unsigned DATA_WIDTH = DATA_W
) (
  input  logic     clk,
  input  logic     rst_n,
  // configuration
  input  logic     cfg_we,
  input  crc_cfg_t cfg_in,
  output crc_cfg_t cfg,
  // data
  input  logic     start,
  input  logic     in_valid,
  input  logic [DATA_WIDTH-1:0] in_data,
  // result
  output crc_word_t crc,
  output logic      crc_zero,
  output logic      active
);

  // The configuration type fixes the register at 32 bits; the parameters
  // only document the sizes and must keep their default values.
  if (CRC_WIDTH != CRC_W || DATA_WIDTH != DATA_W) begin : g_bad_size
    $error("crc_radix32: CRC_WIDTH and DATA_WIDTH must equal crc_pkg sizes");
  end

  crc_cfg_t  cfg_q, cfg_eff;
  crc_word_t crc_q, crc_cur, crc_next, mask;
  logic [DATA_WIDTH-1:0] loop_data;

  // The new configuration is used in the very cycle it is written.
  assign cfg_eff = cfg_we ? cfg_in : cfg_q;
  assign mask    = len_mask(cfg_eff.len);

  // Preset to ones at the start of a packet, only within the used length.
  assign crc_cur = start ? mask : crc_q;

  // Loop-back bits of the eight unrolled shift steps.
  always_comb begin
    crc_word_t s;
    logic      fb;
    s = crc_cur;
    for (int j = 0; j < DATA_WIDTH; j++) begin
      fb = s[CRC_WIDTH-1] ^ in_data[DATA_WIDTH-1-j];
      loop_data[DATA_WIDTH-1-j] = fb;
      // Only the top bits of s influence later loop-back bits.
      s = (s << 1) ^ (fb ? cfg_eff.poly : '0);
    end
  end

  // Equation (4) for every register position, masked by the length.
  always_comb begin
    for (int k = 0; k < CRC_WIDTH; k++) begin
      logic b;
      b = (k >= DATA_WIDTH) ? crc_cur[k-DATA_WIDTH] : 1'b0;
      for (int i = 0; i < DATA_WIDTH; i++)
        if (k - i >= 0)
          b ^= cfg_eff.poly[k-i] & loop_data[i];
      crc_next[k] = b & mask[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q <= '0;
      crc_q <= '0;
    end else begin
      if (cfg_we) cfg_q <= cfg_in;
      if (in_valid)   crc_q <= crc_next;
      else if (start) crc_q <= mask;
      else            crc_q <= crc_q & mask;  // unused bits stay in reset
    end
  end

  assign cfg      = cfg_q;
  assign crc      = crc_q;
  assign crc_zero = ((crc_q & len_mask(cfg_q.len)) == '0);
  assign active   = (cfg_q.len != '0);

endmodule
