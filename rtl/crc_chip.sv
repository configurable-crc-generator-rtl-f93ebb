// crc_chip: the configurable CRC test chip.
//
// The chip wraps the radix-32 configurable CRC unit with the pad-saving
// logic of a test chip:
//   - crc_cfg_shiftreg: the polynomial and constraint length are shifted in
//     on cfg_sin (one bit per clock with cfg_shift high, MSB first, 6-bit
//     length then 32-bit top-aligned polynomial). cfg_load copies the chain
//     into the CRC unit's configuration in one clock; cfg_sout reads the
//     chain back.
//   - crc_word_to_byte: packet data enter as 32-bit words (word_valid /
//     word_ready handshake, word_first / word_last packet marks,
//     word_nbytes = number of valid leading bytes of a short last word,
//     0 = all four) and reach the CRC unit one byte per clock.
//   - crc_radix32: the first byte of a packet presets the CRC register to
//     ones; every byte updates it in one clock.
//   - crc_out_serializer: one clock after the last byte of a packet has been
//     absorbed, the CRC (top aligned, L bits) and the zero-remainder flag are
//     captured. The CRC leaves on crc_sout, MSB first, one bit per clock with
//     out_shift high; out_busy is high while bits remain. crc_ok holds the
//     zero-remainder flag of the last packet (high when the packet, received
//     with its CRC appended, is error free).
// active is low while the configured length is 0 (CRC unit shut down).
//
// Timing: a packet of N bytes sent as back-to-back words takes N clocks in
// the CRC unit; its CRC is in the output shifter two clocks after its last
// byte left the converter. The document gives the chip's parts (serial
// polynomial register, input parallel/serial converter, serial output);
// the pin list, the packet marks and the automatic capture are choices of
// this design.
module crc_chip
  import crc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // configuration pins
  input  logic        cfg_sin,
  input  logic        cfg_shift,
  input  logic        cfg_load,
  output logic        cfg_sout,
  // data pins
  input  logic        word_valid,
  output logic        word_ready,
  input  logic [31:0] word_data,
  input  logic [1:0]  word_nbytes,
  input  logic        word_first,
  input  logic        word_last,
  // result pins
  input  logic        out_shift,
  output logic        crc_sout,
  output logic        out_busy,
  output logic        crc_ok,
  output logic        active
);

  crc_cfg_t   chain_cfg, core_cfg;
  logic       b_valid, b_first, b_last;
  logic [7:0] b_data;
  crc_word_t  crc;
  logic       crc_zero;
  logic       capture_q, crc_ok_q;

  crc_cfg_shiftreg u_cfg (
    .clk, .rst_n,
    .shift_en (cfg_shift),
    .sin      (cfg_sin),
    .sout     (cfg_sout),
    .cfg      (chain_cfg)
  );

  crc_word_to_byte #(.BYTES(4)) u_conv (
    .clk, .rst_n,
    .word_valid, .word_ready, .word_data, .word_nbytes, .word_first, .word_last,
    .out_valid (b_valid),
    .out_data  (b_data),
    .out_first (b_first),
    .out_last  (b_last)
  );

  crc_radix32 u_crc (
    .clk, .rst_n,
    .cfg_we   (cfg_load),
    .cfg_in   (chain_cfg),
    .cfg      (core_cfg),
    .start    (b_first),
    .in_valid (b_valid),
    .in_data  (b_data),
    .crc,
    .crc_zero,
    .active
  );

  // The last byte enters the CRC register at one edge; the result is
  // captured into the output shifter at the next.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      capture_q <= 1'b0;
      crc_ok_q  <= 1'b0;
    end else begin
      capture_q <= b_valid && b_last;
      if (capture_q) crc_ok_q <= crc_zero;
    end
  end

  crc_out_serializer u_out (
    .clk, .rst_n,
    .load   (capture_q),
    .crc_in (crc),
    .len_in (core_cfg.len),
    .shift  (out_shift),
    .sout   (crc_sout),
    .busy   (out_busy)
  );

  assign crc_ok = crc_ok_q;

endmodule
