// crc_cfg_shiftreg: configuration register of the CRC chip, loaded through
// a single serial pin.
//
// To save pads, the polynomial register of the test chip is a shift
// register. This one holds a complete crc_pkg::crc_cfg_t, the 6-bit
// constraint length followed by the 32-bit top-aligned polynomial, 38 bits
// in all. On every clock with shift_en high the chain moves one place
// towards its most significant end and takes sin into bit 0, so the
// configuration is sent most significant bit first: length MSB first, then
// polynomial bit 31 first. sout is the bit leaving the chain, for read-back
// or for chaining further registers. cfg shows the chain in parallel; the
// CRC unit copies it into its own configuration register in one clock, so
// shifting in the next configuration does not disturb a running packet.
// Reset clears the chain.
//
// The serial loading follows the document; carrying the length in the same
// chain, the bit order and the read-back output are choices of this design.
module crc_cfg_shiftreg
  import crc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     shift_en,
  input  logic     sin,
  output logic     sout,
  output crc_cfg_t cfg
);

  logic [CFG_W-1:0] chain_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        chain_q <= '0;
    else if (shift_en) chain_q <= {chain_q[CFG_W-2:0], sin};
  end

  assign cfg  = crc_cfg_t'(chain_q);
  assign sout = chain_q[CFG_W-1];

endmodule
