// crc_out_serializer: bit-serial CRC output of the CRC chip.
//
// To save pads the chip shifts its result out on one pin. load copies the
// top-aligned CRC register and the constraint length L into the shifter;
// then every clock with shift high moves it one place, so sout presents
// the CRC most significant bit first: after load sout is CRC bit L-1, after
// the first shift bit L-2, and so on. busy is high while bits of the loaded
// CRC remain to be shifted; once all L have left, sout is 0 and further
// shifts change nothing. load wins over shift in the same clock. Reset
// clears the shifter.
//
// The serial output follows the document; the bit order, the busy flag and
// the load/shift control are choices of this design.
module crc_out_serializer
  import crc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,
  input  crc_word_t crc_in,
  input  crc_len_t  len_in,
  input  logic      shift,
  output logic      sout,
  output logic      busy
);

  crc_word_t sreg_q;
  crc_len_t  left_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg_q <= '0;
      left_q <= '0;
    end else if (load) begin
      sreg_q <= crc_in & len_mask(len_in);
      left_q <= (int'(len_in) > CRC_W) ? crc_len_t'(CRC_W) : len_in;
    end else if (shift && left_q != '0) begin
      sreg_q <= sreg_q << 1;
      left_q <= left_q - 1'b1;
    end
  end

  assign sout = sreg_q[CRC_W-1];
  assign busy = (left_q != '0);

endmodule
