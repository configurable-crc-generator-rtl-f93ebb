// crc_word_to_byte: input parallel/serial converter of the CRC chip.
//
// The pattern source that feeds the chip cannot toggle its pins at the CRC
// unit's clock rate, so data arrive as BYTES-byte words, one word every
// BYTES clocks, and this converter hands them to the CRC unit one byte per
// clock, most significant byte first. A word is taken when word_valid and
// word_ready are both high. word_ready is high while the converter is
// empty or is sending the last byte of its current word, so a steady
// stream of words keeps the CRC unit busy every clock with no bubble. A
// word holding fewer bytes (the tail of a packet) gives their number in
// word_nbytes (0 means all BYTES bytes); they are the most significant
// bytes of the word. word_first and word_last mark the word that opens and
// the one that closes a packet; they come out as out_first on the word's
// first byte and out_last on its last byte. The output has no back-pressure:
// the CRC unit takes a byte every clock. Latency: a word accepted at one
// clock edge shows its first byte from that edge on.
//
// The converter itself is named in the document; its word width, byte order
// and handshake are choices of this design.
module crc_word_to_byte #(
  parameter int unsigned BYTES = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   word_valid,
  output logic                   word_ready,
  input  logic [8*BYTES-1:0]     word_data,
  input  logic [$clog2(BYTES)-1:0] word_nbytes,
  input  logic                   word_first,
  input  logic                   word_last,
  output logic                   out_valid,
  output logic [7:0]             out_data,
  output logic                   out_first,
  output logic                   out_last
);

  localparam int unsigned CNT_W = $clog2(BYTES + 1);

  logic [8*BYTES-1:0] buf_q;
  logic [CNT_W-1:0]   cnt_q;     // bytes still to send
  logic               first_q, last_q;
  logic               take;

  assign word_ready = (cnt_q <= CNT_W'(1));
  assign take       = word_valid && word_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q   <= '0;
      cnt_q   <= '0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
    end else if (take) begin
      buf_q   <= word_data;
      cnt_q   <= (word_nbytes == '0) ? CNT_W'(BYTES) : CNT_W'(word_nbytes);
      first_q <= word_first;
      last_q  <= word_last;
    end else if (cnt_q != '0) begin
      buf_q   <= buf_q << 8;
      cnt_q   <= cnt_q - CNT_W'(1);
      first_q <= 1'b0;
    end
  end

  assign out_valid = (cnt_q != '0);
  assign out_data  = buf_q[8*BYTES-1 -: 8];
  assign out_first = out_valid && first_q;
  assign out_last  = (cnt_q == CNT_W'(1)) && last_q;

  // A word may not be offered with a byte count larger than the word.
  property p_nbytes_in_range;
    @(posedge clk) disable iff (!rst_n) word_valid |-> (int'(word_nbytes) < BYTES);
  endproperty
  a_nbytes_in_range: assert property (p_nbytes_in_range);

endmodule
