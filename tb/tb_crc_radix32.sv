// tb_crc_radix32: self-checking testbench of the radix-32 CRC unit.
//
// A bit-serial reference model (the textbook shift register, LSB-aligned
// polynomial, preset to ones, data MSB first) computes the expected CRC of
// every packet, independently of the unit's top-aligned byte-wise logic.
// Checks: published check values of CRC-32/MPEG-2, CRC-16/CCITT-FALSE and,
// with byte reflection and inversion done outside the unit, Ethernet CRC-32;
// random polynomials and lengths 1..32 with gaps between bytes; one byte per
// clock (an N-byte packet done N clocks after its first byte); a
// reconfiguration and packet start in the same cycle as the first byte;
// the zero-remainder check on a message with its CRC appended; shut-down.
module tb_crc_radix32;
  import crc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cfg_we = 1'b0;
  crc_cfg_t cfg_in = '0;
  crc_cfg_t cfg;
  logic start = 1'b0, in_valid = 1'b0;
  logic [7:0] in_data = '0;
  crc_word_t crc;
  logic crc_zero, active;

  int checks = 0, failures = 0;

  crc_radix32 dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: bit-serial division, MSB-first data, register preset to ones.
  function automatic logic [31:0] ref_crc(input logic [31:0] poly, input int len,
                                          input logic [7:0] msg[$]);
    logic [31:0] r, m;
    m = (len == 32) ? 32'hFFFF_FFFF : ((32'd1 << len) - 1);
    r = m;
    foreach (msg[n])
      for (int b = 7; b >= 0; b--) begin
        logic fb;
        fb = r[len-1] ^ msg[n][b];
        r  = ((r << 1) & m) ^ (fb ? (poly & m) : 32'd0);
      end
    return r;
  endfunction

  function automatic logic [31:0] result(input int len);
    return crc >> (32 - len);
  endfunction

  function automatic logic [7:0] rev8(input logic [7:0] v);
    for (int i = 0; i < 8; i++) rev8[i] = v[7-i];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Send one packet; with gaps, idle cycles are inserted at random. With
  // newcfg the configuration is written in the cycle of the first byte.
  // Returns the number of clocks from the first byte to the result.
  task automatic send(input logic [7:0] msg[$], input bit gaps, input bit newcfg,
                      input crc_cfg_t c, output int cycles);
    @(negedge clk);
    cycles = 0;
    foreach (msg[n]) begin
      if (gaps) while ($urandom_range(0, 2) == 0) begin
        in_valid = 1'b0; start = 1'b0; cfg_we = 1'b0;
        @(negedge clk);
        cycles++;
      end
      start    = (n == 0);
      cfg_we   = (n == 0) && newcfg;
      cfg_in   = c;
      in_valid = 1'b1;
      in_data  = msg[n];
      @(negedge clk);
      cycles++;
    end
    start = 1'b0; cfg_we = 1'b0; in_valid = 1'b0;
  endtask

  task automatic run_pkt(input logic [31:0] poly, input int len, input logic [7:0] msg[$],
                         input bit gaps, input string name);
    crc_cfg_t c;
    int cyc;
    logic [31:0] exp;
    c.len  = crc_len_t'(len);
    c.poly = align_poly(poly, crc_len_t'(len));
    send(msg, gaps, 1'b1, c, cyc);
    exp = ref_crc(poly, len, msg);
    check(result(len) == exp,
          $sformatf("%s L=%0d poly=%h got %h exp %h", name, len, poly, result(len), exp));
    if (!gaps)
      check(cyc == msg.size(), $sformatf("%s: %0d bytes took %0d clocks", name, msg.size(), cyc));
  endtask

  logic [7:0] m9[$];
  logic [7:0] msg[$];
  int cyc;

  initial begin
    m9 = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(crc == '0 && !active, "reset state");

    // Published check values for "123456789".
    run_pkt(32'h04C1_1DB7, 32, m9, 1'b0, "CRC-32/MPEG-2");
    check(result(32) == 32'h0376_E6E7, "CRC-32/MPEG-2 check value");
    run_pkt(32'h0000_1021, 16, m9, 1'b0, "CRC-16/CCITT-FALSE");
    check(result(16) == 32'h0000_29B1, "CRC-16/CCITT-FALSE check value");
    begin : ethernet
      logic [7:0] r9[$];
      logic [31:0] v, rv;
      foreach (m9[n]) r9.push_back(rev8(m9[n]));
      run_pkt(32'h04C1_1DB7, 32, r9, 1'b0, "Ethernet");
      v = ~result(32);
      for (int i = 0; i < 32; i++) rv[i] = v[31-i];
      check(rv == 32'hCBF4_3926, $sformatf("Ethernet CRC-32 check value %h", rv));
    end

    // Receiver check: message followed by its CRC leaves a zero remainder.
    foreach (m9[n]) msg.push_back(m9[n]);
    begin : receiver
      logic [31:0] s;
      s = ref_crc(32'h04C1_1DB7, 32, m9);
      for (int b = 3; b >= 0; b--) msg.push_back(s[8*b +: 8]);
      run_pkt(32'h04C1_1DB7, 32, msg, 1'b0, "codeword");
      check(crc_zero, "codeword gives zero remainder");
      msg[2] ^= 8'h10;
      run_pkt(32'h04C1_1DB7, 32, msg, 1'b0, "corrupted codeword");
      check(!crc_zero, "single bit error detected");
    end

    // Random polynomials, every length, random packet sizes and gaps.
    for (int t = 0; t < 400; t++) begin
      int len;
      logic [31:0] poly;
      len  = (t < 32) ? t + 1 : $urandom_range(1, 32);
      poly = $urandom() | 32'd1;
      msg.delete();
      repeat ($urandom_range(1, 24)) msg.push_back(8'($urandom()));
      run_pkt(poly, len, msg, t[0], "random");
    end

    // Back-to-back packets, each with its own configuration, no idle clock.
    begin : b2b
      logic [7:0] a[$], b[$];
      crc_cfg_t ca, cb;
      repeat (6) a.push_back(8'($urandom()));
      repeat (5) b.push_back(8'($urandom()));
      ca.len = 6'd24; ca.poly = align_poly(32'h0080_0063, 6'd24);
      cb.len = 6'd12; cb.poly = align_poly(32'h0000_080F, 6'd12);
      @(negedge clk);
      for (int n = 0; n < 11; n++) begin
        start    = (n == 0) || (n == 6);
        cfg_we   = start;
        cfg_in   = (n < 6) ? ca : cb;
        in_valid = 1'b1;
        in_data  = (n < 6) ? a[n] : b[n-6];
        @(negedge clk);
        if (n == 5)
          check(result(24) == ref_crc(32'h0080_0063, 24, a), "back-to-back packet A (CRC-24)");
      end
      in_valid = 1'b0; start = 1'b0; cfg_we = 1'b0;
      check(result(12) == ref_crc(32'h0000_080F, 12, b), "back-to-back packet B (CRC-12)");
      check(crc[19:0] == '0, "unused flip-flops held in reset");
    end

    // Shut-down: length 0 clears and holds the register.
    begin : shutdown
      crc_cfg_t c0;
      c0 = '0;
      c0.poly = 32'hFFFF_FFFF;
      msg.delete();
      repeat (4) msg.push_back(8'hA5);
      send(msg, 1'b0, 1'b1, c0, cyc);
      check(crc == '0 && !active, "shut-down register stays cleared");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
