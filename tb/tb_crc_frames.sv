// tb_crc_frames: protocol workloads on the CRC chip at its default sizes.
//
// Each workload configures the chip through its serial pins, streams a
// protocol-sized packet at one word per four clocks (one byte per clock)
// and reads the CRC back serially:
//   - Ethernet: 64- and 1518-byte frames. The unit takes bytes MSB first, so
//     each byte is bit-reversed on the way in and the FCS is the bit-reversed
//     complement of the result; it is compared with an independent LSB-first
//     model (reflected polynomial 0xEDB88320). The frame with its FCS must
//     leave the residue 0xC704DD7B.
//   - ATM AAL5: a 1536-byte CPCS-PDU (32 cells) whose last 4 bytes are the
//     complemented CRC-32; the whole PDU must leave residue 0xC704DD7B.
//   - ATM cell header: CRC-8 (x^8+x^2+x+1) over the 4 header bytes.
//   - UMTS: CRC-24, CRC-16, CRC-12 and CRC-8 over a 640-byte block.
//   - HIPERLAN/2: CRC-24 over a 54-byte long-channel PDU and CRC-16 over a
//     9-byte short-channel PDU.
// For every packet the CRC must be at the output N+2 clocks after its first
// word is taken, which is the one byte per clock rate of the design.
module tb_crc_frames;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_sin = 1'b0, cfg_shift = 1'b0, cfg_load = 1'b0, cfg_sout;
  logic word_valid = 1'b0, word_ready;
  logic [31:0] word_data = '0;
  logic [1:0] word_nbytes = '0;
  logic word_first = 1'b0, word_last = 1'b0;
  logic out_shift = 1'b0, crc_sout, out_busy, crc_ok, active;

  int checks = 0, failures = 0;

  crc_chip dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cur_len = 0;

  task automatic configure(input logic [31:0] poly, input int len);
    logic [CFG_W-1:0] w;
    w = {crc_len_t'(len), align_poly(poly, crc_len_t'(len))};
    for (int b = CFG_W - 1; b >= 0; b--) begin
      @(negedge clk);
      cfg_shift = 1'b1;
      cfg_sin   = w[b];
    end
    @(negedge clk);
    cfg_shift = 1'b0;
    cfg_load  = 1'b1;
    @(negedge clk);
    cfg_load  = 1'b0;
    cur_len   = len;
  endtask

  // Stream a packet, then shift its CRC out. Returns the CRC (LSB aligned).
  task automatic run(input byte_q_t p, output logic [31:0] crc, input string name);
    int n;
    n = p.size();
    @(negedge clk);
    for (int w = 0; w < n; w += 4) begin
      int k;
      k = (n - w >= 4) ? 4 : n - w;
      word_valid  = 1'b1;
      word_data   = '0;
      for (int j = 0; j < k; j++) word_data[31-8*j -: 8] = p[w+j];
      word_nbytes = 2'(k);
      word_first  = (w == 0);
      word_last   = (w + 4 >= n);
      while (!word_ready) @(negedge clk);
      @(posedge clk);
      @(negedge clk);
    end
    word_valid = 1'b0;
    begin
      int c;
      c = 0;
      while (!out_busy) begin @(negedge clk); c++; end
      // Clocks from the first word taken to the result: the last word was
      // taken 4*((n-1)/4) clocks after the first, and the loop above ended
      // one falling edge later.
      check(((n - 1) / 4) * 4 + 1 + c == n + 2,
            $sformatf("%s: %0d bytes, result after %0d clocks", name, n, ((n - 1) / 4) * 4 + 1 + c));
    end
    crc = '0;
    for (int b = cur_len - 1; b >= 0; b--) begin
      crc[b] = crc_sout;
      out_shift = 1'b1;
      @(negedge clk);
      out_shift = 1'b0;
    end
  endtask

  function automatic logic [7:0] rev8(input logic [7:0] v);
    for (int i = 0; i < 8; i++) rev8[i] = v[7-i];
  endfunction

  function automatic logic [31:0] rev32(input logic [31:0] v);
    for (int i = 0; i < 32; i++) rev32[i] = v[31-i];
  endfunction

  // Ethernet FCS, LSB-first reflected algorithm.
  function automatic logic [31:0] eth_fcs(input byte_q_t p);
    logic [31:0] r;
    r = 32'hFFFF_FFFF;
    foreach (p[n]) begin
      r ^= 32'(p[n]);
      for (int b = 0; b < 8; b++) r = r[0] ? ((r >> 1) ^ 32'hEDB8_8320) : (r >> 1);
    end
    return ~r;
  endfunction

  function automatic byte_q_t rand_bytes(input int n);
    byte_q_t q;
    repeat (n) q.push_back(8'($urandom()));
    return q;
  endfunction

  initial begin
    byte_q_t p, pr;
    logic [31:0] crc, fcs;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Ethernet.
    configure(32'h04C1_1DB7, 32);
    for (int f = 0; f < 2; f++) begin
      p = rand_bytes(f == 0 ? 60 : 1514);       // frame without its FCS
      pr.delete();
      foreach (p[n]) pr.push_back(rev8(p[n]));
      run(pr, crc, "Ethernet FCS");
      fcs = eth_fcs(p);
      check(rev32(~crc) == fcs, $sformatf("Ethernet FCS %h exp %h", rev32(~crc), fcs));
      for (int b = 0; b < 4; b++) pr.push_back(rev8(fcs[8*b +: 8]));   // FCS, low byte first
      run(pr, crc, "Ethernet frame check");
      check(crc == 32'hC704_DD7B, $sformatf("Ethernet residue %h", crc));
      check(crc_ok == 1'b0, "residue is not zero for Ethernet");
    end

    // ATM AAL5: 32 cells of 48 bytes, CRC-32 in the last 4 bytes.
    p = rand_bytes(1536 - 4);
    crc = ~ref_crc(32'h04C1_1DB7, 32, p);
    for (int b = 3; b >= 0; b--) p.push_back(crc[8*b +: 8]);
    run(p, crc, "AAL5 PDU");
    check(crc == 32'hC704_DD7B, $sformatf("AAL5 residue %h", crc));

    // ATM cell header CRC-8.
    configure(32'h0000_0007, 8);
    for (int t = 0; t < 4; t++) begin
      p = rand_bytes(4);
      run(p, crc, "ATM HEC");
      check(crc == ref_crc(32'h07, 8, p), $sformatf("ATM header CRC-8 %h", crc));
    end

    // UMTS transport block CRCs.
    p = rand_bytes(640);
    begin
      logic [31:0] polys[4] = '{32'h0080_0063, 32'h0000_1021, 32'h0000_080F, 32'h0000_009B};
      int lens[4] = '{24, 16, 12, 8};
      for (int i = 0; i < 4; i++) begin
        configure(polys[i], lens[i]);
        run(p, crc, "UMTS");
        check(crc == ref_crc(polys[i], lens[i], p), $sformatf("UMTS CRC-%0d %h", lens[i], crc));
      end
    end

    // HIPERLAN/2 long and short channel PDUs.
    configure(32'h0080_0063, 24);
    p = rand_bytes(54 - 3);
    run(p, crc, "HIPERLAN/2 LCH");
    check(crc == ref_crc(32'h0080_0063, 24, p), "HIPERLAN/2 LCH CRC-24");
    configure(32'h0000_1021, 16);
    p = rand_bytes(9 - 2);
    run(p, crc, "HIPERLAN/2 SCH");
    check(crc == ref_crc(32'h0000_1021, 16, p), "HIPERLAN/2 SCH CRC-16");
    p = with_crc(32'h0000_1021, 16, p);
    run(p, crc, "HIPERLAN/2 SCH check");
    check(crc == '0 && crc_ok, "HIPERLAN/2 SCH received without error");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
