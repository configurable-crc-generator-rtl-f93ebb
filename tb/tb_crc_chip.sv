// tb_crc_chip: end-to-end testbench of the CRC chip at its default sizes.
//
// The chip is driven only through its pins, as on a tester: configurations
// are shifted in serially and loaded, packets are offered as 32-bit words,
// and every CRC is shifted out bit-serially and compared with the
// bit-serial reference model. Configurations: the CRC polynomials of
// Ethernet/ATM AAL5 (CRC-32), UMTS (CRC-24, -16, -12, -8), ATM HEC (CRC-8),
// HIPERLAN (CRC-16 CCITT), the 3- and 6-bit lengths of the constraint-length
// example, and random ones. Mechanisms that must each occur at least once:
// serial configuration with read-back, one-clock reconfiguration between two
// back-to-back packets, a change of constraint length, a short last word,
// back-pressure (word offered while the converter is busy), idle gaps,
// shut-down (length 0), a received codeword accepted and a corrupted one
// rejected. For packets offered without gaps the CRC must appear at the
// output N+2 clocks after the first word is taken (one byte per clock).
module tb_crc_chip;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Mechanism counters.
  int n_cfg = 0, n_readback = 0, n_b2b_reconfig = 0, n_len_change = 0;
  int n_short = 0, n_stall = 0, n_gap = 0, n_shutdown = 0, n_ok = 0, n_bad = 0;
  int n_timed = 0;

  // Clock counter and the clock at which each packet's first word is taken.
  int cyc = 0;
  int t_first[$];
  always @(posedge clk) begin
    if (rst_n && word_valid && word_ready && word_first) t_first.push_back(cyc);
    if (rst_n && word_valid && !word_ready) n_stall++;
    cyc++;
  end

  // Expected results, in packet order.
  typedef struct { logic [31:0] crc; int len; int nbytes; bit timed; bit ok; bit ok_known; } exp_t;
  exp_t expq[$];
  int results = 0;
  bit shifting = 1'b0;

  // Output side: shift each CRC out as soon as it is there.
  always begin
    @(negedge clk);
    if (rst_n && out_busy) begin
      exp_t e;
      logic [31:0] got;
      int t0, tc;
      shifting = 1'b1;
      tc = cyc;
      if (expq.size() == 0) begin
        check(1'b0, "result without a packet");
        e = '{0, 32, 0, 0, 0, 0};
      end else e = expq.pop_front();
      t0 = (t_first.size() != 0) ? t_first.pop_front() : 0;
      if (e.timed) begin
        check(tc - t0 == e.nbytes + 2,
              $sformatf("%0d-byte packet: result after %0d clocks", e.nbytes, tc - t0));
        n_timed++;
      end
      got = '0;
      for (int b = e.len - 1; b >= 0; b--) begin
        got[b] = crc_sout;
        out_shift = 1'b1;
        @(negedge clk);
        out_shift = 1'b0;
      end
      check(!out_busy, "output empty after L shifts");
      check(got == e.crc, $sformatf("packet %0d L=%0d: got %h exp %h", results, e.len, got, e.crc));
      if (e.ok_known) begin
        check(crc_ok == e.ok, $sformatf("packet %0d: crc_ok=%b exp %b", results, crc_ok, e.ok));
        if (crc_ok && e.ok) n_ok++;
        if (!crc_ok && !e.ok) n_bad++;
      end
      results++;
      shifting = 1'b0;
    end
  end

  // Current configuration as the testbench knows it.
  logic [31:0] cur_poly = '0;
  int cur_len = 0;

  // Shift a configuration in, MSB first, checking the read-back of the
  // previous chain contents. Does not load it.
  logic [CFG_W-1:0] chain_model = '0;
  task automatic shift_cfg(input logic [31:0] poly, input int len);
    logic [CFG_W-1:0] w;
    w = {crc_len_t'(len), align_poly(poly, crc_len_t'(len))};
    for (int b = CFG_W - 1; b >= 0; b--) begin
      @(negedge clk);
      checks++;
      if (cfg_sout !== chain_model[CFG_W-1]) begin
        failures++; $display("FAIL: configuration read-back");
      end else n_readback++;
      cfg_shift = 1'b1;
      cfg_sin   = w[b];
      chain_model = {chain_model[CFG_W-2:0], w[b]};
    end
    @(negedge clk);
    cfg_shift = 1'b0;
  endtask

  task automatic configure(input logic [31:0] poly, input int len);
    shift_cfg(poly, len);
    @(negedge clk);
    cfg_load = 1'b1;
    @(negedge clk);
    cfg_load = 1'b0;
    if (len != cur_len) n_len_change++;
    cur_poly = poly; cur_len = len; n_cfg++;
  endtask

  // Offer one packet as words, starting in the current clock. gaps: random
  // idle clocks between words. load_cfg: pulse cfg_load in the clock after
  // the first word is taken, while the first byte enters the CRC unit, so
  // that the packet uses the configuration waiting in the chain. Returns
  // just after the falling edge that follows the last word being taken, so
  // a packet sent right after it follows with no idle clock.
  task automatic send_words(input byte_q_t p, input bit gaps, input bit load_cfg);
    int n;
    n = p.size();
    for (int w = 0; w < n; w += 4) begin
      int k;
      k = (n - w >= 4) ? 4 : n - w;
      if (gaps && w != 0 && $urandom_range(0, 1) == 1) begin
        word_valid = 1'b0;
        repeat ($urandom_range(1, 4)) @(negedge clk);
        n_gap++;
      end
      word_valid  = 1'b1;
      word_data   = 32'($urandom());
      for (int j = 0; j < k; j++) word_data[31-8*j -: 8] = p[w+j];
      word_nbytes = 2'(k);
      word_first  = (w == 0);
      word_last   = (w + 4 >= n);
      if (k != 4) n_short++;
      while (!word_ready) @(negedge clk);
      @(posedge clk);                       // word taken at this edge
      @(negedge clk);
      if (load_cfg && w == 0) begin
        cfg_load = 1'b1;
        fork begin @(negedge clk); cfg_load = 1'b0; end join_none
      end
    end
    word_valid = 1'b0;
  endtask

  task automatic packet(input byte_q_t p, input bit gaps, input int ok_mode = 0);
    exp_t e;
    e.crc = ref_crc(cur_poly, cur_len, p);
    e.len = cur_len; e.nbytes = p.size(); e.timed = !gaps;
    e.ok_known = (ok_mode != 0); e.ok = (ok_mode == 1);
    expq.push_back(e);
    @(negedge clk);
    send_words(p, gaps, 1'b0);
  endtask

  function automatic byte_q_t rand_bytes(input int n);
    byte_q_t q;
    repeat (n) q.push_back(8'($urandom()));
    return q;
  endfunction

  task automatic wait_idle();
    while (expq.size() != 0 || shifting) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  typedef struct { logic [31:0] poly; int len; } prot_t;
  prot_t prots[$];

  initial begin
    byte_q_t p;
    prots = '{'{32'h04C1_1DB7, 32},   // Ethernet, ATM AAL5
              '{32'h0080_0063, 24},   // UMTS CRC-24
              '{32'h0000_1021, 16},   // UMTS CRC-16, HIPERLAN CRC-16 CCITT
              '{32'h0000_080F, 12},   // UMTS CRC-12
              '{32'h0000_009B, 8},    // UMTS CRC-8
              '{32'h0000_0007, 8},    // ATM HEC
              '{32'h0000_0003, 3},    // constraint-length example, 3 bits
              '{32'h0000_0021, 6}};   // constraint-length example, 6 bits
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!active && !out_busy && word_ready, "reset state");

    // Every protocol, a few packets each, with and without gaps.
    foreach (prots[i]) begin
      configure(prots[i].poly, prots[i].len);
      check(active, "active after configuration");
      for (int t = 0; t < 6; t++) begin
        packet(rand_bytes($urandom_range(1, 40)), t[0]);
        wait_idle();
      end
    end

    // Receiver check: codewords with their CRC appended pass, corrupted fail.
    configure(32'h04C1_1DB7, 32);
    for (int t = 0; t < 4; t++) begin
      p = with_crc(cur_poly, 32, rand_bytes($urandom_range(4, 60)));
      packet(p, 1'b0, 1);
      wait_idle();
      p[$urandom_range(0, p.size() - 1)] ^= 8'(1 << $urandom_range(0, 7));
      packet(p, 1'b1, 2);
      wait_idle();
    end

    // Back-to-back packets; the second has a new configuration, loaded in
    // one clock while its first byte enters, with no idle clock in between.
    for (int t = 0; t < 6; t++) begin
      prot_t a, b;
      byte_q_t pa, pb;
      exp_t e;
      a = prots[t % prots.size()];
      b = prots[(t + 3) % prots.size()];
      configure(a.poly, a.len);
      shift_cfg(b.poly, b.len);                 // waits in the chain
      pa = rand_bytes(4 * $urandom_range(1, 6));
      pb = rand_bytes(36 + $urandom_range(0, 20));
      e = '{ref_crc(a.poly, a.len, pa), a.len, pa.size(), 1'b1, 1'b0, 1'b0};
      expq.push_back(e);
      e = '{ref_crc(b.poly, b.len, pb), b.len, pb.size(), 1'b1, 1'b0, 1'b0};
      expq.push_back(e);
      @(negedge clk);
      send_words(pa, 1'b0, 1'b0);
      send_words(pb, 1'b0, 1'b1);
      if (b.len != a.len) n_len_change++;
      cur_poly = b.poly; cur_len = b.len;
      n_b2b_reconfig++;
      wait_idle();
    end

    // Shut-down: length 0 keeps the unit idle and gives no result.
    configure(32'hFFFF_FFFF, 0);
    check(!active, "shut down at length 0");
    begin
      int busy_seen;
      busy_seen = 0;
      @(negedge clk);
      send_words(rand_bytes(12), 1'b0, 1'b0);
      void'(t_first.pop_front());
      repeat (10) begin
        @(negedge clk);
        if (out_busy) busy_seen++;
      end
      check(busy_seen == 0, "no result while shut down");
      n_shutdown++;
    end
    configure(32'h0000_1021, 16);
    check(active, "active again after shut-down");
    packet(rand_bytes(9), 1'b0);
    wait_idle();

    // Every mechanism must have happened.
    check(n_cfg > 0, "serial configuration");
    check(n_readback > 0, "configuration read-back");
    check(n_b2b_reconfig > 0, "back-to-back reconfiguration");
    check(n_len_change > 0, "constraint length change");
    check(n_short > 0, "short last word");
    check(n_stall > 0, "back-pressure stall");
    check(n_gap > 0, "idle gaps");
    check(n_shutdown > 0, "shut-down");
    check(n_ok > 0, "codeword accepted");
    check(n_bad > 0, "corrupted codeword rejected");
    check(n_timed > 0, "timed packets");
    check(results > 0, "results read");
    $display("mechanisms: cfg=%0d readback=%0d b2b_reconfig=%0d len_change=%0d short=%0d stall=%0d gap=%0d shutdown=%0d ok=%0d bad=%0d timed=%0d results=%0d",
             n_cfg, n_readback, n_b2b_reconfig, n_len_change, n_short, n_stall, n_gap,
             n_shutdown, n_ok, n_bad, n_timed, results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
