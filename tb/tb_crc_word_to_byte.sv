// tb_crc_word_to_byte: self-checking testbench of the input parallel/serial
// converter. Random packets are cut into 4-byte words (short last word with
// word_nbytes) and offered with random idle gaps; a scoreboard checks that
// the bytes come out in order, MSB first, with out_first and out_last on the
// packet's first and last byte. Back-to-back words must give one byte every
// clock: a 64-byte packet offered without gaps takes exactly 64 clocks.
module tb_crc_word_to_byte;

  logic clk = 1'b0, rst_n = 1'b0;
  logic word_valid = 1'b0, word_ready;
  logic [31:0] word_data = '0;
  logic [1:0] word_nbytes = '0;
  logic word_first = 1'b0, word_last = 1'b0;
  logic out_valid, out_first, out_last;
  logic [7:0] out_data;
  int checks = 0, failures = 0;

  crc_word_to_byte dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Expected byte stream: {data, first, last}.
  typedef struct { logic [7:0] d; bit f; bit l; } exp_t;
  exp_t expq[$];
  int nbytes_out = 0;
  int first_cycle, last_cycle, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      exp_t e;
      if (expq.size() == 0) begin
        check(1'b0, "unexpected byte");
      end else begin
        e = expq.pop_front();
        check(out_data == e.d && out_first == e.f && out_last == e.l,
              $sformatf("byte %0d: got %h/%b/%b exp %h/%b/%b", nbytes_out,
                        out_data, out_first, out_last, e.d, e.f, e.l));
      end
      if (out_first) first_cycle = cyc;
      if (out_last)  last_cycle  = cyc;
      nbytes_out++;
    end
  end

  task automatic send_packet(input int n, input bit gaps);
    logic [7:0] p[$];
    repeat (n) p.push_back(8'($urandom()));
    foreach (p[i]) expq.push_back('{p[i], i == 0, i == n - 1});
    for (int w = 0; w < n; w += 4) begin
      int k;
      k = (n - w >= 4) ? 4 : n - w;
      if (gaps) repeat ($urandom_range(0, 5)) begin
        @(negedge clk);
        word_valid = 1'b0;
      end
      @(negedge clk);
      word_valid  = 1'b1;
      word_data   = 32'($urandom());
      for (int j = 0; j < k; j++) word_data[31-8*j -: 8] = p[w+j];
      word_nbytes = 2'(k);
      word_first  = (w == 0);
      word_last   = (w + 4 >= n);
      while (!word_ready) @(negedge clk);   // stall while the word is busy
      @(posedge clk);
    end
    @(negedge clk);
    word_valid = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!out_valid && word_ready, "reset state");
    for (int t = 0; t < 100; t++) send_packet($urandom_range(1, 30), 1'b1);
    repeat (8) @(posedge clk);
    send_packet(64, 1'b0);
    repeat (8) @(posedge clk);
    check(last_cycle - first_cycle == 63,
          $sformatf("64 bytes took %0d clocks", last_cycle - first_cycle + 1));
    check(expq.size() == 0, $sformatf("%0d bytes never came out", expq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
