// tb_crc_cfg_shiftreg: self-checking testbench of the serial configuration
// register. Random configurations are shifted in MSB first; the parallel
// view must equal the configuration after exactly 38 shifts, clocks with
// shift_en low must change nothing, and the read-back output must return
// the earlier contents bit by bit, MSB first, while the next word enters.
module tb_crc_cfg_shiftreg;
  import crc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic shift_en = 1'b0, sin = 1'b0, sout;
  crc_cfg_t cfg;
  int checks = 0, failures = 0;

  crc_cfg_shiftreg dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [CFG_W-1:0] prev, word;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(cfg == '0, "reset clears the chain");
    prev = '0;
    for (int t = 0; t < 40; t++) begin
      word = {6'($urandom_range(0, 32)), 32'($urandom())};
      for (int b = CFG_W - 1; b >= 0; b--) begin
        @(negedge clk);
        check(sout == prev[b], $sformatf("read-back bit %0d", b));
        shift_en = 1'b1;
        sin      = word[b];
        @(negedge clk);
        shift_en = 1'b0;
        sin      = ~sin;               // ignored while shift_en is low
        @(negedge clk);
      end
      check(cfg == crc_cfg_t'(word), $sformatf("word %0d: got %h exp %h", t, cfg, word));
      prev = word;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
