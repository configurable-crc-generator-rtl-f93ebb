// tb_crc_out_serializer: self-checking testbench of the serial CRC output.
// Random top-aligned CRCs of every length 1..32 are loaded; the bits on
// sout must be CRC bit L-1 down to bit 0, one per shift, busy must fall
// after exactly L shifts, clocks without shift must hold the output, and
// load must win over shift.
module tb_crc_out_serializer;
  import crc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, shift = 1'b0, sout, busy;
  crc_word_t crc_in = '0;
  crc_len_t len_in = '0;
  int checks = 0, failures = 0;

  crc_out_serializer dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(!busy && !sout, "reset state");
    for (int t = 0; t < 200; t++) begin
      int len;
      logic [31:0] val;
      len = (t < 32) ? t + 1 : $urandom_range(1, 32);
      val = $urandom();
      if (len < 32) val &= (32'd1 << len) - 1;
      @(negedge clk);
      load = 1'b1;
      shift = t[0];                    // load has priority over shift
      len_in = crc_len_t'(len);
      crc_in = val << (32 - len);      // top aligned
      if (len < 32) crc_in |= 32'($urandom()) & ((32'd1 << (32 - len)) - 1); // junk below
      @(negedge clk);
      load = 1'b0; shift = 1'b0;
      for (int b = len - 1; b >= 0; b--) begin
        check(busy, $sformatf("busy with %0d bits left", b + 1));
        check(sout == val[b], $sformatf("L=%0d bit %0d", len, b));
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);              // idle clock: output must hold
          check(sout == val[b], $sformatf("L=%0d bit %0d held", len, b));
        end
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
      end
      check(!busy && !sout, $sformatf("L=%0d done after %0d shifts", len, len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
