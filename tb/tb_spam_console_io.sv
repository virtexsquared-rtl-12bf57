// tb_spam_console_io: the serial console on the SPAM bus, 8 clocks per bit. A testbench
// receiver decodes txd. Checks: each SPAM write of device 0 sends its low byte, in order;
// back-to-back writes are paced (the second is acknowledged only after the first byte has
// gone out, which shows as a long SPAM wait); a read returns the busy bit.
module tb_spam_console_io;
  import vs_pkg::*;
  `include "tb_common.svh"
  localparam int CPB = 8;
  logic cclk = 0, clk, rst_b = 0, txd;
  spamo_t spamo = '0;
  spami_t spami;
  logic [7:0] sent [$];
  int rx = 0, paced = 0;
  assign clk = cclk;
  spam_console_io #(.CLKS_PER_BIT(CPB)) dut (.*);
  always #5 cclk = ~cclk;
  `WATCHDOG(cclk, 200000)
  `include "tb_spam.svh"

  initial begin
    wait (rst_b);
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (CPB / 2) @(posedge cclk);
      check(!txd, "start bit");
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge cclk); b[i] = txd; end
      repeat (CPB) @(posedge cclk);
      check(txd, "stop bit");
      if (sent.size() > 0) check(b == sent.pop_front(), $sformatf("character %0d", rx));
      else check(0, "unexpected character");
      rx++;
    end
  end

  initial begin
    logic [31:0] r;
    repeat (3) @(negedge cclk);
    rst_b = 1;
    for (int i = 0; i < 30; i++) begin
      logic [7:0] c;
      c = 8'($urandom);
      sent.push_back(c);
      spam_rw(0, SPAM_DID_CONSOLE, 24'h0, {24'h0, c}, r);
      check(spam_wait < 300 || i == 0, "write acknowledged");
      if (spam_wait > 5 * CPB) paced++;
      if ($urandom % 3 == 0) begin
        spam_rw(1, SPAM_DID_CONSOLE, 24'h0, 0, r);
        check(r == 32'd1, "busy while sending");
      end
    end
    repeat (12 * CPB) @(negedge cclk);
    spam_rw(1, SPAM_DID_CONSOLE, 24'h0, 0, r);
    check(r == 32'd0, "idle after the last character");
    check(rx == 30, $sformatf("characters received %0d", rx));
    check(paced > 20, "writes paced by the line");
    tb_finish();
  end
endmodule
