// tb_spam_timer: the free-running 32-bit timer on the SPAM bus. Checks: a read of device 6 is
// answered in the next cycle; two reads n cycles apart differ by n; writes are acknowledged;
// requests to other devices get no answer (busy_b and data stay zero).
module tb_spam_timer;
  import vs_pkg::*;
  `include "tb_common.svh"
  logic cclk = 0, clk, rst_b = 0;
  spamo_t spamo = '0;
  spami_t spami;
  assign clk = cclk;
  spam_timer dut (.*);
  always #5 cclk = ~cclk;
  `WATCHDOG(cclk, 100000)
  `include "tb_spam.svh"
  always @(negedge cclk) if (rst_b && spami.busy_b == 0) check(spami.data == 0, "idle slave drives zero");

  initial begin
    logic [31:0] a, b;
    repeat (3) @(negedge cclk);
    rst_b = 1;
    for (int i = 0; i < 200; i++) begin
      int gap;
      gap = $urandom % 500;
      spam_rw(1, SPAM_DID_TIMER, 24'h0, 0, a);
      check(spam_wait == 1, "answered in the next cycle");
      repeat (gap) @(negedge cclk);
      spam_rw(1, SPAM_DID_TIMER, 24'h0, 0, b);
      // each spam_rw starts one negedge after the previous one ended
      check(b - a == 32'(gap + 2), $sformatf("timer advanced %0d for %0d", b - a, gap + 2));
    end
    spam_wr(SPAM_DID_TIMER, 24'h0, 32'h5);
    spam_rw(1, 4'h9, 24'h0, 0, a);
    check(spam_wait == 300, "other devices are not answered");
    tb_finish();
  end
endmodule
