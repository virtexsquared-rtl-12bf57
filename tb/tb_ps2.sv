// tb_ps2: the PS/2 keyboard receiver against a keyboard model that clocks out 11-bit frames
// (start, 8 data bits LSB first, odd parity, stop) with a slow ps2clk (data change while the
// clock is high, the receiver samples on the falling edge). Checks: scancodes are read back
// over SPAM device 5 in order; an empty FIFO reads 0xFFFFFFFF; a frame with a parity error
// is dropped; more codes than the FIFO holds lose only the newest ones; writes are answered.
module tb_ps2;
  import vs_pkg::*;
  `include "tb_common.svh"
  logic cclk = 0, clk, rst_b = 0, ps2clk = 1, ps2data = 1;
  spamo_t spamo = '0;
  spami_t spami;
  assign clk = cclk;
  ps2 #(.FIFO_DEPTH(16)) dut (.*);
  always #5 cclk = ~cclk;
  `WATCHDOG(cclk, 2000000)
  `include "tb_spam.svh"

  task automatic send(input logic [7:0] code, input bit bad_parity);
    logic [10:0] f;
    f = {1'b1, ~^code ^ bad_parity, code, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2data = f[i];
      #200 ps2clk = 0;
      #400 ps2clk = 1;
      #200;
    end
    #1000;
  endtask

  initial begin
    logic [31:0] r;
    logic [7:0] codes [$];
    repeat (3) @(negedge cclk);
    rst_b = 1;
    spam_rw(1, SPAM_DID_PS2, 24'h0, 0, r);
    check(r == 32'hFFFF_FFFF, "empty FIFO reads all ones");
    check(spam_wait == 1, "answered in the next cycle");
    for (int n = 0; n < 40; n++) begin
      logic [7:0] c;
      c = 8'($urandom);
      send(c, 0);
      spam_rw(1, SPAM_DID_PS2, 24'h0, 0, r);
      check(r == {24'h0, c}, $sformatf("scancode %h read %h", c, r));
    end
    send(8'h1C, 1);
    spam_rw(1, SPAM_DID_PS2, 24'h0, 0, r);
    check(r == 32'hFFFF_FFFF, "bad parity frame dropped");
    for (int n = 0; n < 20; n++) begin
      logic [7:0] c;
      c = 8'($urandom);
      send(c, 0);
      if (n < 16) codes.push_back(c);
    end
    for (int n = 0; n < 16; n++) begin
      spam_rw(1, SPAM_DID_PS2, 24'h0, 0, r);
      check(r == {24'h0, codes[n]}, $sformatf("buffered code %0d", n));
    end
    spam_rw(1, SPAM_DID_PS2, 24'h0, 0, r);
    check(r == 32'hFFFF_FFFF, "codes beyond the FIFO depth dropped");
    spam_wr(SPAM_DID_PS2, 24'h0, 32'h0);
    tb_finish();
  end
endmodule
