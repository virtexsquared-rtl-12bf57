// tb_accel_clear: the fill accelerator with the FSAB slave model on a separate clock. Software
// (SPAM accesses from the testbench) writes value, start address and packet count, then polls
// the count until it reads zero. Checks: exactly the requested 8-byte words hold {value, value}
// and the words around them are untouched; every transaction is a write of at most 8 packets
// that stays inside one 64-byte block; credits are respected; the count read back falls to 0.
module tb_accel_clear;
  import vs_pkg::*;
  `include "tb_common.svh"
  logic cclk = 0, cclk_rst_b = 0, fsabi_clk = 0, fsabi_rst_b = 0;
  spamo_t spamo = '0;
  spami_t spami;
  fsabo_t accel_clear__fsabo;
  logic accel_clear__fsabo_credit;
  fsabi_t fsabi;
  int outstanding = 0, rem = 0, polls = 0;
  accel_clear dut (.*);
  fsab_slave_model #(.MEM_WORDS(8192), .LATENCY(8)) u_mem (.clk(fsabi_clk),
    .fsabo(fsabi_rst_b ? accel_clear__fsabo : fsabo_t'(0)), .fsabo_credit(accel_clear__fsabo_credit), .fsabi(fsabi));
  always #5 cclk = ~cclk;
  always #7 fsabi_clk = ~fsabi_clk;
  `WATCHDOG(cclk, 300000)
  `include "tb_spam.svh"

  always @(posedge fsabi_clk) if (fsabi_rst_b) begin
    if (accel_clear__fsabo.valid) begin
      if (rem == 0) begin
        outstanding++;
        rem = int'(accel_clear__fsabo.len);
        check(accel_clear__fsabo.mode == FSAB_WRITE && accel_clear__fsabo.did == DID_CLEAR, "writes with the clear did");
        check(int'(accel_clear__fsabo.addr[5:3]) + rem <= 8, "transaction inside one 64-byte block");
      end
      rem--;
    end else check(rem == 0, "packets of a transaction are consecutive");
    if (accel_clear__fsabo_credit) outstanding--;
    check(outstanding <= 4, "credits respected");
  end

  task automatic fill(input logic [31:0] v, input int start, input int n);
    logic [31:0] r;
    spam_wr(SPAM_DID_CLEAR, 24'h0, v);
    spam_wr(SPAM_DID_CLEAR, 24'h4, 32'(start));
    spam_wr(SPAM_DID_CLEAR, 24'h8, 32'(n));
    do begin
      repeat (20) @(negedge cclk);
      spam_rw(1, SPAM_DID_CLEAR, 24'h8, 0, r);
      polls++;
    end while (r != 0);
  endtask

  initial begin
    logic [63:0] ref_mem [8192];
    for (int i = 0; i < 8192; i++) ref_mem[i] = {~32'(i), 32'(i)};
    repeat (3) @(negedge cclk);
    cclk_rst_b = 1; fsabi_rst_b = 1;
    for (int t = 0; t < 6; t++) begin
      int s, n;
      logic [31:0] v;
      s = 64 * ($urandom % 100);
      n = 1 + $urandom % 100;
      v = $urandom;
      fill(v, s, n);
      for (int i = 0; i < n; i++) ref_mem[s / 8 + i] = {v, v};
      repeat (30) @(negedge fsabi_clk);
      for (int i = 0; i < 8192; i++) if (u_mem.mem[i] != ref_mem[i]) check(0, $sformatf("word %0d after fill %0d", i, t));
      check(1, "memory compared");
    end
    check(polls > 6, "software polled the count");
    tb_finish();
  end
endmodule
