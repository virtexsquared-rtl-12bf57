// tb_accel_blit: the copy accelerator with the FSAB slave model. Software writes the registers
// over SPAM and polls the packets-written register. Each copy takes a packed source of n
// 64-byte packets and writes it as rows of `row` packets, `stride` bytes apart. Checks: every
// destination block holds the right source block, memory outside the destination is
// untouched, reads and writes are 8-word transactions with the blit did, credits are respected,
// and the packets-written register counts up to n.
module tb_accel_blit;
  import vs_pkg::*;
  `include "tb_common.svh"
  logic cclk = 0, cclk_rst_b = 0, fsabi_clk = 0, fsabi_rst_b = 0;
  spamo_t spamo = '0;
  spami_t spami;
  fsabo_t accel_blit__fsabo;
  logic accel_blit__fsabo_credit;
  fsabi_t fsabi;
  int outstanding = 0, rem = 0;
  accel_blit dut (.*);
  fsab_slave_model #(.MEM_WORDS(16384), .LATENCY(8)) u_mem (.clk(fsabi_clk),
    .fsabo(fsabi_rst_b ? accel_blit__fsabo : fsabo_t'(0)), .fsabo_credit(accel_blit__fsabo_credit), .fsabi(fsabi));
  always #5 cclk = ~cclk;
  always #6 fsabi_clk = ~fsabi_clk;
  `WATCHDOG(cclk, 400000)
  `include "tb_spam.svh"

  always @(posedge fsabi_clk) if (fsabi_rst_b) begin
    if (accel_blit__fsabo.valid) begin
      if (rem == 0) begin
        outstanding++;
        check(accel_blit__fsabo.len == 4'd8 && accel_blit__fsabo.did == DID_BLIT, "8-word transactions, blit did");
        rem = accel_blit__fsabo.mode == FSAB_WRITE ? 8 : 1;
      end
      rem--;
    end
    if (accel_blit__fsabo_credit) outstanding--;
    check(outstanding <= 4, "credits respected");
  end

  initial begin
    logic [63:0] ref_mem [16384];
    logic [31:0] r;
    for (int i = 0; i < 16384; i++) ref_mem[i] = {~32'(i), 32'(i)};
    repeat (3) @(negedge cclk);
    cclk_rst_b = 1; fsabi_rst_b = 1;
    for (int t = 0; t < 4; t++) begin
      int src, dst, n, row, stride;
      src = 64 * ($urandom % 64);             // source in the first 4 KB
      dst = 32'h10000 + 64 * ($urandom % 64);  // destination from 64 KB on
      n = 1 + $urandom % 24;
      row = 1 + $urandom % 4;
      stride = 64 * (row + $urandom % 4);
      spam_wr(SPAM_DID_BLIT, 24'h14, 0);
      spam_wr(SPAM_DID_BLIT, 24'h00, 32'(src));
      spam_wr(SPAM_DID_BLIT, 24'h08, 32'(dst));
      spam_wr(SPAM_DID_BLIT, 24'h0C, 32'(row));
      spam_wr(SPAM_DID_BLIT, 24'h10, 32'(stride));
      spam_wr(SPAM_DID_BLIT, 24'h04, 32'(n));
      do begin
        repeat (30) @(negedge cclk);
        spam_rw(1, SPAM_DID_BLIT, 24'h14, 0, r);
        check(r <= 32'(n), "packets-written count within range");
      end while (r != 32'(n));
      for (int k = 0; k < n; k++)
        for (int w = 0; w < 8; w++)
          ref_mem[(dst + (k / row) * stride + (k % row) * 64) / 8 + w] = ref_mem[src / 8 + 8 * k + w];
      repeat (40) @(negedge fsabi_clk);
      for (int i = 0; i < 16384; i++) if (u_mem.mem[i] != ref_mem[i]) check(0, $sformatf("word %0d after copy %0d", i, t));
      check(1, "memory compared");
    end
    tb_finish();
  end
endmodule
