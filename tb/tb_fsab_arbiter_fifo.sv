// tb_fsab_arbiter_fifo: one master on a slow clock (iclk) pushes random reads and writes into
// the buffer; the testbench acts as the arbiter on a fast clock (oclk), starting a transaction
// whenever avail is high. Checks: avail never rises before a write is complete, the packets of
// each transaction come out on consecutive cycles with done on the last one, the contents match
// what was sent, and one credit comes back per transaction.
module tb_fsab_arbiter_fifo;
  import vs_pkg::*;
  `include "tb_common.svh"
  logic iclk = 0, oclk = 0, iclk_rst_b = 0, oclk_rst_b = 0, start = 0;
  fsabo_t in = '0, pkt;
  logic credit, avail, done;
  fsabo_t q [$];
  int credits_back = 0, ntx = 0, sent_pkts = 0;

  fsab_arbiter_fifo #(.CREDITS(4)) dut (.*);
  always #7 iclk = ~iclk;
  always #3 oclk = ~oclk;
  `WATCHDOG(oclk, 200000)
  always @(posedge iclk) if (iclk_rst_b && credit) credits_back++;

  // arbiter side
  initial begin
    wait (oclk_rst_b);
    forever begin
      @(negedge oclk);
      if (avail && ($urandom % 3 != 0)) begin
        fsabo_t e;
        int n;
        start = 1;
        @(negedge oclk);
        start = 0;
        check(q.size() > 0, "a transaction was sent");
        e = q.pop_front();
        n = (e.mode == FSAB_WRITE) ? int'(e.len) : 1;
        check(sent_pkts >= n, "avail only when the whole transaction is buffered");
        for (int k = 0; k < n; k++) begin
          fsabo_t x;
          x = e; x.data = e.data + 64'(k); x.subdid = 4'(k);
          check(pkt == x, $sformatf("packet %0d of transaction %0d", k, ntx));
          check(done == (k == n - 1), "done on the last packet");
          @(negedge oclk);
        end
        check(!pkt.valid, "nothing after the transaction");
        sent_pkts -= n;
        ntx++;
      end
    end
  end

  initial begin
    int cred = 4;
    repeat (3) @(negedge iclk);
    iclk_rst_b = 1; oclk_rst_b = 1;
    for (int t = 0; t < 300; t++) begin
      fsabo_t e;
      int n;
      while (cred == 0) begin @(negedge iclk); cred += 0; if (credits_back > 0) begin cred += credits_back; credits_back = 0; end end
      cred--;
      e = '{valid: 1'b1, mode: ($urandom % 2) ? FSAB_WRITE : FSAB_READ, did: 4'($urandom),
            subdid: 4'd0, addr: 31'($urandom), len: 4'(1 + $urandom % 8), data: {$urandom, $urandom},
            mask: 8'($urandom)};
      q.push_back(e);
      n = (e.mode == FSAB_WRITE) ? int'(e.len) : 1;
      for (int k = 0; k < n; k++) begin
        in = e; in.data = e.data + 64'(k); in.subdid = 4'(k);
        @(negedge iclk);
        sent_pkts++;
      end
      in = '0;
      repeat ($urandom % 3) @(negedge iclk);
      if (credits_back > 0) begin cred += credits_back; credits_back = 0; end
    end
    wait (ntx == 300);
    repeat (20) @(negedge iclk);
    cred += credits_back;
    check(cred == 4, $sformatf("all credits returned (%0d)", cred));
    tb_finish();
  end
endmodule
