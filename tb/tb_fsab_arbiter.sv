// tb_fsab_arbiter: three masters on three different clocks send reads and writes through the
// arbiter. The slave side returns credits under testbench control. Checks: every transaction
// arrives whole, with its packets on consecutive cycles and its data intact; transactions of
// one master keep their order; masters get their credits back; and with all three waiting,
// the lowest-numbered master is served first (fixed priority).
module tb_fsab_arbiter;
  import vs_pkg::*;
  `include "tb_common.svh"
  localparam int N = 3;
  logic clk = 0, rst_b = 0, fsabo_credit = 0;
  logic [N-1:0] m_clk = '0, m_rst_b = '0, m_credit;
  fsabo_t m_fsabo [N];
  fsabo_t fsabo;
  int mc [N];
  typedef struct { fsab_mode_e mode; logic [3:0] did; logic [30:0] addr; int len; logic [63:0] d0; } txn_t;
  txn_t expq [N][$];
  txn_t order [$];
  int got = 0, hold_credits = 1;

  fsab_arbiter #(.N(N), .CREDITS(4), .SLAVE_CREDITS(2)) dut (.*);
  always #4 clk = ~clk;
  always #5 m_clk[0] = ~m_clk[0];
  always #6 m_clk[1] = ~m_clk[1];
  always @(*) m_clk[2] = clk;
  for (genvar i = 0; i < N; i++) begin : g_cred
    always @(posedge m_clk[i]) if (m_rst_b[i] && m_credit[i]) mc[i]++;
  end
  `WATCHDOG(clk, 40000)

  // slave side: collect transactions, return credits unless held
  int pend_cred = 0;
  initial begin
    forever begin
      @(negedge clk);
      fsabo_credit = 0;
      if (fsabo.valid) begin
        txn_t t;
        int n, m;
        t.mode = fsabo.mode; t.did = fsabo.did; t.addr = fsabo.addr; t.len = int'(fsabo.len); t.d0 = fsabo.data;
        n = (t.mode == FSAB_WRITE) ? t.len : 1;
        for (int k = 1; k < n; k++) begin
          @(negedge clk);
          check(fsabo.valid, "packets of a write are consecutive");
          check(fsabo.data == t.d0 + 64'(k), "write data order");
        end
        m = int'(t.did);
        check(expq[m].size() > 0, "transaction expected");
        if (expq[m].size() > 0) begin
          txn_t e;
          e = expq[m].pop_front();
          check(e.mode == t.mode && e.addr == t.addr && e.len == t.len && e.d0 == t.d0,
                $sformatf("transaction of master %0d intact", m));
        end
        order.push_back(t);
        got++;
        pend_cred++;
      end
      if (!hold_credits && pend_cred > 0) begin fsabo_credit = 1; pend_cred--; end
    end
  end

  task automatic run_master(input int mi);
    int mc0;
    mc0 = mc[mi];
    for (int k = 0; k < 30; k++) begin
      fsab_mode_e md;
      int ln;
      logic [63:0] d0;
      while (4 - k + (mc[mi] - mc0) <= 0) @(negedge m_clk[mi]);
      md = ($urandom % 2) ? FSAB_WRITE : FSAB_READ;
      ln = 1 + $urandom % 8;
      d0 = {32'(mi), 32'(k * 100)};
      expq[mi].push_back('{md, 4'(mi), 31'(k * 64), ln, d0});
      for (int p = 0; p < (md == FSAB_WRITE ? ln : 1); p++) begin
        @(negedge m_clk[mi]);
        m_fsabo[mi] = '{valid: 1'b1, mode: md, did: 4'(mi), subdid: 4'd0, addr: 31'(k * 64),
                        len: 4'(ln), data: d0 + 64'(p), mask: 8'hFF};
      end
      @(negedge m_clk[mi]);
      m_fsabo[mi] = '0;
      repeat ($urandom % 3) @(negedge m_clk[mi]);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin m_fsabo[i] = '0; mc[i] = 0; end
    repeat (3) @(negedge clk);
    rst_b = 1; m_rst_b = '1;
    // priority: fill the slave's two credits with master 2, then queue one of each
    fork
      begin : p2
        for (int k = 0; k < 2; k++) begin
          @(negedge m_clk[2]);
          m_fsabo[2] = '{valid: 1'b1, mode: FSAB_READ, did: 4'd2, subdid: 4'd0, addr: 31'(k*64), len: 4'd8, data: 64'd0, mask: 8'h0};
          expq[2].push_back('{FSAB_READ, 4'd2, 31'(k*64), 8, 64'd0});
          @(negedge m_clk[2]);
          m_fsabo[2] = '0;
        end
      end
    join
    repeat (20) @(negedge clk);
    for (int i = N - 1; i >= 0; i--) begin
      @(negedge m_clk[i]);
      m_fsabo[i] = '{valid: 1'b1, mode: FSAB_READ, did: 4'(i), subdid: 4'd0, addr: 31'h100, len: 4'd2, data: 64'd0, mask: 8'h0};
      expq[i].push_back('{FSAB_READ, 4'(i), 31'h100, 2, 64'd0});
      @(negedge m_clk[i]);
      m_fsabo[i] = '0;
    end
    repeat (20) @(negedge clk);
    check(got == 2, "only two transactions pass without slave credits");
    hold_credits = 0;
    wait (got == 5);
    check(order[2].did == 0 && order[3].did == 1 && order[4].did == 2, "fixed priority order 0,1,2");
    repeat (30) @(negedge clk);
    for (int i = 0; i < N; i++) check(mc[i] == (i == 2 ? 3 : 1), $sformatf("credits returned to master %0d: %0d", i, mc[i]));
    // random traffic from all masters, with credit accounting per master
    fork
      run_master(0);
      run_master(1);
      run_master(2);
    join_none
    wait (got == 5 + 90);
    repeat (50) @(negedge clk);
    for (int i = 0; i < N; i++) check(expq[i].size() == 0, "all transactions delivered");
    tb_finish();
  end
endmodule
