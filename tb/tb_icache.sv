// tb_icache: the instruction cache (and its cache_fill_port) on a core clock, with the FSAB
// slave model on a separate, slower FSAB clock. The core side reads random word addresses
// over 8 KB, the cache size, so lines are filled, hit and evicted. Expected data come
// from the slave model's initial contents (64-bit word i = {~i, i}, lower half at the lower
// address). Checks: every word returned is right; a repeated address hits (no wait) and a
// cold one misses; two lines that share a set both stay resident (two ways); every miss is
// one 8-word FSAB read; credits are respected.
module tb_icache;
  import vs_pkg::*;
  `include "tb_common.svh"
  logic clk = 0, rst_b = 0, fsab_clk = 0, fsab_rst_b = 0;
  logic [31:0] ic__rd_addr_0a = '0, ic__rd_data_1a;
  logic ic__rd_req_0a = 0, ic__rd_wait_0a;
  fsabo_t ic__fsabo;
  logic ic__fsabo_credit;
  fsabi_t fsabi;
  int hits = 0, misses = 0, outstanding = 0, rem = 0;

  icache #(.WAYS(2), .SETS(64)) dut (.*);
  fsab_slave_model #(.MEM_WORDS(65536), .LATENCY(8)) u_mem (.clk(fsab_clk),
    .fsabo(fsab_rst_b ? ic__fsabo : fsabo_t'(0)), .fsabo_credit(ic__fsabo_credit), .fsabi(fsabi));
  always #4 clk = ~clk;
  always #7 fsab_clk = ~fsab_clk;
  `WATCHDOG(clk, 400000)

  always @(posedge fsab_clk) if (fsab_rst_b) begin
    if (ic__fsabo.valid) begin
      check(ic__fsabo.mode == FSAB_READ && ic__fsabo.len == 4'd8 && ic__fsabo.addr[5:0] == 0,
            "fills are aligned 8-word reads");
      outstanding++;
    end
    if (ic__fsabo_credit) outstanding--;
    check(outstanding <= 4, "credits respected");
  end

  function automatic logic [31:0] expect_word(input logic [31:0] a);
    logic [31:0] w;
    w = a >> 3;
    return a[2] ? ~w : w;
  endfunction

  // one core read; returns 1 if it hit at once
  task automatic rd(input logic [31:0] a, output bit hit);
    ic__rd_addr_0a = a; ic__rd_req_0a = 1;
    #1;
    hit = !ic__rd_wait_0a;
    while (ic__rd_wait_0a) begin @(negedge clk); #1; end
    @(negedge clk);
    ic__rd_req_0a = 0;
    check(ic__rd_data_1a == expect_word(a), $sformatf("word at %h: %h", a, ic__rd_data_1a));
    if (hit) hits++; else misses++;
  endtask

  initial begin
    bit h;
    repeat (3) @(negedge fsab_clk);
    rst_b = 1; fsab_rst_b = 1;
    @(negedge clk);
    rd(32'h100, h); check(!h, "cold read misses");
    rd(32'h104, h); check(h, "same line hits");
    rd(32'h13c, h); check(h, "last word of the line hits");
    // set conflict: 64 sets of 64 bytes -> 4 KB apart share a set
    rd(32'h1100, h); check(!h, "second line in the set misses");
    rd(32'h100, h);  check(h, "first way still resident");
    rd(32'h1100, h); check(h, "second way resident");
    for (int i = 0; i < 4000; i++) begin
      rd({19'h0, 11'($urandom), 2'b00} + 32'h2000, h);
      if ($urandom % 8 == 0) @(negedge clk);
    end
    check(u_mem.n_reads == misses, $sformatf("one FSAB read per miss (%0d/%0d)", u_mem.n_reads, misses));
    check(hits > 1000 && misses > 64, $sformatf("hits %0d misses %0d", hits, misses));
    tb_finish();
  end
endmodule
