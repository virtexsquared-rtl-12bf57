// tb_simple_dma_read: the DMA engine with three unrelated clocks (core, FSAB, peripheral), the
// FSAB slave model as memory and SPAM register accesses from the testbench. Memory word i is
// {~i, i}, so the expected stream is known from the address alone. Checks: a TRIGGER_ONCE
// transfer delivers exactly len/8 words in order and then nothing more; the byte counters
// and current-start register read back the right values; AUTOTRIGGER restarts the same range
// again and again; STOP ends it; reads of the FIFO are made at random times, so the FIFO
// also fills up and the engine must wait for room (counted); credits are respected.
module tb_simple_dma_read;
  import vs_pkg::*;
  `include "tb_common.svh"
  logic cclk = 0, cclk_rst_b = 0, fsabi_clk = 0, fsabi_rst_b = 0, target_clk = 0, target_rst_b = 0;
  spamo_t spamo = '0;
  spami_t spami;
  fsabo_t fsabo;
  logic fsabo_credit, request = 0, data_ready, fifo_empty;
  fsabi_t fsabi;
  logic [63:0] data;
  int outstanding = 0, got = 0, full_waits = 0;
  logic [63:0] expq [$];
  bit popping = 0, cyc = 0;

  simple_dma_read #(.FIFO_DEPTH(32), .FSAB_DID(4'h2), .FSAB_SUBDID(4'h0), .SPAM_DID(4'h2)) dut (.*);
  fsab_slave_model #(.MEM_WORDS(8192), .LATENCY(8)) u_mem (.clk(fsabi_clk),
    .fsabo(fsabi_rst_b ? fsabo : fsabo_t'(0)), .fsabo_credit(fsabo_credit), .fsabi(fsabi));
  always #5 cclk = ~cclk;
  always #4 fsabi_clk = ~fsabi_clk;
  always #6 target_clk = ~target_clk;
  `WATCHDOG(cclk, 300000)
  `include "tb_spam.svh"

  always @(posedge fsabi_clk) if (fsabi_rst_b) begin
    if (fsabo.valid) begin
      outstanding++;
      check(fsabo.mode == FSAB_READ && fsabo.did == 4'h2, "DMA issues reads with its did");
    end
    if (fsabo_credit) outstanding--;
    check(outstanding <= 4, "credits respected");
  end

  // peripheral: pops at random while popping is set; data appear one clock after request
  initial begin
    forever begin
      @(negedge target_clk);
      request = 0;
      if (popping && data_ready && ($urandom % 4 != 0)) begin
        request = 1;
        @(negedge target_clk);
        request = 0;
        if (cyc) begin
          // after STOP: the rest of an AUTOTRIGGER round, continuing the 16-word range
          int i;
          i = 32'h800 + (got - 64) % 16;
          check(data == {~32'(i), 32'(i)}, $sformatf("leftover word %0d", got));
        end else begin
        check(expq.size() > 0, "word expected");
        if (expq.size() > 0) begin
          logic [63:0] e;
          e = expq.pop_front();
          check(data == e, $sformatf("stream word %0d: %h expected %h", got, data, e));
        end
        end
        got++;
      end
      check(fifo_empty == !data_ready, "fifo_empty is the complement of data_ready");
    end
  end

  task automatic expect_range(input int addr, input int len);
    for (int i = 0; i < len / 8; i++) expq.push_back({~32'(addr / 8 + i), 32'(addr / 8 + i)});
  endtask

  initial begin
    logic [31:0] r;
    repeat (3) @(negedge cclk);
    cclk_rst_b = 1; fsabi_rst_b = 1; target_rst_b = 1;
    // one transfer, peripheral not reading at first so the FIFO fills
    spam_wr(4'h2, 24'h00, 32'h1000);
    spam_wr(4'h2, 24'h04, 32'd512);
    expect_range(32'h1000, 512);
    spam_wr(4'h2, 24'h08, 32'(DMA_TRIGGER_ONCE));
    repeat (200) @(negedge fsabi_clk);
    check(u_mem.n_reads < 512 / 64, "engine waits while the FIFO is full");
    if (u_mem.n_reads < 512 / 64) full_waits++;
    popping = 1;
    wait (expq.size() == 0);
    repeat (200) @(negedge cclk);
    check(got == 64, $sformatf("exactly 64 words delivered (%0d)", got));
    check(!data_ready, "nothing more after the transfer");
    spam_rw(1, 4'h2, 24'h0c, 0, r); check(r == 512, $sformatf("FIFO byte count %0d", r));
    spam_rw(1, 4'h2, 24'h10, 0, r); check(r == 512, $sformatf("total byte count %0d", r));
    spam_rw(1, 4'h2, 24'h14, 0, r); check(r == 32'h1000, $sformatf("current start %h", r));
    spam_rw(1, 4'h2, 24'h00, 0, r); check(spam_wait < 300, "read of a write-only register is answered");
    // autotrigger: 3 rounds of a 128-byte range
    spam_wr(4'h2, 24'h00, 32'h4000);
    spam_wr(4'h2, 24'h04, 32'd128);
    for (int k = 0; k < 3; k++) expect_range(32'h4000, 128);
    spam_wr(4'h2, 24'h08, 32'(DMA_AUTOTRIGGER));
    wait (expq.size() == 0);
    popping = 0;
    spam_wr(4'h2, 24'h08, 32'(DMA_STOP));
    repeat (300) @(negedge cclk);
    // whatever the engine fetched before STOP took effect continues the same range
    cyc = 1;
    popping = 1;
    repeat (300) @(negedge cclk);
    check(!data_ready, "STOP ends the stream");
    check(full_waits == 1, "FIFO-full wait happened");
    tb_finish();
  end
endmodule
