// tb_dcache: the data cache with the FSAB slave model (separate FSAB clock) and a SPAM device
// model. Memory side: random reads and 32-bit writes over 8 KB against a reference copy of
// memory; checks every read word, that writes reach memory (write-through, 4-byte mask), that
// a repeated read hits without waiting and that credits are respected. SPAM side: accesses
// with bit 31 set must appear on the SPAM bus for one cycle with did = bits 27:24 and the
// low 24 address bits; the device model answers after a random delay (reads return a value
// computed from the address), and an access to a did nobody answers must complete after the
// timeout with 0xDEADDEAD on a read.
module tb_dcache;
  import vs_pkg::*;
  `include "tb_common.svh"
  logic clk = 0, rst_b = 0, fsab_clk = 0, fsab_rst_b = 0;
  logic [31:0] dc__addr_3a = '0, dc__wr_data_3a = '0, dc__rd_data_4a;
  logic dc__rd_req_3a = 0, dc__wr_req_3a = 0, dc__rw_wait_3a;
  spamo_t spamo;
  spami_t spami = '0;
  fsabo_t dc__fsabo;
  logic dc__fsabo_credit;
  fsabi_t fsabi;
  logic [31:0] ref_mem [4096];     // 32-bit words of the first 16 KB
  int outstanding = 0, rem = 0, hits = 0, spam_reqs = 0, timeouts = 0;
  spamo_t last_spam;

  dcache #(.SETS(64), .TIMEOUT(256)) dut (.*);
  fsab_slave_model #(.MEM_WORDS(8192), .LATENCY(8)) u_mem (.clk(fsab_clk),
    .fsabo(fsab_rst_b ? dc__fsabo : fsabo_t'(0)), .fsabo_credit(dc__fsabo_credit), .fsabi(fsabi));
  always #4 clk = ~clk;
  always #9 fsab_clk = ~fsab_clk;
  `WATCHDOG(clk, 400000)

  always @(posedge fsab_clk) if (fsab_rst_b) begin
    if (dc__fsabo.valid) begin
      if (rem == 0) begin
        outstanding++;
        rem = (dc__fsabo.mode == FSAB_WRITE) ? int'(dc__fsabo.len) : 1;
      end
      rem--;
    end
    if (dc__fsabo_credit) outstanding--;
    check(outstanding <= 4, "credits respected");
  end

  // SPAM device on did 3: answers after 0..30 cycles
  initial begin
    forever begin
      @(posedge clk);
      if (rst_b && spamo.valid) begin
        spamo_t r;
        r = spamo;
        last_spam = r;
        spam_reqs++;
        @(negedge clk);
        check(!spamo.valid, "SPAM request valid for one cycle");
        if (r.did == 4'd3) begin
          repeat ($urandom % 30) @(negedge clk);
          spami = '{busy_b: 1'b1, data: r.r_nw ? ({8'h0, r.addr} ^ 32'h1234_5678) : 32'h0};
          @(negedge clk);
          spami = '0;
        end
      end
    end
  end

  task automatic access(input bit wr, input logic [31:0] a, input logic [31:0] wd,
                        output logic [31:0] rd, output bit hit, output int waited);
    dc__addr_3a = a; dc__wr_data_3a = wd; dc__rd_req_3a = !wr; dc__wr_req_3a = wr;
    #1;
    hit = !dc__rw_wait_3a;
    waited = 0;
    while (dc__rw_wait_3a) begin @(negedge clk); #1; waited++; end
    @(negedge clk);
    dc__rd_req_3a = 0; dc__wr_req_3a = 0;
    rd = dc__rd_data_4a;
  endtask

  initial begin
    logic [31:0] d;
    bit h;
    int wt;
    for (int i = 0; i < 4096; i++) ref_mem[i] = i[0] ? ~32'(i / 2) : 32'(i / 2);
    repeat (3) @(negedge fsab_clk);
    rst_b = 1; fsab_rst_b = 1;
    @(negedge clk);
    access(0, 32'h40, 0, d, h, wt); check(!h && d == ref_mem['h10], "cold read");
    access(0, 32'h44, 0, d, h, wt); check(h && d == ref_mem['h11], "hit in the filled line");
    hits++;
    for (int i = 0; i < 3000; i++) begin
      int w;
      w = $urandom % 2048;
      if ($urandom % 3 == 0) begin
        logic [31:0] v;
        v = $urandom;
        access(1, 32'(w * 4), v, d, h, wt);
        ref_mem[w] = v;
      end else begin
        access(0, 32'(w * 4), 0, d, h, wt);
        check(d == ref_mem[w], $sformatf("read word %0d: %h expected %h", w, d, ref_mem[w]));
        if (h) hits++;
        if (h) begin
          access(0, 32'(w * 4), 0, d, h, wt);
          check(h, "repeated read hits");
        end
      end
    end
    repeat (100) @(negedge fsab_clk);
    for (int w = 0; w < 2048; w++)
      if (u_mem.mem[w / 2][(w % 2) * 32 +: 32] != ref_mem[w]) check(0, $sformatf("memory word %0d", w));
    check(1, "memory contents compared");
    check(hits > 100, $sformatf("cache hits seen (%0d)", hits));
    // SPAM accesses
    for (int i = 0; i < 40; i++) begin
      logic [23:0] sa;
      bit wr;
      sa = 24'($urandom) & 24'hFFFFFC;
      wr = $urandom % 2;
      access(wr, {4'h8, 4'h3, sa}, 32'(i), d, h, wt);
      check(last_spam.did == 4'd3 && last_spam.addr == sa && last_spam.r_nw == !wr &&
            (!wr || last_spam.data == 32'(i)), "SPAM request fields");
      if (!wr) check(d == ({8'h0, sa} ^ 32'h1234_5678), "SPAM read data");
    end
    access(0, 32'h8500_0010, 0, d, h, wt);
    check(d == 32'hDEADDEAD, $sformatf("timeout read returns DEADDEAD (%h)", d));
    check(wt >= 256 && wt < 300, $sformatf("timeout after 256 cycles (%0d)", wt));
    access(1, 32'h8500_0010, 32'h1, d, h, wt);
    check(wt >= 256 && wt < 300, "write to an absent device also times out");
    check(spam_reqs == 42, $sformatf("SPAM requests %0d", spam_reqs));
    tb_finish();
  end
endmodule
