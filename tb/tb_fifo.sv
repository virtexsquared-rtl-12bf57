// tb_fifo: random pushes and pops against a queue model; checks data order, empty, full,
// available, afull and aempty every cycle, and the one-cycle read latency.
module tb_fifo;
  `include "tb_common.svh"
  localparam int DEPTH = 8, ALMOST = 2;
  logic clk = 0, rst_b = 0, wr_en = 0, rd_en = 0;
  logic [15:0] wr_dat, rd_dat;
  logic empty, full, afull, aempty;
  logic [3:0] available;
  logic [15:0] q [$];
  logic [15:0] expect_d;
  bit expect_v;
  fifo #(.DEPTH(DEPTH), .WIDTH(16), .ALMOST(ALMOST)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(clk, 5000)
  initial begin
    repeat (2) @(negedge clk);
    rst_b = 1;
    expect_v = 0;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      if (expect_v) check(rd_dat == expect_d, $sformatf("read data %h expected %h", rd_dat, expect_d));
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      check(available == 4'(q.size()), "available count");
      check(afull == (DEPTH - q.size() <= ALMOST), "afull flag");
      check(aempty == (q.size() <= ALMOST), "aempty flag");
      wr_en = ($urandom % 100) < (i < 700 ? 60 : 40);
      rd_en = ($urandom % 100) < (i < 700 ? 40 : 60);
      wr_dat = 16'($urandom);
      begin
        bit was_full;
        was_full = (q.size() == DEPTH);
        expect_v = rd_en && q.size() > 0;
        if (expect_v) expect_d = q.pop_front();
        if (wr_en && !was_full) q.push_back(wr_dat);
      end
    end
    tb_finish();
  end
endmodule
