// tb_async_fifo: writer on a 10 ns clock, reader on a 14 ns clock, random enables; checks that
// every word comes out once and in order, that nothing is lost and that empty/full are only
// ever pessimistic (never claim data or room that is not there).
module tb_async_fifo;
  `include "tb_common.svh"
  localparam int DEPTH = 8;
  logic iclk = 0, oclk = 0, iclk_rst_b = 0, oclk_rst_b = 0, wr_en = 0, rd_en = 0;
  logic [15:0] wr_dat, rd_dat;
  logic empty, full;
  logic [15:0] q [$];
  int nin = 0, nout = 0, saw_full = 0;
  bit pend = 0;
  async_fifo #(.DEPTH(DEPTH), .WIDTH(16)) dut (.*);
  always #5 iclk = ~iclk;
  always #7 oclk = ~oclk;
  `WATCHDOG(iclk, 20000)
  // writer
  initial begin
    repeat (3) @(negedge iclk);
    iclk_rst_b = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge iclk);
      wr_en = ($urandom % 100) < 55;
      wr_dat = 16'($urandom);
      if (wr_en && !full) begin q.push_back(wr_dat); nin++; end   // full is stable until the edge
    end
    wr_en = 0;
  end
  always @(posedge iclk) begin
    if (full) saw_full++;
    check(q.size() <= DEPTH, "never more than DEPTH words accepted");
  end
  // reader
  initial begin
    repeat (3) @(negedge oclk);
    oclk_rst_b = 1;
    forever begin
      @(negedge oclk);
      if (pend) begin
        check(q.size() > 0 && rd_dat == q[0], $sformatf("read %h expected %h", rd_dat, q.size() ? q[0] : 16'hx));
        if (q.size()) void'(q.pop_front());
        nout++;
      end
      rd_en = ($urandom % 100) < 45;
      pend = rd_en && !empty;
      if (!empty) check(q.size() > 0, "empty low only when data present");
    end
  end
  initial begin
    #44000;
    check(nout == nin && nin > 500, $sformatf("all words out: in %0d out %0d", nin, nout));
    check(saw_full > 0, "full was reached");
    tb_finish();
  end
endmodule
