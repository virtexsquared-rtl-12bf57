// tb_csr_async_read: core clock 10 ns, target clock 16 ns. A counter on the target clock is
// read repeatedly; each read must return a value the counter had between the request and the
// done strobe, with exactly one done strobe and one target strobe per read, rd_wait high in
// between, and rd_data zero outside the done cycle.
module tb_csr_async_read;
  `include "tb_common.svh"
  logic cclk = 0, tclk = 0, rst_b_cclk = 0, rst_b_tclk = 0, rd_strobe_cclk = 0;
  logic [31:0] rd_data_cclk, rd_data_tclk = 0;
  logic rd_wait_cclk, rd_done_strobe_cclk, rd_strobe_tclk;
  int tstrobes = 0;
  csr_async_read #(.WIDTH(32)) dut (.*);
  always #5 cclk = ~cclk;
  always #8 tclk = ~tclk;
  always @(posedge tclk) begin
    rd_data_tclk <= rd_data_tclk + 1;
    if (rd_strobe_tclk && rst_b_tclk) tstrobes++;
  end
  `WATCHDOG(cclk, 20000)
  initial begin
    repeat (3) @(negedge cclk);
    rst_b_cclk = 1; rst_b_tclk = 1;
    repeat (3) @(negedge cclk);
    for (int i = 0; i < 50; i++) begin
      logic [31:0] lo;
      int cyc;
      lo = rd_data_tclk;
      rd_strobe_cclk = 1;
      @(negedge cclk);
      rd_strobe_cclk = 0;
      cyc = 1;
      while (!rd_done_strobe_cclk) begin
        check(rd_wait_cclk, "wait high while outstanding");
        check(rd_data_cclk == 0, "data zero before done");
        @(negedge cclk);
        cyc++;
      end
      check(rd_data_cclk >= lo && rd_data_cclk <= rd_data_tclk, $sformatf("read value %0d in [%0d,%0d]", rd_data_cclk, lo, rd_data_tclk));
      check(cyc >= 4 && cyc < 20, $sformatf("latency %0d cycles", cyc));
      @(negedge cclk);
      check(!rd_done_strobe_cclk && !rd_wait_cclk && rd_data_cclk == 0, "single done strobe");
      repeat ($urandom % 4) @(negedge cclk);
    end
    check(tstrobes == 50, $sformatf("one target strobe per read (%0d)", tstrobes));
    tb_finish();
  end
endmodule
