// tb_csr_async_write: core clock 10 ns, target clock 13 ns. Checks the reset value, that each
// write appears on wr_data_tclk with one wr_strobe_tclk carrying the new value, one
// wr_done_strobe_cclk per write, wr_wait_cclk in between, and that a strobe during a
// pending write is ignored.
module tb_csr_async_write;
  `include "tb_common.svh"
  logic cclk = 0, tclk = 0, rst_b_cclk = 0, rst_b_tclk = 0, wr_strobe_cclk = 0;
  logic [15:0] wr_data_cclk = 0, wr_data_tclk, last_strobed;
  logic wr_wait_cclk, wr_done_strobe_cclk, wr_strobe_tclk;
  int tstrobes = 0;
  csr_async_write #(.WIDTH(16), .RESET_VALUE(16'hBEEF)) dut (.*);
  always #5 cclk = ~cclk;
  always #6.5 tclk = ~tclk;
  always @(posedge tclk) if (wr_strobe_tclk && rst_b_tclk) begin tstrobes++; last_strobed = wr_data_tclk; end
  `WATCHDOG(cclk, 20000)
  initial begin
    repeat (3) @(negedge cclk);
    rst_b_cclk = 1; rst_b_tclk = 1;
    check(wr_data_tclk == 16'hBEEF, "reset value");
    for (int i = 0; i < 40; i++) begin
      logic [15:0] v;
      int cyc;
      v = 16'($urandom);
      wr_data_cclk = v; wr_strobe_cclk = 1;
      @(negedge cclk);
      wr_strobe_cclk = 0;
      if (i % 5 == 0) begin wr_data_cclk = ~v; wr_strobe_cclk = 1; @(negedge cclk); wr_strobe_cclk = 0; end
      cyc = 0;
      while (!wr_done_strobe_cclk) begin
        check(wr_wait_cclk, "wait high while outstanding");
        @(negedge cclk); cyc++;
      end
      check(wr_data_tclk == v, $sformatf("target value %h expected %h", wr_data_tclk, v));
      check(last_strobed == v, "strobe carries the new value");
      check(tstrobes == i + 1, "one target strobe per write");
      check(cyc < 20, "latency bounded");
      @(negedge cclk);
      check(!wr_done_strobe_cclk && !wr_wait_cclk, "single done strobe");
    end
    tb_finish();
  end
endmodule
