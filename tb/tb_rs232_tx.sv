// tb_rs232_tx: the 8N1 serial transmitter with 8 clocks per bit. A receiver in the testbench
// samples txd in the middle of each bit. Checks: every byte is framed by a start bit (0) and a
// stop bit (1) and its bits arrive LSB first; busy is high from the accepted write to the end
// of the stop bit; writes while busy are ignored; the line idles high.
module tb_rs232_tx;
  `include "tb_common.svh"
  localparam int CPB = 8;
  logic clk = 0, rst_b = 0, wr_en = 0, busy, txd;
  logic [7:0] wr_data = 0;
  logic [7:0] sent [$];
  int rx = 0;
  rs232_tx #(.CLKS_PER_BIT(CPB)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(clk, 200000)

  // receiver
  initial begin
    wait (rst_b);
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      check(!txd, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      check(txd, "stop bit");
      check(sent.size() > 0, "byte expected");
      if (sent.size() > 0) check(b == sent.pop_front(), $sformatf("byte %0d received", rx));
      rx++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    check(txd, "idle high");
    rst_b = 1;
    for (int i = 0; i < 100; i++) begin
      int t;
      while (busy) @(negedge clk);
      wr_data = 8'($urandom); wr_en = 1;
      sent.push_back(wr_data);
      @(negedge clk);
      wr_en = 0;
      check(busy, "busy after a write");
      t = 1;
      // a write while busy is ignored
      wr_data = 8'hAA; wr_en = ($urandom % 2);
      @(negedge clk); wr_en = 0; t++;
      while (busy) begin @(negedge clk); t++; end
      check(t >= 10 * CPB - 1 && t <= 10 * CPB + 1, $sformatf("busy for one frame (%0d)", t));
      repeat ($urandom % 20) @(negedge clk);
    end
    repeat (20 * CPB) @(negedge clk);
    check(rx == 100 && sent.size() == 0, "all bytes received, no extra ones");
    tb_finish();
  end
endmodule
