// tb_ac97_conf: the codec register sequencer. The testbench pulses ac97_strobe every few
// clocks and records the command slots sampled at each strobe. Checks: both slots are always
// valid; slot 1 is a write command (bit 19 = 0) to the seven registers 02, 0E, 10, 12, 18, 1A,
// 1C in turn; slot 2 holds the register value in bits 19:4 (reset values first); a value
// written through wr_en/wr_idx is sent from the next visit of that register on.
module tb_ac97_conf;
  `include "tb_common.svh"
  logic ac97_bitclk = 0, rst_b = 0, ac97_strobe = 0, wr_en = 0;
  logic [2:0] wr_idx = 0;
  logic [15:0] wr_data = 0;
  logic [19:0] out_slot1, out_slot2;
  logic out_slot1_valid, out_slot2_valid;
  ac97_conf dut (.*);
  always #40 ac97_bitclk = ~ac97_bitclk;
  `WATCHDOG(ac97_bitclk, 100000)
  logic [6:0]  addrs [7] = '{7'h02, 7'h0E, 7'h10, 7'h12, 7'h18, 7'h1A, 7'h1C};
  logic [15:0] vals  [7] = '{16'h0000, 16'h8008, 16'h0808, 16'h0808, 16'h0808, 16'h0000, 16'h0000};

  initial begin
    int pos = 0;
    repeat (3) @(negedge ac97_bitclk);
    rst_b = 1;
    for (int s = 0; s < 300; s++) begin
      repeat (1 + $urandom % 5) @(negedge ac97_bitclk);
      check(out_slot1_valid && out_slot2_valid, "slots valid");
      check(out_slot1 == {1'b0, addrs[pos], 12'h0}, $sformatf("command address at step %0d", s));
      check(out_slot2 == {vals[pos], 4'h0}, $sformatf("command data at step %0d", s));
      ac97_strobe = 1;
      @(negedge ac97_bitclk);
      ac97_strobe = 0;
      pos = (pos + 1) % 7;
      if ($urandom % 3 == 0) begin
        int i;
        i = $urandom % 7;
        wr_en = 1; wr_idx = 3'(i); wr_data = 16'($urandom);
        vals[i] = wr_data;
        @(negedge ac97_bitclk);
        wr_en = 0;
      end
    end
    tb_finish();
  end
endmodule
