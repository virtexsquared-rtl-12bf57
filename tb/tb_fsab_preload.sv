// tb_fsab_preload: the boot-ROM preloader writing into the FSAB slave model. A small ROM
// (64 words, built-in pattern word i = {i ^ 32'hA5A5_5A5A, i}) keeps the run short. Checks:
// every ROM word lands at byte address 8*i, the preloader never has more than CREDITS
// transactions outstanding, every transaction is an 8-word write, and core_rst_b stays low
// until the last word has been sent and then stays high.
module tb_fsab_preload;
  import vs_pkg::*;
  `include "tb_common.svh"
  localparam int WORDS = 64;
  logic clk = 0, rst_b = 0;
  fsabo_t fsabo;
  logic fsabo_credit, core_rst_b;
  fsabi_t fsabi;
  int outstanding = 0, max_out = 0, words_seen = 0, rem = 0;

  fsab_preload #(.ROM_WORDS(WORDS), .CREDITS(4)) dut (.*);
  fsab_slave_model #(.MEM_WORDS(1024), .LATENCY(6)) u_mem (.clk(clk), .fsabo(rst_b ? fsabo : fsabo_t'(0)),
    .fsabo_credit(fsabo_credit), .fsabi(fsabi));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  always @(posedge clk) if (rst_b) begin
    if (fsabo.valid) begin
      if (rem == 0) begin
        outstanding++;
        check(fsabo.mode == FSAB_WRITE && fsabo.len == 4'd8, "8-word write transactions");
        check(fsabo.did == DID_PRE, "preloader did");
        rem = int'(fsabo.len);
      end
      rem--;
      words_seen++;
      check(!core_rst_b, "core held in reset while loading");
    end
    if (fsabo_credit) outstanding--;
    if (outstanding > max_out) max_out = outstanding;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_b = 1;
    wait (core_rst_b);
    check(words_seen == WORDS, $sformatf("all words sent before core reset is released (%0d)", words_seen));
    repeat (100) @(negedge clk);
    check(core_rst_b, "core reset stays released");
    check(max_out <= 4 && max_out >= 1, $sformatf("outstanding transactions within credits (%0d)", max_out));
    for (int i = 0; i < WORDS; i++)
      check(u_mem.mem[i] == {32'(i) ^ 32'hA5A5_5A5A, 32'(i)}, $sformatf("ROM word %0d in memory: %h", i, u_mem.mem[i]));
    check(u_mem.mem[WORDS] == {~32'(WORDS), 32'(WORDS)}, "nothing written past the ROM");
    tb_finish();
  end
endmodule
