// tb_spam_sysace: the SPAM-to-SystemACE bridge, with the SystemACE MPU port on its own slower
// clock and a register-file model of the SystemACE (128 16-bit registers). The model checks
// the bus discipline on every sysace_clk edge: the address is stable and chip enable low for
// the whole strobe; write and output enable are never low together; the data bus is driven
// only for writes. Checks: SPAM writes to device 3 store the low 16 bits in register
// addr[8:2]; SPAM reads return that register zero-extended; other devices are ignored.
module tb_spam_sysace;
  import vs_pkg::*;
  `include "tb_common.svh"
  logic cclk = 0, cclk_rst_b = 0, sysace_clk = 0, sysace_rst_b = 0;
  spamo_t spamo = '0;
  spami_t spami;
  logic [6:0] sysace_mpa;
  logic [15:0] sysace_mpd_i, sysace_mpd_o;
  logic sysace_mpd_oe, sysace_mpce_b, sysace_mpwe_b, sysace_mpoe_b;
  logic [15:0] regs [128];
  int nwr = 0, nrd = 0;
  spam_sysace dut (.*);
  always #5 cclk = ~cclk;
  always #17 sysace_clk = ~sysace_clk;
  `WATCHDOG(cclk, 200000)
  `include "tb_spam.svh"

  assign sysace_mpd_i = (!sysace_mpce_b && !sysace_mpoe_b) ? regs[sysace_mpa] : 16'hZZZZ;
  logic prev_we = 1;
  logic [6:0] strobe_a;
  always @(posedge sysace_clk) if (sysace_rst_b) begin
    check(!( !sysace_mpwe_b && !sysace_mpoe_b), "never both strobes");
    if (!sysace_mpwe_b || !sysace_mpoe_b) check(!sysace_mpce_b, "chip enabled during a strobe");
    if (!sysace_mpwe_b) check(sysace_mpd_oe, "data driven during a write strobe");
    if (!sysace_mpoe_b) check(!sysace_mpd_oe, "data not driven during a read");
    if (!sysace_mpwe_b && !prev_we) check(sysace_mpa == strobe_a, "address stable during the strobe");
    if (!sysace_mpwe_b && prev_we) strobe_a = sysace_mpa;
    // write takes effect at the end of the strobe
    if (sysace_mpwe_b && !prev_we) begin regs[strobe_a] = sysace_mpd_o; nwr++; end
    prev_we = sysace_mpwe_b;
  end

  initial begin
    logic [31:0] r;
    logic [15:0] ref_regs [128];
    for (int i = 0; i < 128; i++) begin regs[i] = 16'(i * 3); ref_regs[i] = 16'(i * 3); end
    repeat (3) @(negedge sysace_clk);
    cclk_rst_b = 1; sysace_rst_b = 1;
    for (int n = 0; n < 200; n++) begin
      int a;
      a = $urandom % 128;
      if ($urandom % 2) begin
        logic [31:0] d;
        d = $urandom;
        spam_wr(SPAM_DID_SYSACE, 24'(a * 4), d);
        ref_regs[a] = d[15:0];
      end else begin
        spam_rw(1, SPAM_DID_SYSACE, 24'(a * 4), 0, r);
        check(r == {16'h0, ref_regs[a]}, $sformatf("register %0d read %h", a, r));
        nrd++;
      end
    end
    spam_rw(0, 4'h4, 24'h0, 32'h1, r);
    check(spam_wait == 300, "other devices are not answered");
    for (int i = 0; i < 128; i++) check(regs[i] == ref_regs[i], "register file matches");
    tb_finish();
  end
endmodule
