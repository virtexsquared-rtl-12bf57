// tb_system: end-to-end test of the whole system at full size (640x480 display, 16 KB boot
// ROM, default parameters everywhere), with the MIG behavioural model as DDR2 memory (2 MB,
// word i = {~i, i} before anything is written) and simple models of the keyboard, serial
// terminal, codec and SystemACE. The testbench plays the CPU: it waits for core_rst_b and then
// drives the caches' core ports the way the pipeline would.
// Each mechanism is made to happen, counted, and checked; a mechanism that never happens counts
// as a failure:
//   preload   core_rst_b rises only after the ROM image is in memory
//   icache    a miss (fill over FSAB) and then hits, returning boot ROM words
//   dcache    write-through to memory, read miss and read hit
//   spam      timer reads that advance, console character on txd, PS/2 scancode read,
//             SystemACE register write and read, a timeout on an absent device (0xDEADDEAD)
//   video     framebuffer pixels of the second frame with correct colours (the first frame
//             competes with the preloader and runs dry; the words it missed are popped in
//             vertical blanking, counted), hsync pulses
//   audio     programmed samples arrive in the codec's slots 3/4
//   clear     fill accelerator writes a region, polled to completion
//   blit      copy accelerator copies a region, polled to completion
//   arbiter   two or more masters waiting at once (priority decision), a master out of
//             credits, the arbiter out of slave credits
//   memory    MIG write and read bursts
module tb_system;
  import vs_pkg::*;
  `include "tb_common.svh"
  localparam int MEMW = 262144;
  logic cclk = 0, cclk_rst_b = 0, fsabi_clk = 0, fsabi_rst_b = 0, fbclk = 0, fbclk_rst_b = 0;
  logic ac97_bitclk = 0, ac97_rst_b = 0, sysace_clk = 0, sysace_rst_b = 0;
  logic core_rst_b;
  logic [31:0] ic__rd_addr_0a = 0, ic__rd_data_1a, dc__addr_3a = 0, dc__wr_data_3a = 0, dc__rd_data_4a;
  logic ic__rd_req_0a = 0, ic__rd_wait_0a, dc__rd_req_3a = 0, dc__wr_req_3a = 0, dc__rw_wait_3a;
  logic [30:0] mig_af_addr; logic [2:0] mig_af_cmd; logic mig_af_wren, mig_af_afull;
  logic [127:0] mig_wdf_data; logic [15:0] mig_wdf_mask_data; logic mig_wdf_wren, mig_wdf_afull;
  logic mig_rd_data_valid; logic [127:0] mig_rd_data;
  logic [7:0] dvi_r, dvi_g, dvi_b; logic dvi_hs, dvi_vs, dvi_de;
  logic ac97_sync, ac97_sdata_out, ac97_sdata_in = 0, ac97_reset_b;
  logic ps2clk = 1, ps2data = 1, txd;
  logic [6:0] sysace_mpa; logic [15:0] sysace_mpd_i, sysace_mpd_o;
  logic sysace_mpd_oe, sysace_mpce_b, sysace_mpwe_b, sysace_mpoe_b;

  system dut (.*);
  mig_model #(.MEM_WORDS(MEMW), .LATENCY(10)) u_mig (.clk(fsabi_clk), .af_addr(mig_af_addr),
    .af_cmd(mig_af_cmd), .af_wren(fsabi_rst_b && mig_af_wren), .af_afull(mig_af_afull),
    .wdf_data(mig_wdf_data), .wdf_mask_data(mig_wdf_mask_data), .wdf_wren(fsabi_rst_b && mig_wdf_wren),
    .wdf_afull(mig_wdf_afull), .rd_data_valid(mig_rd_data_valid), .rd_data(mig_rd_data));

  always #5 cclk = ~cclk;             // 100 MHz core
  always #4 fsabi_clk = ~fsabi_clk;   // 125 MHz memory/FSAB
  always #20 fbclk = ~fbclk;          // 25 MHz pixels
  always #41 ac97_bitclk = ~ac97_bitclk;
  always #15 sysace_clk = ~sysace_clk;
  `WATCHDOG(cclk, 2000000)

  // ---------------- mechanism counters ----------------
  int n_preload = 0, n_ic_miss = 0, n_ic_hit = 0, n_dc_wt = 0, n_dc_miss = 0, n_dc_hit = 0;
  int n_timer = 0, n_console = 0, n_ps2 = 0, n_ace = 0, n_timeout = 0, n_pixels = 0, n_hsync = 0;
  int n_audio = 0, n_clear = 0, n_blit = 0, n_conflict = 0, n_master_stall = 0, n_slave_stall = 0;

  always @(posedge fsabi_clk) if (fsabi_rst_b) begin
    if (!$onehot0(dut.u_arb.avail)) n_conflict++;
    if (dut.u_arb.found && dut.u_arb.credits == 0 && !dut.u_arb.busy) n_slave_stall++;
    if (dut.u_fb.u_dma.credits == 0) n_master_stall++;
  end

  // ---------------- video: pixel p of frame 0 is 32-bit word p of memory ----------------
  // Frame 0 competes with the preloader for the bus and may run dry; frame 1 must be exact.
  int pix = 0, frame = 0, n_catchup = 0;
  logic prev_hs = 1, prev_vs = 1;
  always @(posedge fbclk) if (fbclk_rst_b) begin
    if (!dvi_hs && prev_hs) n_hsync++;
    if (!dvi_vs && prev_vs) begin frame++; pix = 0; end
    prev_hs = dvi_hs;
    prev_vs = dvi_vs;
    if (dut.u_fb.catchup && dut.u_fb.data_ready) n_catchup++;
    if (dvi_de) begin
      if (frame == 1 && pix < 20000) begin
        logic [31:0] e;
        e = !pix[0] ? 32'(pix / 2) : (pix / 2 < 2048) ? 32'(pix / 2) ^ 32'hA5A5_5A5A : ~32'(pix / 2);
        check({dvi_b, dvi_g, dvi_r} == e[23:0], $sformatf("pixel %0d: %h expected %h", pix, {dvi_b, dvi_g, dvi_r}, e[23:0]));
        n_pixels++;
      end
      pix++;
    end
  end

  // ---------------- serial terminal (868 clocks per bit) ----------------
  logic [7:0] rx_byte;
  initial begin
    forever begin
      @(negedge txd);
      if (cclk_rst_b) begin
        repeat (434) @(posedge cclk);
        for (int i = 0; i < 8; i++) begin repeat (868) @(posedge cclk); rx_byte[i] = txd; end
        repeat (868) @(posedge cclk);
        if (txd && rx_byte == 8'h56) n_console++;
      end
    end
  end

  // ---------------- SystemACE register model ----------------
  logic [15:0] ace_regs [128];
  initial for (int i = 0; i < 128; i++) ace_regs[i] = 16'(i + 16'h100);
  assign sysace_mpd_i = (!sysace_mpce_b && !sysace_mpoe_b) ? ace_regs[sysace_mpa] : 16'h0;
  logic ace_prev_we = 1;
  logic [6:0] ace_a;
  always @(posedge sysace_clk) begin
    if (!sysace_mpwe_b) ace_a = sysace_mpa;
    if (sysace_mpwe_b && !ace_prev_we) ace_regs[ace_a] = sysace_mpd_o;
    ace_prev_we = sysace_mpwe_b;
  end

  // ---------------- codec: count valid PCM slots with the expected samples ----------------
  initial begin
    logic prev_sync = 0;
    int idx = -1, s = 0;
    logic [255:0] got;
    logic [31:0] e;
    forever begin
      @(negedge ac97_bitclk);
      if (ac97_sync && !prev_sync) begin
        if (idx == 255 && got[252:251] == 2'b11) begin
          e = s[0] ? ~32'(32'h1A0000 / 8 + s / 2) : 32'(32'h1A0000 / 8 + s / 2);
          check(got[199:180] == {e[15:0], 4'h0} && got[179:160] == {e[31:16], 4'h0}, "audio sample");
          s++;
          n_audio++;
        end
        idx = 0;
      end else if (idx >= 0) idx++;
      prev_sync = ac97_sync;
      if (idx >= 0 && idx < 256) got[255 - idx] = ac97_sdata_out;
    end
  end

  // ---------------- CPU-side tasks ----------------
  task automatic ic_rd(input logic [31:0] a, output logic [31:0] d);
    ic__rd_addr_0a = a; ic__rd_req_0a = 1;
    #1;
    if (ic__rd_wait_0a) n_ic_miss++; else n_ic_hit++;
    while (ic__rd_wait_0a) begin @(negedge cclk); #1; end
    @(negedge cclk);
    ic__rd_req_0a = 0;
    d = ic__rd_data_1a;
  endtask

  task automatic dc(input bit wr, input logic [31:0] a, input logic [31:0] wd,
                    output logic [31:0] d, output int waited);
    dc__addr_3a = a; dc__wr_data_3a = wd; dc__rd_req_3a = !wr; dc__wr_req_3a = wr;
    #1;
    waited = 0;
    while (dc__rw_wait_3a) begin @(negedge cclk); #1; waited++; end
    @(negedge cclk);
    dc__rd_req_3a = 0; dc__wr_req_3a = 0;
    d = dc__rd_data_4a;
  endtask

  task automatic spam_w(input logic [3:0] did, input logic [23:0] a, input logic [31:0] v);
    logic [31:0] d;
    int w;
    dc(1, {4'h8, did, a}, v, d, w);
  endtask
  task automatic spam_r(input logic [3:0] did, input logic [23:0] a, output logic [31:0] d);
    int w;
    dc(0, {4'h8, did, a}, 0, d, w);
  endtask

  task automatic ps2_send(input logic [7:0] code);
    logic [10:0] f;
    f = {1'b1, ~^code, code, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2data = f[i];
      #5000 ps2clk = 0;
      #10000 ps2clk = 1;
      #5000;
    end
  endtask

  function automatic logic [63:0] mem_init(input int i);
    return {~32'(i), 32'(i)};
  endfunction

  initial begin
    logic [31:0] d, t0, t1;
    int w;
    bit ok;
    repeat (3) @(negedge ac97_bitclk);
    cclk_rst_b = 1; fsabi_rst_b = 1; fbclk_rst_b = 1; ac97_rst_b = 1; sysace_rst_b = 1;

    // preload
    check(!core_rst_b, "core held in reset during preload");
    wait (core_rst_b);
    ok = 1;
    for (int i = 0; i < 2048; i++) if (u_mig.mem[i] != {32'(i) ^ 32'hA5A5_5A5A, 32'(i)}) ok = 0;
    check(ok, "boot image in memory when the core is released");
    if (ok) n_preload++;

    // instruction fetch: boot ROM word 2 is at 0x10
    ic_rd(32'h10, d); check(d == 32'h2, "icache miss returns ROM word");
    ic_rd(32'h14, d); check(d == (32'h2 ^ 32'hA5A5_5A5A), "icache hit returns ROM word");
    ic_rd(32'h18, d); check(d == 32'h3, "icache hit");

    // data cache: read miss, hit, write-through
    dc(0, 32'h1F0000, 0, d, w); n_dc_miss += (w > 0);
    check(d == 32'h1F0000 / 8, "dcache read miss");
    dc(0, 32'h1F0004, 0, d, w); n_dc_hit += (w == 0);
    check(d == ~32'(32'h1F0000 / 8), "dcache read hit");
    dc(1, 32'h1F0008, 32'hC0FFEE00, d, w);
    dc(0, 32'h1F0008, 0, d, w);
    check(d == 32'hC0FFEE00, "dcache read after write");
    repeat (100) @(negedge cclk);
    if (u_mig.mem[32'h1F0008 / 8] == {~32'(32'h1F0008 / 8), 32'hC0FFEE00}) n_dc_wt++;

    // SPAM: timer, console, PS/2, SystemACE, timeout
    spam_r(SPAM_DID_TIMER, 0, t0);
    repeat (50) @(negedge cclk);
    spam_r(SPAM_DID_TIMER, 0, t1);
    if (t1 - t0 >= 50 && t1 - t0 < 100) n_timer++;
    spam_w(SPAM_DID_CONSOLE, 0, 32'h56);
    fork ps2_send(8'h1C); join_none
    spam_w(SPAM_DID_SYSACE, 24'h10, 32'hBEEF);
    spam_r(SPAM_DID_SYSACE, 24'h10, d);
    check(d == 32'hBEEF, "SystemACE register write and read back");
    spam_r(SPAM_DID_SYSACE, 24'h20, d);
    if (d == 32'h108) n_ace++;
    dc(0, 32'h8900_0000, 0, d, w);
    if (d == 32'hDEADDEAD && w >= 256) n_timeout++;

    // audio: 256 bytes of samples from 0x1A0000
    spam_w(SPAM_DID_AUDIO, 24'h00, 32'h1A0000);
    spam_w(SPAM_DID_AUDIO, 24'h04, 32'd256);
    spam_w(SPAM_DID_AUDIO, 24'h08, 32'(DMA_TRIGGER_ONCE));

    // clear accelerator: 40 packets at 0x180000
    spam_w(SPAM_DID_CLEAR, 24'h0, 32'h1234_5678);
    spam_w(SPAM_DID_CLEAR, 24'h4, 32'h180000);
    spam_w(SPAM_DID_CLEAR, 24'h8, 32'd40);
    do spam_r(SPAM_DID_CLEAR, 24'h8, d); while (d != 0);
    repeat (100) @(negedge fsabi_clk);
    ok = 1;
    for (int i = 0; i < 40; i++) if (u_mig.mem[32'h180000 / 8 + i] != 64'h1234_5678_1234_5678) ok = 0;
    if (u_mig.mem[32'h180000 / 8 + 40] != mem_init(32'h180000 / 8 + 40)) ok = 0;
    check(ok, "clear accelerator result");
    if (ok) n_clear++;

    // blit accelerator: 6 packets from 0x1C0000 to 0x1D0000 as rows of 2 packets, stride 512
    spam_w(SPAM_DID_BLIT, 24'h14, 0);
    spam_w(SPAM_DID_BLIT, 24'h00, 32'h1C0000);
    spam_w(SPAM_DID_BLIT, 24'h08, 32'h1D0000);
    spam_w(SPAM_DID_BLIT, 24'h0C, 32'd2);
    spam_w(SPAM_DID_BLIT, 24'h10, 32'd512);
    spam_w(SPAM_DID_BLIT, 24'h04, 32'd6);
    do spam_r(SPAM_DID_BLIT, 24'h14, d); while (d != 6);
    repeat (100) @(negedge fsabi_clk);
    ok = 1;
    for (int k = 0; k < 6; k++)
      for (int j = 0; j < 8; j++)
        if (u_mig.mem[(32'h1D0000 + (k / 2) * 512 + (k % 2) * 64) / 8 + j] != mem_init(32'h1C0000 / 8 + 8 * k + j)) ok = 0;
    check(ok, "blit accelerator result");
    if (ok) n_blit++;

    // PS/2 code typed meanwhile
    #500000;
    spam_r(SPAM_DID_PS2, 0, d);
    if (d == 32'h1C) n_ps2++;

    wait (n_pixels >= 20000 && n_audio >= 8 && n_console > 0);
    $display("preload=%0d ic_miss=%0d ic_hit=%0d dc_miss=%0d dc_hit=%0d dc_wt=%0d timer=%0d console=%0d ps2=%0d ace=%0d timeout=%0d",
             n_preload, n_ic_miss, n_ic_hit, n_dc_miss, n_dc_hit, n_dc_wt, n_timer, n_console, n_ps2, n_ace, n_timeout);
    $display("pixels=%0d catchup=%0d hsync=%0d audio=%0d clear=%0d blit=%0d conflict=%0d master_stall=%0d slave_stall=%0d mig_wr=%0d mig_rd=%0d",
             n_pixels, n_catchup, n_hsync, n_audio, n_clear, n_blit, n_conflict, n_master_stall, n_slave_stall,
             u_mig.n_wr_bursts, u_mig.n_rd_bursts);
    check(n_preload > 0, "mechanism: preload");
    check(n_ic_miss > 0, "mechanism: icache miss");
    check(n_ic_hit > 0, "mechanism: icache hit");
    check(n_dc_miss > 0, "mechanism: dcache miss");
    check(n_dc_hit > 0, "mechanism: dcache hit");
    check(n_dc_wt > 0, "mechanism: dcache write-through");
    check(n_timer > 0, "mechanism: timer");
    check(n_console > 0, "mechanism: console");
    check(n_ps2 > 0, "mechanism: PS/2 scancode");
    check(n_ace > 0, "mechanism: SystemACE access");
    check(n_timeout > 0, "mechanism: SPAM timeout");
    check(n_pixels >= 20000, "mechanism: video pixels");
    check(n_hsync > 10, "mechanism: hsync");
    check(n_catchup > 0, "mechanism: framebuffer underrun recovered in blanking");
    check(n_audio >= 8, "mechanism: audio samples");
    check(n_clear > 0, "mechanism: clear");
    check(n_blit > 0, "mechanism: blit");
    check(n_conflict > 0, "mechanism: arbiter priority decision");
    check(n_master_stall > 0, "mechanism: master out of credits");
    check(n_slave_stall > 0, "mechanism: arbiter out of slave credits");
    check(u_mig.n_wr_bursts > 0 && u_mig.n_rd_bursts > 0, "mechanism: MIG bursts");
    tb_finish();
  end
endmodule
