// system: the virtexsquared system-on-chip without its CPU pipeline.
//
// Two buses tie the system together. The FSAB carries high-bandwidth, cacheable traffic to
// main memory: seven masters (preloader, framebuffer DMA, audio DMA, instruction cache, data
// cache, blit accelerator, clear accelerator, in that priority order) feed fsab_arbiter, whose
// single output goes to fsab_memory, the only slave, which talks to a Xilinx MIG DDR2
// controller outside this RTL (mig_* ports). Read data come back on one inbound FSAB that every
// master watches for its own device id. The SPAM bus carries CSR accesses: the data cache is
// its only master and sends every access with address bit 31 set there; the console (device
// 0), framebuffer (2), SystemACE bridge (3), audio (4), PS/2 (5), timer (6), clear (7) and blit
// (8) answer, and their responses are ORed.
// The CPU pipeline is not part of this RTL: the caches' core-side ports are top-level ports,
// and core_rst_b is the reset the core must use. It stays low until the preloader has copied
// its 16 KB boot image to address 0 (the preloader's done flag is synchronized to the core
// clock by two flip-flops).
// Clock domains: cclk (core, SPAM, caches' lookup side), fsabi_clk (memory controller, FSAB,
// all FSAB masters' bus side), fbclk (pixels), ac97_bitclk (codec link), sysace_clk. Every
// reset is active low and asynchronous, one per domain.
// Lint: fsabi_rst_b is used both as an asynchronous reset and inside assertion 'disable iff' conditions,
// which Verilator reports as SYNCASYNCNET; the assertion use is not logic. Unconnected outputs of
// instances (PINCONNECTEMPTY) are status outputs that this top level does not need.
module system
  import vs_pkg::*;
(
  input  logic         cclk,
  input  logic         cclk_rst_b,
  input  logic         fsabi_clk,
  input  logic         fsabi_rst_b,
  input  logic         fbclk,
  input  logic         fbclk_rst_b,
  input  logic         ac97_bitclk,
  input  logic         ac97_rst_b,
  input  logic         sysace_clk,
  input  logic         sysace_rst_b,
  // CPU core side of the caches
  output logic         core_rst_b,
  input  logic [31:0]  ic__rd_addr_0a,
  input  logic         ic__rd_req_0a,
  output logic         ic__rd_wait_0a,
  output logic [31:0]  ic__rd_data_1a,
  input  logic [31:0]  dc__addr_3a,
  input  logic         dc__rd_req_3a,
  input  logic         dc__wr_req_3a,
  output logic         dc__rw_wait_3a,
  input  logic [31:0]  dc__wr_data_3a,
  output logic [31:0]  dc__rd_data_4a,
  // MIG user interface
  output logic [30:0]  mig_af_addr,
  output logic [2:0]   mig_af_cmd,
  output logic         mig_af_wren,
  input  logic         mig_af_afull,
  output logic [127:0] mig_wdf_data,
  output logic [15:0]  mig_wdf_mask_data,
  output logic         mig_wdf_wren,
  input  logic         mig_wdf_afull,
  input  logic         mig_rd_data_valid,
  input  logic [127:0] mig_rd_data,
  // video
  output logic [7:0]   dvi_r,
  output logic [7:0]   dvi_g,
  output logic [7:0]   dvi_b,
  output logic         dvi_hs,
  output logic         dvi_vs,
  output logic         dvi_de,
  // AC'97 codec
  output logic         ac97_sync,
  output logic         ac97_sdata_out,
  input  logic         ac97_sdata_in,
  output logic         ac97_reset_b,
  // PS/2 keyboard
  input  logic         ps2clk,
  input  logic         ps2data,
  // serial console
  output logic         txd,
  // SystemACE MPU port
  output logic [6:0]   sysace_mpa,
  input  logic [15:0]  sysace_mpd_i,
  output logic [15:0]  sysace_mpd_o,
  output logic         sysace_mpd_oe,
  output logic         sysace_mpce_b,
  output logic         sysace_mpwe_b,
  output logic         sysace_mpoe_b
);
  localparam int NM = 7;
  localparam int M_PRE = 0, M_FB = 1, M_AUDIO = 2, M_IC = 3, M_DC = 4, M_BLIT = 5, M_CLEAR = 6;

  fsabo_t m_fsabo [NM];
  logic [NM-1:0] m_credit;
  fsabo_t fsabo;
  logic fsabo_credit;
  fsabi_t fsabi;

  fsab_arbiter #(.N(NM)) u_arb (
    .clk(fsabi_clk), .rst_b(fsabi_rst_b), .m_clk({NM{fsabi_clk}}), .m_rst_b({NM{fsabi_rst_b}}),
    .m_fsabo(m_fsabo), .m_credit(m_credit), .fsabo(fsabo), .fsabo_credit(fsabo_credit));

  fsab_memory u_mem (
    .clk(fsabi_clk), .rst_b(fsabi_rst_b), .fsabo(fsabo), .fsabo_credit(fsabo_credit),
    .fsabi(fsabi), .mig_af_addr(mig_af_addr), .mig_af_cmd(mig_af_cmd), .mig_af_wren(mig_af_wren),
    .mig_af_afull(mig_af_afull), .mig_wdf_data(mig_wdf_data), .mig_wdf_mask_data(mig_wdf_mask_data),
    .mig_wdf_wren(mig_wdf_wren), .mig_wdf_afull(mig_wdf_afull),
    .mig_rd_data_valid(mig_rd_data_valid), .mig_rd_data(mig_rd_data));

  // preloader and core reset
  logic pre_done, pre_s1, pre_s2;
  fsab_preload u_pre (
    .clk(fsabi_clk), .rst_b(fsabi_rst_b), .fsabo(m_fsabo[M_PRE]), .fsabo_credit(m_credit[M_PRE]),
    .core_rst_b(pre_done));
  always_ff @(posedge cclk or negedge cclk_rst_b) begin
    if (!cclk_rst_b) begin pre_s1 <= 1'b0; pre_s2 <= 1'b0; end
    else begin pre_s1 <= pre_done; pre_s2 <= pre_s1; end
  end
  assign core_rst_b = pre_s2;

  // caches
  spamo_t spamo;
  spami_t spami;
  icache u_ic (
    .clk(cclk), .rst_b(cclk_rst_b), .ic__rd_addr_0a(ic__rd_addr_0a), .ic__rd_req_0a(ic__rd_req_0a),
    .ic__rd_wait_0a(ic__rd_wait_0a), .ic__rd_data_1a(ic__rd_data_1a),
    .fsab_clk(fsabi_clk), .fsab_rst_b(fsabi_rst_b), .ic__fsabo(m_fsabo[M_IC]),
    .ic__fsabo_credit(m_credit[M_IC]), .fsabi(fsabi));
  dcache u_dc (
    .clk(cclk), .rst_b(cclk_rst_b), .dc__addr_3a(dc__addr_3a), .dc__rd_req_3a(dc__rd_req_3a),
    .dc__wr_req_3a(dc__wr_req_3a), .dc__rw_wait_3a(dc__rw_wait_3a), .dc__wr_data_3a(dc__wr_data_3a),
    .dc__rd_data_4a(dc__rd_data_4a), .spamo(spamo), .spami(spami),
    .fsab_clk(fsabi_clk), .fsab_rst_b(fsabi_rst_b), .dc__fsabo(m_fsabo[M_DC]),
    .dc__fsabo_credit(m_credit[M_DC]), .fsabi(fsabi));

  // SPAM peripherals
  spami_t s_con, s_fb, s_ace, s_aud, s_ps2, s_tim, s_clr, s_blt;
  assign spami = s_con | s_fb | s_ace | s_aud | s_ps2 | s_tim | s_clr | s_blt;

  spam_console_io u_con (.clk(cclk), .rst_b(cclk_rst_b), .spamo(spamo), .spami(s_con), .txd(txd));
  spam_timer u_tim (.clk(cclk), .rst_b(cclk_rst_b), .spamo(spamo), .spami(s_tim));
  ps2 u_ps2 (.clk(cclk), .rst_b(cclk_rst_b), .spamo(spamo), .spami(s_ps2), .ps2clk(ps2clk), .ps2data(ps2data));
  spam_sysace u_ace (
    .cclk(cclk), .cclk_rst_b(cclk_rst_b), .spamo(spamo), .spami(s_ace),
    .sysace_clk(sysace_clk), .sysace_rst_b(sysace_rst_b), .sysace_mpa(sysace_mpa),
    .sysace_mpd_i(sysace_mpd_i), .sysace_mpd_o(sysace_mpd_o), .sysace_mpd_oe(sysace_mpd_oe),
    .sysace_mpce_b(sysace_mpce_b), .sysace_mpwe_b(sysace_mpwe_b), .sysace_mpoe_b(sysace_mpoe_b));

  framebuffer u_fb (
    .cclk(cclk), .cclk_rst_b(cclk_rst_b), .spamo(spamo), .spami(s_fb),
    .fsabi_clk(fsabi_clk), .fsabi_rst_b(fsabi_rst_b), .fb__fsabo(m_fsabo[M_FB]),
    .fb__fsabo_credit(m_credit[M_FB]), .fsabi(fsabi), .fbclk(fbclk), .fbclk_rst_b(fbclk_rst_b),
    .dvi_r(dvi_r), .dvi_g(dvi_g), .dvi_b(dvi_b), .dvi_hs(dvi_hs), .dvi_vs(dvi_vs), .dvi_de(dvi_de));

  audio u_aud (
    .cclk(cclk), .cclk_rst_b(cclk_rst_b), .spamo(spamo), .spami(s_aud),
    .fsabi_clk(fsabi_clk), .fsabi_rst_b(fsabi_rst_b), .audio__fsabo(m_fsabo[M_AUDIO]),
    .audio__fsabo_credit(m_credit[M_AUDIO]), .fsabi(fsabi), .ac97_bitclk(ac97_bitclk),
    .ac97_rst_b(ac97_rst_b), .ac97_sync(ac97_sync), .ac97_sdata_out(ac97_sdata_out),
    .ac97_sdata_in(ac97_sdata_in), .ac97_reset_b(ac97_reset_b));

  accel_clear u_clr (
    .cclk(cclk), .cclk_rst_b(cclk_rst_b), .spamo(spamo), .spami(s_clr),
    .fsabi_clk(fsabi_clk), .fsabi_rst_b(fsabi_rst_b), .accel_clear__fsabo(m_fsabo[M_CLEAR]),
    .accel_clear__fsabo_credit(m_credit[M_CLEAR]));

  accel_blit u_blt (
    .cclk(cclk), .cclk_rst_b(cclk_rst_b), .spamo(spamo), .spami(s_blt),
    .fsabi_clk(fsabi_clk), .fsabi_rst_b(fsabi_rst_b), .accel_blit__fsabo(m_fsabo[M_BLIT]),
    .accel_blit__fsabo_credit(m_credit[M_BLIT]), .fsabi(fsabi));
endmodule
