// tb_framebuffer: the framebuffer with a small 16x8 visible area (standard porches and syncs),
// three clocks (core, FSAB, pixel) and the FSAB slave model holding the images (64-bit word i
// = {~i, i}). Pixel p of a frame is 32-bit word p of the buffer, so its red/green/blue bytes are
// known in advance. Checks: every displayed pixel has the right colour for its position, in
// three frames running; each frame has 16x8 pixels with de and one vs pulse; after a new start
// address is written over SPAM, a later frame comes wholly from the new buffer and no frame
// mixes the two; the DMA reads whole 8-word blocks.
module tb_framebuffer;
  import vs_pkg::*;
  `include "tb_common.svh"
  localparam int H = 16, V = 8;
  logic cclk = 0, cclk_rst_b = 0, fsabi_clk = 0, fsabi_rst_b = 0, fbclk = 0, fbclk_rst_b = 0;
  spamo_t spamo = '0;
  spami_t spami;
  fsabo_t fb__fsabo;
  logic fb__fsabo_credit;
  fsabi_t fsabi;
  logic [7:0] dvi_r, dvi_g, dvi_b;
  logic dvi_hs, dvi_vs, dvi_de;
  framebuffer #(.H_ACTIVE(H), .V_ACTIVE(V), .DEFAULT_ADDR(31'h1000), .FIFO_DEPTH(32)) dut (.*);
  fsab_slave_model #(.MEM_WORDS(8192), .LATENCY(8)) u_mem (.clk(fsabi_clk),
    .fsabo(fsabi_rst_b ? fb__fsabo : fsabo_t'(0)), .fsabo_credit(fb__fsabo_credit), .fsabi(fsabi));
  always #5 cclk = ~cclk;
  always #4 fsabi_clk = ~fsabi_clk;
  always #7 fbclk = ~fbclk;
  `WATCHDOG(cclk, 400000)
  `include "tb_spam.svh"

  always @(posedge fsabi_clk) if (fsabi_rst_b && fb__fsabo.valid)
    check(fb__fsabo.mode == FSAB_READ && fb__fsabo.len == 4'd8 && fb__fsabo.did == DID_FB, "8-word reads");

  function automatic logic [31:0] pix(input int base, input int p);
    int w;
    w = base / 8 + p / 2;
    return p[0] ? ~32'(w) : 32'(w);
  endfunction

  int frames = 0, p = 0, frames_new = 0, mixed = 0;
  int base_of_frame = -1;
  logic prev_vs = 1;
  always @(posedge fbclk) if (fbclk_rst_b) begin
    if (!dvi_vs && prev_vs) begin
      if (p > 0) begin
        check(p == H * V, $sformatf("pixels in frame %0d: %0d", frames, p));
        frames++;
        if (base_of_frame == 32'h2000) frames_new++;
      end
      p = 0;
      base_of_frame = -1;
    end
    prev_vs = dvi_vs;
    if (dvi_de) begin
      logic [31:0] a, b;
      a = pix(32'h1000, p);
      b = pix(32'h2000, p);
      if (p == 0) base_of_frame = ({8'h0, dvi_b, dvi_g, dvi_r} == b[23:0]) ? 32'h2000 : 32'h1000;
      a = pix(base_of_frame, p);
      check({dvi_b, dvi_g, dvi_r} == a[23:0], $sformatf("pixel %0d of frame %0d", p, frames));
      if ({dvi_b, dvi_g, dvi_r} != a[23:0]) mixed++;
      p++;
    end
  end

  initial begin
    repeat (3) @(negedge cclk);
    cclk_rst_b = 1; fsabi_rst_b = 1; fbclk_rst_b = 1;
    wait (frames == 3);
    check(frames_new == 0, "first frames from the default buffer");
    spam_wr(SPAM_DID_FB, 24'h00, 32'h2000);
    wait (frames == 7);
    check(frames_new >= 2, $sformatf("new buffer shown (%0d frames)", frames_new));
    check(mixed == 0, "no mixed frames");
    tb_finish();
  end
endmodule
