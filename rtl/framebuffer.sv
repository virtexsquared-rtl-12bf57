// framebuffer: scans a 32-bit-per-pixel image out of main memory to the DVI encoder.
//
// A simple_dma_read engine (FSAB did DID_FB, SPAM device 2, registers at 0x8200_0000) reads the
// frame linearly; a sync_gen produces the video timing on the pixel clock fbclk. Every 64-bit
// word holds two pixels, the lower address first; within a pixel, byte 0 is red, byte 1 green,
// byte 2 blue and byte 3 is ignored. While a visible pixel with even x is being generated, the
// next word is requested from the DMA FIFO; the pixel and its hs/vs/de are registered, so the
// outputs lag sync_gen by one clock. The timing generator is held in reset until the FIFO has
// first become non-empty, so that the first fetched word is the top-left pixel. If the FIFO runs
// dry during a frame (a request then pops nothing), the missing words are popped during the
// next vertical blanking, so every frame starts aligned with the start of the image.
// The DMA re-triggers itself after every frame (AUTOTRIGGER after reset) with a length of one
// 640x480x4-byte frame, so software only writes a new start address to flip buffers and reads
// register 0x14 to learn which buffer is being shown. The pixel format, the DMA use and the
// register addresses follow the published description; the parallel 24-bit RGB output (the
// encoder's own pin protocol is left to a wrapper) and the auto-trigger default are this
// design's choices.
// Lint: the unused fourth byte of each pixel is ignored on purpose, so those data bits are unused.
module framebuffer
  import vs_pkg::*;
#(
  parameter int H_ACTIVE = 640,
  parameter int V_ACTIVE = 480,
  parameter logic [30:0] DEFAULT_ADDR = 31'h0,
  parameter int FIFO_DEPTH = 128
) (
  input  logic        cclk,
  input  logic        cclk_rst_b,
  input  spamo_t      spamo,
  output spami_t      spami,
  input  logic        fsabi_clk,
  input  logic        fsabi_rst_b,
  output fsabo_t      fb__fsabo,
  input  logic        fb__fsabo_credit,
  input  fsabi_t      fsabi,
  input  logic        fbclk,
  input  logic        fbclk_rst_b,
  output logic [7:0]  dvi_r,
  output logic [7:0]  dvi_g,
  output logic [7:0]  dvi_b,
  output logic        dvi_hs,
  output logic        dvi_vs,
  output logic        dvi_de
);
  logic request, data_ready, fifo_empty, fifo_empty_la;
  logic [63:0] data;
  logic vs, hs, border;
  logic [11:0] x, y;

  simple_dma_read #(
    .FIFO_DEPTH(FIFO_DEPTH), .FSAB_DID(DID_FB), .FSAB_SUBDID(4'h0), .SPAM_DID(SPAM_DID_FB),
    .DEFAULT_ADDR(DEFAULT_ADDR), .DEFAULT_LEN(31'(H_ACTIVE * V_ACTIVE * 4)),
    .DEFAULT_COMMAND(DMA_AUTOTRIGGER)
  ) u_dma (
    .cclk(cclk), .cclk_rst_b(cclk_rst_b), .spamo(spamo), .spami(spami),
    .fsabi_clk(fsabi_clk), .fsabi_rst_b(fsabi_rst_b), .fsabo(fb__fsabo),
    .fsabo_credit(fb__fsabo_credit), .fsabi(fsabi),
    .target_clk(fbclk), .target_rst_b(fbclk_rst_b), .request(request), .data(data),
    .data_ready(data_ready), .fifo_empty(fifo_empty));

  // latched "FIFO has been empty since reset"
  always_ff @(posedge fbclk or negedge fbclk_rst_b) begin
    if (!fbclk_rst_b) fifo_empty_la <= 1'b1;
    else if (!fifo_empty) fifo_empty_la <= 1'b0;
  end

  sync_gen #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE)) u_sync (
    .fbclk(fbclk), .rst_b(!fifo_empty_la), .vs(vs), .hs(hs), .x(x), .y(y), .border(border));

  // Words popped in this frame. A request made while the FIFO is empty (memory could not keep
  // up, e.g. while the preloader holds the bus after reset) pops nothing; the missing words are
  // then popped during vertical blanking, so that the next frame starts with its first word.
  localparam int FRAME_WORDS = H_ACTIVE * V_ACTIVE / 2;
  logic [$clog2(FRAME_WORDS+1)-1:0] popped;
  logic catchup, first_px;
  assign catchup  = !fifo_empty_la && (y >= 12'(V_ACTIVE)) &&
                    (popped != ($clog2(FRAME_WORDS+1))'(FRAME_WORDS));
  assign request  = !fifo_empty_la && ((!border && !x[0]) || catchup);
  assign first_px = !border && x == 0 && y == 0;
  always_ff @(posedge fbclk or negedge fbclk_rst_b) begin
    if (!fbclk_rst_b) popped <= '0;
    else if (first_px) popped <= ($clog2(FRAME_WORDS+1))'(data_ready);
    else if (request && data_ready) popped <= popped + 1'b1;
  end

  logic odd_d, de_d;
  always_ff @(posedge fbclk or negedge fbclk_rst_b) begin
    if (!fbclk_rst_b) begin
      odd_d <= 1'b0; de_d <= 1'b0; dvi_hs <= 1'b1; dvi_vs <= 1'b1;
    end else begin
      odd_d  <= x[0];
      de_d   <= !fifo_empty_la && !border;
      dvi_hs <= hs;
      dvi_vs <= vs;
    end
  end
  assign dvi_de = de_d;
  assign {dvi_b, dvi_g, dvi_r} = !de_d ? 24'h0 : (odd_d ? data[55:32] : data[23:0]);
endmodule
