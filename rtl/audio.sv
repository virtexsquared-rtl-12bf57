// audio: plays 16-bit stereo PCM from main memory through the AC'97 codec.
//
// A simple_dma_read engine (FSAB did DID_AUDIO, SPAM device 4, DMA registers at offsets
// 0x00..0x14 as for every DMA engine) fetches the sample stream into its FIFO on the codec bit
// clock. Each 64-bit word holds two sample frames, the lower address first; a frame is the
// left sample in bytes 0-1 and the right sample in bytes 2-3 (little endian, signed). At each
// AC'97 frame strobe the current frame goes out on slots 3 and 4 and the next one is prepared:
// the upper half of the word already fetched, or a new word requested from the FIFO. When the
// FIFO is empty, silence is sent with the slots marked invalid.
// The codec mixer settings are SPAM registers at offsets 0x100..0x118 (master, microphone,
// line-in, CD, PCM volume, record select, record gain; write only). They cross to the bit clock
// through a csr_async_write and are sent by ac97_conf; ac97_link drives the serial link.
// Register map, DMA use and the two-frames-per-word handling follow the published audio
// description; the sample layout within a word and the underrun behaviour are this design's
// choices.
// Lint: the DMA engine's fifo_empty output is unused here (data_ready carries the same information).
module audio
  import vs_pkg::*;
#(
  parameter int FIFO_DEPTH = 128
) (
  input  logic        cclk,
  input  logic        cclk_rst_b,
  input  spamo_t      spamo,
  output spami_t      spami,
  input  logic        fsabi_clk,
  input  logic        fsabi_rst_b,
  output fsabo_t      audio__fsabo,
  input  logic        audio__fsabo_credit,
  input  fsabi_t      fsabi,
  input  logic        ac97_bitclk,
  input  logic        ac97_rst_b,
  output logic        ac97_sync,
  output logic        ac97_sdata_out,
  input  logic        ac97_sdata_in,
  output logic        ac97_reset_b
);
  spami_t dma_spami;
  logic request, data_ready, fifo_empty;
  logic [63:0] data;

  simple_dma_read #(
    .FIFO_DEPTH(FIFO_DEPTH), .FSAB_DID(DID_AUDIO), .FSAB_SUBDID(4'h0), .SPAM_DID(SPAM_DID_AUDIO),
    .SPAM_ADDRPFX(24'h000000), .SPAM_ADDRMASK(24'h000100)
  ) u_dma (
    .cclk(cclk), .cclk_rst_b(cclk_rst_b), .spamo(spamo), .spami(dma_spami),
    .fsabi_clk(fsabi_clk), .fsabi_rst_b(fsabi_rst_b), .fsabo(audio__fsabo),
    .fsabo_credit(audio__fsabo_credit), .fsabi(fsabi),
    .target_clk(ac97_bitclk), .target_rst_b(ac97_rst_b), .request(request), .data(data),
    .data_ready(data_ready), .fifo_empty(fifo_empty));

  // codec configuration registers
  logic conf_sel, conf_done, conf_strobe_t;
  logic [18:0] conf_t;
  assign conf_sel = spamo.valid && !spamo.r_nw && spamo.did == SPAM_DID_AUDIO && spamo.addr[8];
  csr_async_write #(.WIDTH(19)) u_conf_csr (
    .cclk(cclk), .tclk(ac97_bitclk), .rst_b_cclk(cclk_rst_b), .rst_b_tclk(ac97_rst_b),
    .wr_strobe_cclk(conf_sel), .wr_data_cclk({spamo.addr[4:2], spamo.data[15:0]}),
    .wr_wait_cclk(), .wr_done_strobe_cclk(conf_done), .wr_strobe_tclk(conf_strobe_t),
    .wr_data_tclk(conf_t));
  // reads of the write-only configuration space answer at once with zero
  logic conf_rd_ack;
  always_ff @(posedge cclk or negedge cclk_rst_b) begin
    if (!cclk_rst_b) conf_rd_ack <= 1'b0;
    else conf_rd_ack <= spamo.valid && spamo.r_nw && spamo.did == SPAM_DID_AUDIO && spamo.addr[8];
  end
  assign spami.busy_b = dma_spami.busy_b | conf_done | conf_rd_ack;
  assign spami.data   = dma_spami.data;

  logic ac97_strobe;
  logic [19:0] slot1, slot2;
  logic slot1_v, slot2_v;
  ac97_conf u_conf (
    .ac97_bitclk(ac97_bitclk), .rst_b(ac97_rst_b), .ac97_strobe(ac97_strobe),
    .wr_en(conf_strobe_t), .wr_idx(conf_t[18:16]), .wr_data(conf_t[15:0]),
    .out_slot1(slot1), .out_slot1_valid(slot1_v), .out_slot2(slot2), .out_slot2_valid(slot2_v));

  // sample sequencing
  logic secondhalf, fetch_d, sample_v;
  logic [15:0] left, right;
  always_ff @(posedge ac97_bitclk or negedge ac97_rst_b) begin
    if (!ac97_rst_b) begin
      secondhalf <= 1'b0; fetch_d <= 1'b0; sample_v <= 1'b0; left <= '0; right <= '0;
    end else begin
      fetch_d <= request;
      if (fetch_d) begin
        {right, left} <= data[31:0];
        sample_v   <= 1'b1;
        secondhalf <= 1'b1;
      end else if (ac97_strobe) begin
        if (secondhalf) begin
          {right, left} <= data[63:32];
          secondhalf <= 1'b0;
        end else begin
          {right, left} <= '0;
          sample_v <= 1'b0;
        end
      end
    end
  end
  assign request = ac97_strobe && !secondhalf && data_ready;

  ac97_link u_link (
    .ac97_bitclk(ac97_bitclk), .rst_b(ac97_rst_b), .ac97_sync(ac97_sync),
    .ac97_sdata_out(ac97_sdata_out), .ac97_sdata_in(ac97_sdata_in), .ac97_reset_b(ac97_reset_b),
    .ac97_strobe(ac97_strobe),
    .out_slot1(slot1), .out_slot1_valid(slot1_v), .out_slot2(slot2), .out_slot2_valid(slot2_v),
    .out_slot3({left, 4'h0}), .out_slot3_valid(sample_v),
    .out_slot4({right, 4'h0}), .out_slot4_valid(sample_v),
    .in_slot3(), .in_slot4());
endmodule
