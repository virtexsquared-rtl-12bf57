// tb_audio: the audio block (DMA engine, codec register sequencer, AC'97 link) with the FSAB
// slave model and a codec model that decodes every 256-bit AC'97 frame. Memory word i is
// {~i, i}; each word holds two stereo sample frames (lower 32 bits first, left in bits 15:0),
// so the expected sample stream follows from the DMA range. Checks: after a TRIGGER_ONCE of
// 256 bytes the codec receives exactly those 64 sample frames, in order, marked valid in the
// tag; once the stream has run out the PCM slots are sent invalid (underrun, counted); a
// mixer register written over SPAM (offset 0x104, microphone volume) shows up as a write
// command to codec register 0x0E with the new value; the seven registers keep rotating.
module tb_audio;
  import vs_pkg::*;
  `include "tb_common.svh"
  logic cclk = 0, cclk_rst_b = 0, fsabi_clk = 0, fsabi_rst_b = 0, ac97_bitclk = 0, ac97_rst_b = 0;
  spamo_t spamo = '0;
  spami_t spami;
  fsabo_t audio__fsabo;
  logic audio__fsabo_credit, ac97_sync, ac97_sdata_out, ac97_sdata_in = 0, ac97_reset_b;
  fsabi_t fsabi;
  audio #(.FIFO_DEPTH(32)) dut (.*);
  fsab_slave_model #(.MEM_WORDS(8192), .LATENCY(8)) u_mem (.clk(fsabi_clk),
    .fsabo(fsabi_rst_b ? audio__fsabo : fsabo_t'(0)), .fsabo_credit(audio__fsabo_credit), .fsabi(fsabi));
  always #5 cclk = ~cclk;
  always #4 fsabi_clk = ~fsabi_clk;
  always #40 ac97_bitclk = ~ac97_bitclk;
  `WATCHDOG(cclk, 2000000)
  `include "tb_spam.svh"

  int frames = 0, samples = 0, underruns = 0, mic_seen = 0;
  logic [6:0] cmd_addrs [$];
  initial begin
    logic prev_sync = 0;
    int idx = -1;
    logic [255:0] got;
    int s, w;
    logic [31:0] e;
    forever begin
      @(negedge ac97_bitclk);
      if (ac97_sync && !prev_sync) begin
        if (idx == 255) begin
          frames++;
          if (got[252:251] == 2'b11) begin
            s = samples;
            w = 32'h1000 / 8 + s / 2;
            e = s[0] ? ~32'(w) : 32'(w);
            check(got[199:180] == {e[15:0], 4'h0} && got[179:160] == {e[31:16], 4'h0},
                  $sformatf("sample frame %0d: %h", s, got[255:160]));
            samples++;
          end else begin
            check(got[252:251] == 2'b00 && got[199:160] == 0, "silence with invalid slots");
            if (samples > 0) underruns++;
          end
          check(got[254:253] == 2'b11 && !got[239], "register write command in slots 1-2");
          cmd_addrs.push_back(got[238:232]);
          if (got[238:232] == 7'h0E && got[219:204] == 16'h1234) mic_seen++;
        end
        idx = 0;
      end else if (idx >= 0) idx++;
      prev_sync = ac97_sync;
      if (idx >= 0 && idx < 256) got[255 - idx] = ac97_sdata_out;
    end
  end

  initial begin
    repeat (3) @(negedge ac97_bitclk);   // every clock domain sees its reset
    cclk_rst_b = 1; fsabi_rst_b = 1; ac97_rst_b = 1;
    spam_wr(SPAM_DID_AUDIO, 24'h104, 32'h1234);
    spam_wr(SPAM_DID_AUDIO, 24'h00, 32'h1000);
    spam_wr(SPAM_DID_AUDIO, 24'h04, 32'd256);
    spam_wr(SPAM_DID_AUDIO, 24'h08, 32'(DMA_TRIGGER_ONCE));
    wait (samples == 64);
    wait (frames > 90);
    check(samples == 64, "exactly the programmed samples");
    check(underruns > 10, "underrun sends silence");
    check(mic_seen > 0, "mixer register write reached the codec");
    for (int i = 7; i < cmd_addrs.size(); i++) check(cmd_addrs[i] == cmd_addrs[i - 7], "register rotation");
    tb_finish();
  end
endmodule
