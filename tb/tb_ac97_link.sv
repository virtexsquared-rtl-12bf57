// tb_ac97_link: the AC'97 link controller against a codec model. The codec model watches
// sync on the falling bit-clock edge, numbers the bits of each frame from the sync rise, decodes
// the 256-bit frame sent by the controller and at the same time sends its own frame (random
// left/right ADC samples). The testbench presents new random slot 1-4 contents at every strobe.
// Checks: sync is high for exactly 16 bits in each 256-bit frame; the frame tag holds frame
// valid and the slot valid bits; slots 1-4 carry the values presented at the strobe before the
// frame, MSB first, and slots 5-12 are zero; in_slot3/in_slot4 return what the codec sent in
// slots 3 and 4 of the previous frame.
module tb_ac97_link;
  `include "tb_common.svh"
  logic ac97_bitclk = 0, rst_b = 0, ac97_sync, ac97_sdata_out, ac97_sdata_in = 0, ac97_reset_b, ac97_strobe;
  logic [19:0] out_slot1 = 0, out_slot2 = 0, out_slot3 = 0, out_slot4 = 0, in_slot3, in_slot4;
  logic out_slot1_valid = 0, out_slot2_valid = 0, out_slot3_valid = 0, out_slot4_valid = 0;
  ac97_link dut (.*);
  always #40 ac97_bitclk = ~ac97_bitclk;
  `WATCHDOG(ac97_bitclk, 30000)

  typedef struct { logic [3:0] v; logic [19:0] s [4]; } fr_t;
  fr_t presented [$];
  logic [19:0] codec_s3 [$], codec_s4 [$];
  int frames = 0;

  // new slot contents, sampled by the controller at each strobe
  always @(negedge ac97_bitclk) if (rst_b && ac97_strobe) begin
    fr_t f;
    f.v = {out_slot1_valid, out_slot2_valid, out_slot3_valid, out_slot4_valid};
    f.s[0] = out_slot1; f.s[1] = out_slot2; f.s[2] = out_slot3; f.s[3] = out_slot4;
    presented.push_back(f);
  end
  always @(posedge ac97_bitclk) if (rst_b && ac97_strobe) begin
    #1;
    {out_slot1_valid, out_slot2_valid, out_slot3_valid, out_slot4_valid} = 4'($urandom);
    out_slot1 = 20'($urandom); out_slot2 = 20'($urandom); out_slot3 = 20'($urandom); out_slot4 = 20'($urandom);
  end

  // codec model
  initial begin
    logic prev_sync = 0;
    int idx = -1, synclen = 0;
    logic [255:0] got, tx;
    tx = '0;
    forever begin
      @(negedge ac97_bitclk);
      if (ac97_sync && !prev_sync) begin
        if (idx == 255) begin
          // a whole frame was received
          fr_t e;
          check(synclen == 16, $sformatf("sync 16 bits long (%0d)", synclen));
          check(presented.size() > 0, "frame was presented");
          if (presented.size() > 0) begin
            e = presented.pop_front();
            check(got[255] == 1'b1 && got[254:251] == e.v && got[250:240] == 0, "tag slot");
            check(got[239:220] == e.s[0] && got[219:200] == e.s[1] &&
                  got[199:180] == e.s[2] && got[179:160] == e.s[3], $sformatf("slots 1-4 of frame %0d", frames));
            check(got[159:0] == 0, "slots 5-12 zero");
          end
          frames++;
        end else if (idx >= 0) begin
          check(0, $sformatf("frame of %0d bits", idx + 1));
        end
        idx = 0; synclen = 0;
        tx = {4'hF, 12'h0, 40'h0, 20'($urandom), 20'($urandom), 160'h0};
        codec_s3.push_back(tx[199:180]); codec_s4.push_back(tx[179:160]);
      end else if (idx >= 0) idx++;
      if (ac97_sync) synclen++;
      prev_sync = ac97_sync;
      if (idx >= 0 && idx < 256) begin
        got[255 - idx] = ac97_sdata_out;
        ac97_sdata_in = tx[255 - idx];
      end
    end
  end

  // in_slot3/4 after each frame
  always @(negedge ac97_bitclk) if (rst_b && ac97_strobe && codec_s3.size() > 1) begin
    // in_slot registers were updated at the strobe edge of the previous frame end
    void'(codec_s3.pop_front()); void'(codec_s4.pop_front());
  end
  always @(negedge ac97_bitclk) if (rst_b && ac97_strobe && frames > 1) begin
    // at the strobe the capture of the frame now ending happens at the next rising edge
    @(negedge ac97_bitclk);
    check(in_slot3 == codec_s3[0] && in_slot4 == codec_s4[0], "ADC slots captured");
  end

  initial begin
    repeat (3) @(negedge ac97_bitclk);
    check(!ac97_reset_b, "codec reset follows rst_b");
    rst_b = 1;
    wait (frames == 30);
    tb_finish();
  end
endmodule
