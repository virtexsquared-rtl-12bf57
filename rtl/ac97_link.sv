// ac97_link: AC'97 serial link controller (controller side of the codec link).
//
// Runs on the codec's 12.288 MHz bit clock. A frame is 256 bits: a 16-bit tag slot (frame
// valid, then one valid bit per slot 1..12, then a 3-bit codec id of 0) followed by twelve
// 20-bit slots, sent MSB first. ac97_sync is high during the 16 tag bits. Output bits change on
// the rising bit-clock edge (the codec samples them on the falling edge). Slots 1-4 (command
// address, command data, left PCM, right PCM) are loaded from out_slotN / out_slotN_valid when
// ac97_strobe pulses, in the last bit of the previous frame; the others are sent as zero.
// From the codec, the tag and slots 3/4 (ADC samples) are captured into in_slot3/in_slot4 at
// the end of each frame. ac97_reset_b follows rst_b. Frame layout is the AC'97 standard; the
// module name and its slot interface follow the published audio description, the rest is
// this design's choice.
// Lint: the last received bit of a frame is never needed (it belongs to an unused slot).
module ac97_link (
  input  logic        ac97_bitclk,
  input  logic        rst_b,
  output logic        ac97_sync,
  output logic        ac97_sdata_out,
  input  logic        ac97_sdata_in,
  output logic        ac97_reset_b,
  output logic        ac97_strobe,
  input  logic [19:0] out_slot1, input logic out_slot1_valid,
  input  logic [19:0] out_slot2, input logic out_slot2_valid,
  input  logic [19:0] out_slot3, input logic out_slot3_valid,
  input  logic [19:0] out_slot4, input logic out_slot4_valid,
  output logic [19:0] in_slot3,
  output logic [19:0] in_slot4
);
  logic [7:0]   bitn;          // bit of the frame being sent now
  logic [255:0] frame, nframe, rx;

  always_comb begin
    nframe = '0;
    nframe[255]     = 1'b1;
    nframe[254:251] = {out_slot1_valid, out_slot2_valid, out_slot3_valid, out_slot4_valid};
    nframe[239:220] = out_slot1;
    nframe[219:200] = out_slot2;
    nframe[199:180] = out_slot3;
    nframe[179:160] = out_slot4;
  end

  assign ac97_strobe  = (bitn == 8'd255);
  assign ac97_reset_b = rst_b;

  always_ff @(posedge ac97_bitclk or negedge rst_b) begin
    if (!rst_b) begin
      bitn <= 8'd255; frame <= '0; rx <= '0; ac97_sync <= 1'b0; ac97_sdata_out <= 1'b0;
      in_slot3 <= '0; in_slot4 <= '0;
    end else begin
      bitn <= bitn + 1'b1;
      rx   <= {rx[254:0], ac97_sdata_in};
      if (ac97_strobe) begin
        frame <= {nframe[254:0], 1'b0};
        ac97_sdata_out <= nframe[255];
        in_slot3 <= rx[198:179];
        in_slot4 <= rx[178:159];
      end else begin
        frame <= {frame[254:0], 1'b0};
        ac97_sdata_out <= frame[255];
      end
      ac97_sync <= (bitn == 8'd255) || (bitn < 8'd15);
    end
  end
endmodule
