// ac97_conf: keeps the codec's mixer registers equal to the values set by software.
//
// Seven 16-bit settings (master, microphone, line-in, CD and PCM volume, record select and
// record gain) are held here on the AC'97 bit clock. They are written with wr_en/wr_idx/wr_data
// (index 0..6 in that order). On every frame strobe the block presents the next setting in
// round-robin order as a codec register write on slot 1 (bit 19 = 0 for write, bits 18:12 =
// register address) and slot 2 (value in bits 19:4), so every register is rewritten every
// seven frames and a new value reaches the codec within eight frames.
// The list of settings follows the published audio register map; the codec register addresses
// (0x02, 0x0E, 0x10, 0x12, 0x18, 0x1A, 0x1C) are those of the AC'97 standard; the reset values
// (volumes at 0 dB except PCM at -12 dB, microphone muted) are this design's choice.
module ac97_conf (
  input  logic        ac97_bitclk,
  input  logic        rst_b,
  input  logic        ac97_strobe,
  input  logic        wr_en,
  input  logic [2:0]  wr_idx,
  input  logic [15:0] wr_data,
  output logic [19:0] out_slot1,
  output logic        out_slot1_valid,
  output logic [19:0] out_slot2,
  output logic        out_slot2_valid
);
  localparam logic [6:0] REG_ADDR [7] = '{7'h02, 7'h0E, 7'h10, 7'h12, 7'h18, 7'h1A, 7'h1C};
  localparam logic [15:0] REG_RESET [7] = '{16'h0000, 16'h8008, 16'h0808, 16'h0808, 16'h0808, 16'h0000, 16'h0000};
  logic [15:0] regs [7];
  logic [2:0]  cur;

  always_ff @(posedge ac97_bitclk or negedge rst_b) begin
    if (!rst_b) begin
      for (int i = 0; i < 7; i++) regs[i] <= REG_RESET[i];
      cur <= '0;
    end else begin
      if (wr_en && wr_idx < 3'd7) regs[wr_idx] <= wr_data;
      if (ac97_strobe) cur <= (cur == 3'd6) ? '0 : cur + 1'b1;
    end
  end

  assign out_slot1 = {1'b0, REG_ADDR[cur], 12'h000};
  assign out_slot2 = {regs[cur], 4'h0};
  assign out_slot1_valid = 1'b1;
  assign out_slot2_valid = 1'b1;
endmodule
