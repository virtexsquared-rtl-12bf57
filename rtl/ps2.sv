// ps2: PS/2 keyboard receiver; scancodes are read one at a time over the SPAM bus.
//
// ps2clk and ps2data are asynchronous, so both pass through two flip-flops on the core clock.
// A falling edge of the synchronized ps2clk (seen because the core clock is much faster) shifts
// in one bit of the 11-bit frame {start, 8 data bits LSB first, odd parity, stop}. After the
// eleventh bit the frame is checked (start 0, stop 1, odd parity over data and parity bit) and
// the scancode is pushed into a FIFO of FIFO_DEPTH entries; a bad frame is dropped.
// A SPAM read of device 5 (0x8500_0000) answers on the next cycle: 0xFFFF_FFFF when the FIFO is
// empty, otherwise the oldest scancode zero-extended, which is removed. SPAM writes are
// acknowledged and ignored. Receive-only, as in the published design; the FIFO depth and the
// handling of bad frames are this design's choices.
// Lint: only the valid and r_w bits of the SPAM request are needed (any read of the device pops), and the
// last shifted-out bit of the frame register is never read; the unused-signal warnings are expected.
module ps2
  import vs_pkg::*;
#(
  parameter int FIFO_DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_b,
  input  spamo_t spamo,
  output spami_t spami,
  input  logic   ps2clk,
  input  logic   ps2data
);
  logic clk_s1, clk_s2, clk_s3, dat_s1, dat_s2;
  logic [10:0] shreg;
  logic [3:0]  nbits;
  logic push, fall;
  assign fall = clk_s3 && !clk_s2;

  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      clk_s1 <= 1'b1; clk_s2 <= 1'b1; clk_s3 <= 1'b1; dat_s1 <= 1'b1; dat_s2 <= 1'b1;
      shreg <= '0; nbits <= '0; push <= 1'b0;
    end else begin
      clk_s1 <= ps2clk;  clk_s2 <= clk_s1; clk_s3 <= clk_s2;
      dat_s1 <= ps2data; dat_s2 <= dat_s1;
      push <= 1'b0;
      if (fall) begin
        shreg <= {dat_s2, shreg[10:1]};
        if (nbits == 4'd10) begin
          nbits <= '0;
          // shreg[10:1] holds start..parity; dat_s2 is the stop bit
          push <= !shreg[1] && dat_s2 && (^shreg[10:2]);
        end else begin
          nbits <= nbits + 1'b1;
        end
      end
    end
  end

  logic [7:0] code;
  logic empty, rd, rd_d, was_empty, wr_ack;
  logic [7:0] scancode;
  assign scancode = shreg[8:1];   // frame fully shifted in when push is high
  fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(8)) u_fifo (
    .clk(clk), .rst_b(rst_b), .wr_en(push), .rd_en(rd), .wr_dat(scancode), .rd_dat(code),
    .empty(empty), .full(), .available(), .afull(), .aempty());

  assign rd = spamo.valid && spamo.r_nw && spamo.did == SPAM_DID_PS2;
  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      rd_d <= 1'b0; was_empty <= 1'b0; wr_ack <= 1'b0;
    end else begin
      rd_d      <= rd;
      was_empty <= empty;
      wr_ack    <= spamo.valid && !spamo.r_nw && spamo.did == SPAM_DID_PS2;
    end
  end
  assign spami.busy_b = rd_d | wr_ack;
  assign spami.data   = !rd_d ? 32'h0 : (was_empty ? 32'hFFFF_FFFF : {24'h0, code});
endmodule
