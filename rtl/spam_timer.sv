// spam_timer: free-running 32-bit count of core clock cycles since reset, readable over SPAM.
//
// Any SPAM read of device 6 (0x8600_0000) is answered in the next cycle with the counter value
// sampled in the request cycle; writes are acknowledged and ignored. The counter wraps after
// 2^32 cycles. As published; the one-cycle answer is this design's choice.
// Lint: the timer answers any access to its device, so SPAM address and data bits are unused.
module spam_timer
  import vs_pkg::*;
(
  input  logic   clk,
  input  logic   rst_b,
  input  spamo_t spamo,
  output spami_t spami
);
  logic [31:0] count, sample;
  logic ack, rd;
  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      count <= '0; sample <= '0; ack <= 1'b0; rd <= 1'b0;
    end else begin
      count <= count + 32'd1;
      ack <= spamo.valid && spamo.did == SPAM_DID_TIMER;
      rd  <= spamo.valid && spamo.did == SPAM_DID_TIMER && spamo.r_nw;
      sample <= count;
    end
  end
  assign spami.busy_b = ack;
  assign spami.data   = rd ? sample : 32'h0;
endmodule
