// spam_sysace: bridge from the SPAM bus to the microprocessor (MPU) port of a Xilinx SystemACE
// CompactFlash controller.
//
// The SystemACE registers appear as SPAM device 3 (0x8300_0000), one 16-bit register per
// 32-bit word: SystemACE address bit 0 is SPAM address bit 2, and so on (7 address bits).
// A SPAM access is captured on the core clock (direction, address, data) and handed to the
// SystemACE clock domain with a toggle flag through two flip-flops, as in the CSR
// synchronizers. There a seven-state sequencer drives the MPU bus so that setup and hold times
// are met: IDLE, SETUP (address and chip enable, write data driven), STROBE (write or output
// enable low), HOLD (strobe kept low), SAMPLE (read data captured, strobe released), RELEASE
// (chip enable released, data bus released), ACK (acknowledge flag flipped). The acknowledge
// returns through two flip-flops, and the core side then answers the SPAM request with busy_b
// and, for a read, the 16 bits read, zero-extended.
// The bidirectional data bus is split into mpd_i, mpd_o and mpd_oe for an I/O buffer outside.
// Address mapping, the synchronizer scheme and the seven-state sequencer follow the published
// description; the individual states and the one-clock-per-state timing are this design's.
module spam_sysace
  import vs_pkg::*;
(
  input  logic        cclk,
  input  logic        cclk_rst_b,
  input  spamo_t      spamo,
  output spami_t      spami,
  input  logic        sysace_clk,
  input  logic        sysace_rst_b,
  output logic [6:0]  sysace_mpa,
  input  logic [15:0] sysace_mpd_i,
  output logic [15:0] sysace_mpd_o,
  output logic        sysace_mpd_oe,
  output logic        sysace_mpce_b,
  output logic        sysace_mpwe_b,
  output logic        sysace_mpoe_b
);
  // core side
  logic req_tog, ack_s1, ack_s2, ack_seen, busy_q, done, ack_tog;
  logic r_nw_q;
  logic [6:0] addr_q;
  logic [15:0] wdata_q, rdata_s;
  assign done = busy_q && (ack_s2 != ack_seen);
  always_ff @(posedge cclk or negedge cclk_rst_b) begin
    if (!cclk_rst_b) begin
      req_tog <= 1'b0; ack_s1 <= 1'b0; ack_s2 <= 1'b0; ack_seen <= 1'b0; busy_q <= 1'b0;
      r_nw_q <= 1'b0; addr_q <= '0; wdata_q <= '0;
    end else begin
      ack_s1 <= ack_tog;
      ack_s2 <= ack_s1;
      if (spamo.valid && spamo.did == SPAM_DID_SYSACE && !busy_q) begin
        r_nw_q  <= spamo.r_nw;
        addr_q  <= spamo.addr[8:2];
        wdata_q <= spamo.data[15:0];
        req_tog <= ~req_tog;
        busy_q  <= 1'b1;
      end
      if (done) begin
        ack_seen <= ack_s2;
        busy_q   <= 1'b0;
      end
    end
  end
  assign spami.busy_b = done;
  assign spami.data   = (done && r_nw_q) ? {16'h0, rdata_s} : 32'h0;

  // SystemACE side
  typedef enum logic [2:0] {A_IDLE, A_SETUP, A_STROBE, A_HOLD, A_SAMPLE, A_RELEASE, A_ACK} astate_e;
  astate_e state;
  logic req_s1, req_s2, req_seen;
  always_ff @(posedge sysace_clk or negedge sysace_rst_b) begin
    if (!sysace_rst_b) begin
      state <= A_IDLE; req_s1 <= 1'b0; req_s2 <= 1'b0; req_seen <= 1'b0; ack_tog <= 1'b0;
      sysace_mpa <= '0; sysace_mpd_o <= '0; sysace_mpd_oe <= 1'b0; sysace_mpce_b <= 1'b1;
      sysace_mpwe_b <= 1'b1; sysace_mpoe_b <= 1'b1; rdata_s <= '0;
    end else begin
      req_s1 <= req_tog;
      req_s2 <= req_s1;
      case (state)
        A_IDLE: if (req_s2 != req_seen) begin
          req_seen      <= req_s2;
          sysace_mpa    <= addr_q;
          sysace_mpd_o  <= wdata_q;
          sysace_mpd_oe <= !r_nw_q;
          sysace_mpce_b <= 1'b0;
          state <= A_SETUP;
        end
        A_SETUP: begin
          if (r_nw_q) sysace_mpoe_b <= 1'b0;
          else        sysace_mpwe_b <= 1'b0;
          state <= A_STROBE;
        end
        A_STROBE: state <= A_HOLD;
        A_HOLD: begin
          if (r_nw_q) rdata_s <= sysace_mpd_i;
          sysace_mpoe_b <= 1'b1;
          sysace_mpwe_b <= 1'b1;
          state <= A_SAMPLE;
        end
        A_SAMPLE: begin
          sysace_mpce_b <= 1'b1;
          state <= A_RELEASE;
        end
        A_RELEASE: begin
          sysace_mpd_oe <= 1'b0;
          state <= A_ACK;
        end
        A_ACK: begin
          ack_tog <= ~ack_tog;
          state <= A_IDLE;
        end
        default: state <= A_IDLE;
      endcase
    end
  end
endmodule
