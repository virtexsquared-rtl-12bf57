// spam_console_io: serial console on the SPAM bus.
//
// A SPAM write to device 0 (0x8000_0000) sends the low byte of the data through rs232_tx; the
// write is acknowledged (busy_b) only once the transmitter has accepted the byte, so a program
// that writes characters back to back is paced by the serial line. A SPAM read returns 1 in
// bit 0 while the transmitter is busy. The console device and its serial transmitter appear in
// the published system diagram; their register layout is this design's choice.
// Lint: only the low byte of the SPAM write data is sent, so the upper data bits are unused.
module spam_console_io
  import vs_pkg::*;
#(
  parameter int CLKS_PER_BIT = 868
) (
  input  logic   clk,
  input  logic   rst_b,
  input  spamo_t spamo,
  output spami_t spami,
  output logic   txd
);
  logic busy, pend, wr_en, ack, rd_ack, busy_d;
  logic [7:0] byte_q;
  assign wr_en = pend && !busy;

  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      pend <= 1'b0; byte_q <= '0; ack <= 1'b0; rd_ack <= 1'b0; busy_d <= 1'b0;
    end else begin
      ack <= 1'b0;
      rd_ack <= spamo.valid && spamo.r_nw && spamo.did == SPAM_DID_CONSOLE;
      busy_d <= busy;
      if (spamo.valid && !spamo.r_nw && spamo.did == SPAM_DID_CONSOLE) begin
        pend   <= 1'b1;
        byte_q <= spamo.data[7:0];
      end else if (wr_en) begin
        pend <= 1'b0;
        ack  <= 1'b1;
      end
    end
  end

  rs232_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk(clk), .rst_b(rst_b), .wr_en(wr_en), .wr_data(byte_q), .busy(busy), .txd(txd));

  assign spami.busy_b = ack | rd_ack;
  assign spami.data   = rd_ack ? {31'h0, busy_d} : 32'h0;
endmodule
