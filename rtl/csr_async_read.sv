// csr_async_read: read a register that lives on a target clock (tclk) from the core clock
// (cclk), in the shape of a SPAM read.
//
// A one-cycle rd_strobe_cclk flips a request flag. The flag crosses to tclk through two
// flip-flops; when the target sees it change it pulses rd_strobe_tclk for one cycle, waits one
// cycle, samples rd_data_tclk into a holding register and flips an acknowledge flag
// ("hold and sample"). The acknowledge crosses back through two flip-flops; on its change the
// core side copies the (long stable) holding register to rd_data_cclk and pulses
// rd_done_strobe_cclk in the same cycle, so the two can be ORed straight onto the SPAM bus.
// rd_wait_cclk is high from the strobe until the done strobe. rd_data_cclk is zero except in
// the done cycle. A strobe while a read is outstanding is ignored.
// The port list, the two-flop crossing and hold-and-sample follow the published description;
// the toggle encoding of the request and acknowledge flags is this implementation's choice.
// Latency: about 2 tclk + 3 cclk cycles.
module csr_async_read #(
  parameter int WIDTH = 32
) (
  input  logic             cclk,
  input  logic             tclk,
  input  logic             rst_b_cclk,
  input  logic             rst_b_tclk,
  input  logic             rd_strobe_cclk,
  output logic [WIDTH-1:0] rd_data_cclk,
  output logic             rd_wait_cclk,
  output logic             rd_done_strobe_cclk,
  output logic             rd_strobe_tclk,
  input  logic [WIDTH-1:0] rd_data_tclk
);
  logic req_cclk, req_cclk_s1, req_cclk_tclk, req_seen_tclk, sample_tclk;
  logic ack_tclk, ack_tclk_s1, ack_tclk_cclk, ack_seen_cclk;
  logic [WIDTH-1:0] hold_tclk, data_q;

  // core side
  assign rd_wait_cclk = (req_cclk != ack_seen_cclk);
  always_ff @(posedge cclk or negedge rst_b_cclk) begin
    if (!rst_b_cclk) begin
      req_cclk <= 1'b0; ack_tclk_s1 <= 1'b0; ack_tclk_cclk <= 1'b0; ack_seen_cclk <= 1'b0;
      rd_done_strobe_cclk <= 1'b0; data_q <= '0;
    end else begin
      ack_tclk_s1   <= ack_tclk;
      ack_tclk_cclk <= ack_tclk_s1;
      rd_done_strobe_cclk <= 1'b0;
      data_q <= '0;
      if (rd_strobe_cclk && !rd_wait_cclk) req_cclk <= ~req_cclk;
      if (ack_tclk_cclk != ack_seen_cclk) begin
        ack_seen_cclk <= ack_tclk_cclk;
        rd_done_strobe_cclk <= 1'b1;
        data_q <= hold_tclk;
      end
    end
  end
  assign rd_data_cclk = data_q;

  // target side
  assign rd_strobe_tclk = (req_cclk_tclk != req_seen_tclk);
  always_ff @(posedge tclk or negedge rst_b_tclk) begin
    if (!rst_b_tclk) begin
      req_cclk_s1 <= 1'b0; req_cclk_tclk <= 1'b0; req_seen_tclk <= 1'b0;
      sample_tclk <= 1'b0; ack_tclk <= 1'b0; hold_tclk <= '0;
    end else begin
      req_cclk_s1   <= req_cclk;
      req_cclk_tclk <= req_cclk_s1;
      sample_tclk   <= rd_strobe_tclk;
      if (rd_strobe_tclk) req_seen_tclk <= req_cclk_tclk;
      if (sample_tclk) begin
        hold_tclk <= rd_data_tclk;
        ack_tclk  <= ~ack_tclk;
      end
    end
  end
endmodule
