// csr_async_write: write a register that lives on a target clock (tclk) from the core clock
// (cclk), in the shape of a SPAM write.
//
// A one-cycle wr_strobe_cclk captures wr_data_cclk into a holding register and flips a request
// flag. The flag crosses to tclk through two flip-flops; one cycle after the target sees it
// change ("hold and sample") the held value is copied into wr_data_tclk, wr_strobe_tclk pulses
// for one cycle and an acknowledge flag flips. The acknowledge crosses back through two
// flip-flops and produces the one-cycle wr_done_strobe_cclk, which a peripheral ORs onto the
// SPAM busy_b line. wr_wait_cclk is high while a write is outstanding; a strobe then is ignored.
// wr_data_tclk holds RESET_VALUE after reset. Port list, reset-value parameter and the
// two-flop crossing follow the published description; the toggle flags are this design's choice.
module csr_async_write #(
  parameter int WIDTH = 32,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             cclk,
  input  logic             tclk,
  input  logic             rst_b_cclk,
  input  logic             rst_b_tclk,
  input  logic             wr_strobe_cclk,
  input  logic [WIDTH-1:0] wr_data_cclk,
  output logic             wr_wait_cclk,
  output logic             wr_done_strobe_cclk,
  output logic             wr_strobe_tclk,
  output logic [WIDTH-1:0] wr_data_tclk
);
  logic req_cclk, req_cclk_s1, req_cclk_tclk, req_seen_tclk, pend_tclk;
  logic ack_tclk, ack_tclk_s1, ack_tclk_cclk, ack_seen_cclk;
  logic [WIDTH-1:0] hold_cclk;

  assign wr_wait_cclk = (req_cclk != ack_seen_cclk);
  always_ff @(posedge cclk or negedge rst_b_cclk) begin
    if (!rst_b_cclk) begin
      req_cclk <= 1'b0; ack_tclk_s1 <= 1'b0; ack_tclk_cclk <= 1'b0; ack_seen_cclk <= 1'b0;
      wr_done_strobe_cclk <= 1'b0; hold_cclk <= RESET_VALUE;
    end else begin
      ack_tclk_s1   <= ack_tclk;
      ack_tclk_cclk <= ack_tclk_s1;
      wr_done_strobe_cclk <= 1'b0;
      if (wr_strobe_cclk && !wr_wait_cclk) begin
        req_cclk  <= ~req_cclk;
        hold_cclk <= wr_data_cclk;
      end
      if (ack_tclk_cclk != ack_seen_cclk) begin
        ack_seen_cclk <= ack_tclk_cclk;
        wr_done_strobe_cclk <= 1'b1;
      end
    end
  end

  always_ff @(posedge tclk or negedge rst_b_tclk) begin
    if (!rst_b_tclk) begin
      req_cclk_s1 <= 1'b0; req_cclk_tclk <= 1'b0; req_seen_tclk <= 1'b0; pend_tclk <= 1'b0;
      ack_tclk <= 1'b0; wr_strobe_tclk <= 1'b0; wr_data_tclk <= RESET_VALUE;
    end else begin
      req_cclk_s1   <= req_cclk;
      req_cclk_tclk <= req_cclk_s1;
      wr_strobe_tclk <= 1'b0;
      pend_tclk <= 1'b0;
      if (req_cclk_tclk != req_seen_tclk) begin
        req_seen_tclk <= req_cclk_tclk;
        pend_tclk <= 1'b1;
      end
      if (pend_tclk) begin
        wr_data_tclk   <= hold_cclk;
        wr_strobe_tclk <= 1'b1;
        ack_tclk       <= ~ack_tclk;
      end
    end
  end
endmodule
