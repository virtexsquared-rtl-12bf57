// fsab_arbiter_fifo: one master's "virtual slave" inside the FSAB arbiter.
//
// Outbound FSAB packets from a master (on the master's clock, iclk) are pushed into an
// async_fifo that also moves them to the slave's clock (oclk). To the master this block looks
// like a slave: it accepts up to CREDITS transactions and returns one credit for each
// transaction it has handed on. On oclk the arbiter asks for a transaction with a one-cycle
// start (only when avail is high); the block then streams the transaction's packets on pkt,
// one per cycle, and raises done together with the last packet
// (a read is one packet, a write is len packets). A start with nothing available is ignored.
// Credits go back through a 4-bit Gray-coded count of finished transactions, synchronized into
// iclk by two flip-flops; the master side pulses credit once per count step.
// avail only rises once every packet of the head transaction is in the FIFO (a Gray-coded
// count of whole transactions, updated one iclk cycle after the data), so that a write always
// leaves on consecutive cycles as FSAB requires, even from a slow master clock.
// The FIFO-based clock crossing and the start/done interface follow the published arbiter
// description; the Gray-coded credit return is this implementation's choice.
module fsab_arbiter_fifo
  import vs_pkg::*;
#(
  parameter int CREDITS = FSAB_CREDITS,
  localparam int DEPTH = 1 << $clog2(CREDITS * FSAB_MAX_LEN)
) (
  input  logic   iclk,
  input  logic   iclk_rst_b,
  input  fsabo_t in,
  output logic   credit,
  input  logic   oclk,
  input  logic   oclk_rst_b,
  output logic   avail,
  input  logic   start,
  output fsabo_t pkt,
  output logic   done
);
  localparam int W = $bits(fsabo_t) - 1;
  logic [W-1:0] rd_dat;
  logic empty, full, rd_en;
  logic active, out_valid, first_q;
  logic [FSAB_LEN_W-1:0] to_read, left, words;
  fsabo_t head;

  // Whole-transaction count, master clock side: a transaction may only start on the slave side
  // once every one of its packets is in the buffer, so that it leaves on consecutive cycles.
  logic [FSAB_LEN_W-1:0] wrem;
  logic [3:0] whole, whole_gray, whole_gray_s1, whole_gray_o, started;
  always_ff @(posedge iclk or negedge iclk_rst_b) begin
    if (!iclk_rst_b) begin
      wrem <= '0; whole <= '0; whole_gray <= '0;
    end else begin
      whole_gray <= bin2gray4(whole);   // one cycle behind the data, so the data are seen first
      if (in.valid) begin
        if (wrem == 0) begin
          if (in.mode == FSAB_WRITE && in.len > 1) wrem <= in.len - 1'b1;
          else whole <= whole + 1'b1;
        end else begin
          wrem <= wrem - 1'b1;
          if (wrem == 1) whole <= whole + 1'b1;
        end
      end
    end
  end
  always_ff @(posedge oclk or negedge oclk_rst_b) begin
    if (!oclk_rst_b) begin
      whole_gray_s1 <= '0; whole_gray_o <= '0; started <= '0;
    end else begin
      whole_gray_s1 <= whole_gray;
      whole_gray_o  <= whole_gray_s1;
      if (start && avail) started <= started + 1'b1;
    end
  end

  async_fifo #(.DEPTH(DEPTH), .WIDTH(W)) u_fifo (
    .iclk(iclk), .oclk(oclk), .iclk_rst_b(iclk_rst_b), .oclk_rst_b(oclk_rst_b),
    .wr_en(in.valid), .rd_en(rd_en), .wr_dat(in[W-1:0]), .rd_dat(rd_dat),
    .empty(empty), .full(full));

  assign head  = {1'b1, rd_dat};
  assign words = (head.mode == FSAB_WRITE) ? head.len : FSAB_LEN_W'(1);
  assign left  = first_q ? (words - 1'b1) : to_read;
  assign avail = !active && !empty && (whole_gray_o != bin2gray4(started));
  assign rd_en = !empty && (active ? (left != 0) : (start && avail));
  assign done  = active && out_valid && (left == 0);
  assign pkt   = out_valid ? head : '0;

  logic [3:0] done_cnt, done_gray;
  always_ff @(posedge oclk or negedge oclk_rst_b) begin
    if (!oclk_rst_b) begin
      active <= 1'b0; out_valid <= 1'b0; first_q <= 1'b0; to_read <= '0;
      done_cnt <= '0; done_gray <= '0;
    end else begin
      out_valid <= rd_en;
      if (!active) begin
        if (start && avail) begin
          active  <= 1'b1;
          first_q <= 1'b1;
        end
      end else begin
        first_q <= 1'b0;   // the start packet is on pkt in the first active cycle
        to_read <= left - FSAB_LEN_W'(rd_en);
        if (done) begin
          active    <= 1'b0;
          done_cnt  <= done_cnt + 1'b1;
          done_gray <= bin2gray4(done_cnt + 1'b1);
        end
      end
    end
  end

  // credit return on the master clock
  logic [3:0] gray_s1, gray_iclk, seen, seen_gray;
  always_ff @(posedge iclk or negedge iclk_rst_b) begin
    if (!iclk_rst_b) begin
      gray_s1 <= '0; gray_iclk <= '0; seen <= '0; seen_gray <= '0; credit <= 1'b0;
    end else begin
      gray_s1   <= done_gray;
      gray_iclk <= gray_s1;
      credit    <= 1'b0;
      if (gray_iclk != seen_gray) begin
        seen      <= seen + 1'b1;
        seen_gray <= bin2gray4(seen + 1'b1);
        credit    <= 1'b1;
      end
    end
  end

  // A master may never push into a full buffer: it has spent all its credits by then.
  a_no_overflow: assert property (@(posedge iclk) disable iff (!iclk_rst_b) !(in.valid && full));
endmodule
