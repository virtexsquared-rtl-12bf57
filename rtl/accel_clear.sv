// accel_clear: memory-set ("screen clear") accelerator, an FSAB write master.
//
// SPAM registers (device 7, low four address bits): 0x0 the 32-bit fill value (write only),
// 0x4 the start address (write only, 64-byte aligned), 0x8 the number of 8-byte FSAB packets
// to write (read/write). Writing a non-zero packet count starts the fill; reading the count
// returns the packets still to be sent, so software polls it until it reads zero.
// The registers cross from the core clock to the FSAB clock with csr_async_write /
// csr_async_read. On the FSAB clock the engine sends write transactions of up to 8 packets
// (64 bytes, so each stays within one aligned block), each packet carrying the fill value in
// both 32-bit halves with a full mask, whenever it holds a credit, advancing the address by 8
// bytes per packet. A transaction is sent on consecutive cycles.
// Function and register map follow the published description; the credit count is this
// design's choice, and so is the rule that a count written while a transaction is being sent
// is ignored (software waits for zero before starting the next fill).
module accel_clear
  import vs_pkg::*;
#(
  parameter int CREDITS = FSAB_CREDITS
) (
  input  logic   cclk,
  input  logic   cclk_rst_b,
  input  spamo_t spamo,
  output spami_t spami,
  input  logic   fsabi_clk,
  input  logic   fsabi_rst_b,
  output fsabo_t accel_clear__fsabo,
  input  logic   accel_clear__fsabo_credit
);
  logic sel, wr, rd;
  assign sel = spamo.valid && spamo.did == SPAM_DID_CLEAR;
  assign wr  = sel && !spamo.r_nw;
  assign rd  = sel && spamo.r_nw;

  logic [31:0] value_f, start_f, num_w_f, num_rd;
  logic num_strobe_f, start_strobe_f, d_val, d_start, d_num, d_rd, d_other;
  csr_async_write #(.WIDTH(32)) u_w_val (
    .cclk(cclk), .tclk(fsabi_clk), .rst_b_cclk(cclk_rst_b), .rst_b_tclk(fsabi_rst_b),
    .wr_strobe_cclk(wr && spamo.addr[3:0] == 4'h0), .wr_data_cclk(spamo.data), .wr_wait_cclk(),
    .wr_done_strobe_cclk(d_val), .wr_strobe_tclk(), .wr_data_tclk(value_f));
  csr_async_write #(.WIDTH(32)) u_w_start (
    .cclk(cclk), .tclk(fsabi_clk), .rst_b_cclk(cclk_rst_b), .rst_b_tclk(fsabi_rst_b),
    .wr_strobe_cclk(wr && spamo.addr[3:0] == 4'h4), .wr_data_cclk(spamo.data), .wr_wait_cclk(),
    .wr_done_strobe_cclk(d_start), .wr_strobe_tclk(start_strobe_f), .wr_data_tclk(start_f));
  csr_async_write #(.WIDTH(32)) u_w_num (
    .cclk(cclk), .tclk(fsabi_clk), .rst_b_cclk(cclk_rst_b), .rst_b_tclk(fsabi_rst_b),
    .wr_strobe_cclk(wr && spamo.addr[3:0] == 4'h8), .wr_data_cclk(spamo.data), .wr_wait_cclk(),
    .wr_done_strobe_cclk(d_num), .wr_strobe_tclk(num_strobe_f), .wr_data_tclk(num_w_f));

  logic [31:0] num, addr;
  csr_async_read #(.WIDTH(32)) u_r_num (
    .cclk(cclk), .tclk(fsabi_clk), .rst_b_cclk(cclk_rst_b), .rst_b_tclk(fsabi_rst_b),
    .rd_strobe_cclk(rd && spamo.addr[3:0] == 4'h8), .rd_data_cclk(num_rd), .rd_wait_cclk(),
    .rd_done_strobe_cclk(d_rd), .rd_strobe_tclk(), .rd_data_tclk(num));

  always_ff @(posedge cclk or negedge cclk_rst_b) begin
    if (!cclk_rst_b) d_other <= 1'b0;
    else d_other <= sel && !(wr && (spamo.addr[3:0] == 4'h0 || spamo.addr[3:0] == 4'h4 ||
                                    spamo.addr[3:0] == 4'h8)) && !(rd && spamo.addr[3:0] == 4'h8);
  end
  assign spami.busy_b = d_val | d_start | d_num | d_rd | d_other;
  assign spami.data   = num_rd;

  // FSAB engine
  logic [$clog2(CREDITS+1)-1:0] credits;
  logic [3:0] beat, tlen, txn_len;
  logic in_txn, start;
  assign tlen  = (num >= 32'd8) ? 4'd8 : num[3:0];
  assign start = !in_txn && num != 0 && credits != 0 && !num_strobe_f;

  always_comb begin
    accel_clear__fsabo = '0;
    if (start || in_txn) begin
      accel_clear__fsabo.valid  = 1'b1;
      accel_clear__fsabo.mode   = FSAB_WRITE;
      accel_clear__fsabo.did    = DID_CLEAR;
      accel_clear__fsabo.addr   = {addr[30:3], 3'b000};
      accel_clear__fsabo.len    = tlen;
      accel_clear__fsabo.data   = {value_f, value_f};
      accel_clear__fsabo.mask   = 8'hFF;
    end
  end

  always_ff @(posedge fsabi_clk or negedge fsabi_rst_b) begin
    if (!fsabi_rst_b) begin
      credits <= ($clog2(CREDITS+1))'(CREDITS); beat <= '0; in_txn <= 1'b0; num <= '0; addr <= '0;
    end else begin
      credits <= credits - ($clog2(CREDITS+1))'(start) + ($clog2(CREDITS+1))'(accel_clear__fsabo_credit);
      if (start_strobe_f) addr <= start_f;
      if (num_strobe_f && !in_txn) begin
        num <= num_w_f;
        addr <= start_strobe_f ? start_f : addr;
      end else if (start || in_txn) begin
        num  <= num - 32'd1;
        addr <= addr + 32'd8;
        beat <= start ? 4'd1 : beat + 4'd1;
        in_txn <= start ? (tlen != 4'd1) : (beat + 4'd1 != txn_len);
      end
    end
  end

  always_ff @(posedge fsabi_clk or negedge fsabi_rst_b) begin
    if (!fsabi_rst_b) txn_len <= '0;
    else if (start) txn_len <= tlen;
  end
endmodule
