// accel_blit: block-copy ("blit") accelerator, an FSAB read and write master.
//
// SPAM registers (device 8, low five address bits): 0x00 read start address (64-byte aligned),
// 0x04 read length in 64-byte packets (writing a non-zero value starts the copy), 0x08 write
// start address, 0x0C write row length in 64-byte packets, 0x10 write row stride in bytes,
// 0x14 number of 64-byte packets written (read/write; software polls it). All but 0x14 are
// write only. They cross to the FSAB clock with csr_async_write / csr_async_read.
// The engine repeats three steps until the read length is used up: (1) read 64 bytes (one
// 8-word FSAB read) from the read address and advance it by 64; (2) write those 64 bytes to the
// write address as one 8-word FSAB write; (3) advance the write address by 64, or, when a row
// of "row length" packets is complete, move it to the start of the next row (row start plus
// stride). The source is thus a packed image and the destination a window in a larger one.
// The three steps and the register map follow the published description; one block in flight
// at a time is this design's choice.
// Lint: the subdid field of fsabi and the high bits of the synchronized register index are unused by design.
module accel_blit
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
  output fsabo_t accel_blit__fsabo,
  input  logic   accel_blit__fsabo_credit,
  input  fsabi_t fsabi
);
  logic sel, wr, rd;
  logic [4:0] ra;
  assign sel = spamo.valid && spamo.did == SPAM_DID_BLIT;
  assign wr  = sel && !spamo.r_nw;
  assign rd  = sel && spamo.r_nw;
  assign ra  = spamo.addr[4:0];

  logic [31:0] w_data_f [6];
  logic [5:0]  w_strobe_f, w_done;
  logic [30:0] rd_data_WRDONE, wrdone;
  logic rd_done_strobe_WRDONE, d_other;
  for (genvar i = 0; i < 6; i++) begin : g_wr
    csr_async_write #(.WIDTH(32)) u_w (
      .cclk(cclk), .tclk(fsabi_clk), .rst_b_cclk(cclk_rst_b), .rst_b_tclk(fsabi_rst_b),
      .wr_strobe_cclk(wr && ra == 5'(i * 4)), .wr_data_cclk(spamo.data), .wr_wait_cclk(),
      .wr_done_strobe_cclk(w_done[i]), .wr_strobe_tclk(w_strobe_f[i]), .wr_data_tclk(w_data_f[i]));
  end
  csr_async_read #(.WIDTH(31)) u_r_wrdone (
    .cclk(cclk), .tclk(fsabi_clk), .rst_b_cclk(cclk_rst_b), .rst_b_tclk(fsabi_rst_b),
    .rd_strobe_cclk(rd && ra == 5'h14), .rd_data_cclk(rd_data_WRDONE), .rd_wait_cclk(),
    .rd_done_strobe_cclk(rd_done_strobe_WRDONE), .rd_strobe_tclk(), .rd_data_tclk(wrdone));
  always_ff @(posedge cclk or negedge cclk_rst_b) begin
    if (!cclk_rst_b) d_other <= 1'b0;
    else d_other <= sel && !(wr && ra <= 5'h14 && ra[1:0] == 2'b00) && !(rd && ra == 5'h14);
  end
  assign spami.busy_b = (|w_done) | rd_done_strobe_WRDONE | d_other;
  assign spami.data   = {32{rd_done_strobe_WRDONE}} & {1'b0, rd_data_WRDONE};

  // engine
  typedef enum logic [1:0] {B_IDLE, B_READ, B_WRITE} bstate_e;
  bstate_e state;
  logic [30:0] raddr, waddr, row_start, remaining, col;
  logic [63:0] buf_q [8];
  logic [2:0]  rbeat, wbeat;
  logic [$clog2(CREDITS+1)-1:0] credits;
  logic rd_issue, wr_issue, wr_send, wr_started;

  assign rd_issue = (state == B_IDLE) && remaining != 0 && credits != 0 && !w_strobe_f[1];
  assign wr_issue = (state == B_WRITE) && wbeat == 3'd0 && credits != 0 && !wr_started;
  assign wr_send  = wr_issue || (state == B_WRITE && wr_started);

  always_comb begin
    accel_blit__fsabo = '0;
    if (rd_issue) begin
      accel_blit__fsabo.valid = 1'b1;
      accel_blit__fsabo.mode  = FSAB_READ;
      accel_blit__fsabo.did   = DID_BLIT;
      accel_blit__fsabo.addr  = {raddr[30:6], 6'b0};
      accel_blit__fsabo.len   = 4'd8;
    end else if (wr_send) begin
      accel_blit__fsabo.valid = 1'b1;
      accel_blit__fsabo.mode  = FSAB_WRITE;
      accel_blit__fsabo.did   = DID_BLIT;
      accel_blit__fsabo.addr  = {waddr[30:6], 6'b0};
      accel_blit__fsabo.len   = 4'd8;
      accel_blit__fsabo.data  = buf_q[wbeat];
      accel_blit__fsabo.mask  = 8'hFF;
    end
  end

  always_ff @(posedge fsabi_clk) begin
    if (state == B_READ && fsabi.valid && fsabi.did == DID_BLIT) buf_q[rbeat] <= fsabi.data;
  end

  always_ff @(posedge fsabi_clk or negedge fsabi_rst_b) begin
    if (!fsabi_rst_b) begin
      state <= B_IDLE; raddr <= '0; waddr <= '0; row_start <= '0; remaining <= '0; col <= '0;
      rbeat <= '0; wbeat <= '0; wrdone <= '0; wr_started <= 1'b0;
      credits <= ($clog2(CREDITS+1))'(CREDITS);
    end else begin
      credits <= credits - ($clog2(CREDITS+1))'(rd_issue || wr_issue)
                         + ($clog2(CREDITS+1))'(accel_blit__fsabo_credit);
      if (w_strobe_f[0]) raddr <= w_data_f[0][30:0];
      if (w_strobe_f[2]) begin waddr <= w_data_f[2][30:0]; row_start <= w_data_f[2][30:0]; col <= '0; end
      if (w_strobe_f[5]) wrdone <= w_data_f[5][30:0];
      if (w_strobe_f[1]) remaining <= w_data_f[1][30:0];
      case (state)
        B_IDLE: if (rd_issue) begin
          state <= B_READ;
          rbeat <= '0;
          raddr <= raddr + 31'd64;
        end
        B_READ: if (fsabi.valid && fsabi.did == DID_BLIT) begin
          rbeat <= rbeat + 1'b1;
          if (rbeat == 3'd7) begin
            state <= B_WRITE;
            wbeat <= '0;
          end
        end
        B_WRITE: if (wr_send) begin
          wr_started <= (wbeat != 3'd7);
          wbeat <= wbeat + 1'b1;
          if (wbeat == 3'd7) begin
            state     <= B_IDLE;
            remaining <= remaining - 31'd1;
            wrdone    <= wrdone + 31'd1;
            if (col + 31'd1 == w_data_f[3][30:0]) begin
              col       <= '0;
              row_start <= row_start + w_data_f[4][30:0];
              waddr     <= row_start + w_data_f[4][30:0];
            end else begin
              col   <= col + 31'd1;
              waddr <= waddr + 31'd64;
            end
          end
        end
        default: state <= B_IDLE;
      endcase
    end
  end
endmodule
