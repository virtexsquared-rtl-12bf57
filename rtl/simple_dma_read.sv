// simple_dma_read: streams a linear range of main memory to a peripheral through a FIFO.
//
// Three clock domains. On the core clock (cclk) it is a SPAM slave with six registers (low five
// address bits): 0x00 next start address, 0x04 next length in bytes, 0x08 command (write only,
// STOP / TRIGGER_ONCE / AUTOTRIGGER), 0x0c bytes read into the FIFO since the last trigger,
// 0x10 bytes delivered to the peripheral since reset, 0x14 start address of the transfer in
// progress (read only). Writes and reads cross into the other domains with csr_async_write and
// csr_async_read. On the FSAB clock, a triggered transfer copies next start/length into the
// current transfer and issues FSAB reads of up to 8 words (64 bytes), as long as it holds a
// credit and the FIFO has room for the whole block. Returned words are written at fifo_wpos;
// only when a block is complete is the new write position published (Gray-coded, two
// flip-flops) to the target clock, where the peripheral pops words with request: the word
// appears on data one target clock later. data_ready is high while words are available and
// fifo_empty is its complement. After the last block has arrived the transfer ends; with
// AUTOTRIGGER it starts again at once from next start/length, with TRIGGER_ONCE the command
// falls back to STOP. Length is in bytes; a final part of less than 8 bytes is not read.
// Registers, commands, FIFO organisation and block-wise commit follow the published description.
// DEFAULT_COMMAND (the command after reset) is this design's addition, so that a display can
// run without software; its default is STOP as in the original.
module simple_dma_read
  import vs_pkg::*;
#(
  parameter int          FIFO_DEPTH      = 128,
  parameter logic [3:0]  FSAB_DID        = 4'hF,
  parameter logic [3:0]  FSAB_SUBDID     = 4'hF,
  parameter logic [3:0]  SPAM_DID        = 4'hF,
  parameter logic [23:0] SPAM_ADDRPFX    = 24'h000000,
  parameter logic [23:0] SPAM_ADDRMASK   = 24'h000000,
  parameter logic [30:0] DEFAULT_ADDR    = 31'h00000000,
  parameter logic [30:0] DEFAULT_LEN     = 31'h00000000,
  parameter dma_cmd_e    DEFAULT_COMMAND = DMA_STOP,
  parameter int          CREDITS         = FSAB_CREDITS
) (
  // SPAM, core clock
  input  logic        cclk,
  input  logic        cclk_rst_b,
  input  spamo_t      spamo,
  output spami_t      spami,
  // FSAB
  input  logic        fsabi_clk,
  input  logic        fsabi_rst_b,
  output fsabo_t      fsabo,
  input  logic        fsabo_credit,
  input  fsabi_t      fsabi,
  // peripheral
  input  logic        target_clk,
  input  logic        target_rst_b,
  input  logic        request,
  output logic [63:0] data,
  output logic        data_ready,
  output logic        fifo_empty
);
  localparam int AW = $clog2(FIFO_DEPTH);
  typedef logic [AW:0] ptr_t;

  function automatic ptr_t g2b(input ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction
  function automatic ptr_t b2g(input ptr_t b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- SPAM registers (cclk) ----------------
  logic sel, wr, rd;
  logic [4:0] reg_a;
  assign sel   = spamo.valid && spamo.did == SPAM_DID && ((spamo.addr & SPAM_ADDRMASK) == SPAM_ADDRPFX);
  assign wr    = sel && !spamo.r_nw;
  assign rd    = sel && spamo.r_nw;
  assign reg_a = spamo.addr[4:0];

  logic [30:0] next_start_f, next_len_f;
  logic [1:0]  cmd_w_f;
  logic        cmd_strobe_f;
  logic d_start, d_len, d_cmd, d_fbr, d_tot, d_cur, d_other;
  logic [31:0] r_fbr, r_tot, r_cur;
  logic [31:0] fifo_bytes_read_f, total_delivered_t;
  logic [30:0] curr_start_f;

  csr_async_write #(.WIDTH(31), .RESET_VALUE(DEFAULT_ADDR)) u_w_start (
    .cclk(cclk), .tclk(fsabi_clk), .rst_b_cclk(cclk_rst_b), .rst_b_tclk(fsabi_rst_b),
    .wr_strobe_cclk(wr && reg_a == DMA_NEXT_START_REG), .wr_data_cclk(spamo.data[30:0]),
    .wr_wait_cclk(), .wr_done_strobe_cclk(d_start), .wr_strobe_tclk(), .wr_data_tclk(next_start_f));
  csr_async_write #(.WIDTH(31), .RESET_VALUE(DEFAULT_LEN)) u_w_len (
    .cclk(cclk), .tclk(fsabi_clk), .rst_b_cclk(cclk_rst_b), .rst_b_tclk(fsabi_rst_b),
    .wr_strobe_cclk(wr && reg_a == DMA_NEXT_LEN_REG), .wr_data_cclk(spamo.data[30:0]),
    .wr_wait_cclk(), .wr_done_strobe_cclk(d_len), .wr_strobe_tclk(), .wr_data_tclk(next_len_f));
  csr_async_write #(.WIDTH(2), .RESET_VALUE(DEFAULT_COMMAND)) u_w_cmd (
    .cclk(cclk), .tclk(fsabi_clk), .rst_b_cclk(cclk_rst_b), .rst_b_tclk(fsabi_rst_b),
    .wr_strobe_cclk(wr && reg_a == DMA_COMMAND_REG), .wr_data_cclk(spamo.data[1:0]),
    .wr_wait_cclk(), .wr_done_strobe_cclk(d_cmd), .wr_strobe_tclk(cmd_strobe_f), .wr_data_tclk(cmd_w_f));
  csr_async_read #(.WIDTH(32)) u_r_fbr (
    .cclk(cclk), .tclk(fsabi_clk), .rst_b_cclk(cclk_rst_b), .rst_b_tclk(fsabi_rst_b),
    .rd_strobe_cclk(rd && reg_a == DMA_FIFO_BYTES_REG), .rd_data_cclk(r_fbr), .rd_wait_cclk(),
    .rd_done_strobe_cclk(d_fbr), .rd_strobe_tclk(), .rd_data_tclk(fifo_bytes_read_f));
  csr_async_read #(.WIDTH(32)) u_r_tot (
    .cclk(cclk), .tclk(target_clk), .rst_b_cclk(cclk_rst_b), .rst_b_tclk(target_rst_b),
    .rd_strobe_cclk(rd && reg_a == DMA_TOTAL_BYTES_REG), .rd_data_cclk(r_tot), .rd_wait_cclk(),
    .rd_done_strobe_cclk(d_tot), .rd_strobe_tclk(), .rd_data_tclk(total_delivered_t));
  csr_async_read #(.WIDTH(32)) u_r_cur (
    .cclk(cclk), .tclk(fsabi_clk), .rst_b_cclk(cclk_rst_b), .rst_b_tclk(fsabi_rst_b),
    .rd_strobe_cclk(rd && reg_a == DMA_CURR_START_REG), .rd_data_cclk(r_cur), .rd_wait_cclk(),
    .rd_done_strobe_cclk(d_cur), .rd_strobe_tclk(), .rd_data_tclk({1'b0, curr_start_f}));

  // accesses to no register (or reads of write-only ones) are answered at once with zero
  always_ff @(posedge cclk or negedge cclk_rst_b) begin
    if (!cclk_rst_b) d_other <= 1'b0;
    else d_other <= sel && !(wr && (reg_a == DMA_NEXT_START_REG || reg_a == DMA_NEXT_LEN_REG ||
                                    reg_a == DMA_COMMAND_REG)) &&
                           !(rd && (reg_a == DMA_FIFO_BYTES_REG || reg_a == DMA_TOTAL_BYTES_REG ||
                                    reg_a == DMA_CURR_START_REG));
  end
  assign spami.busy_b = d_start | d_len | d_cmd | d_fbr | d_tot | d_cur | d_other;
  assign spami.data   = r_fbr | r_tot | r_cur;

  // ---------------- FSAB side (fsabi_clk) ----------------
  logic [63:0] mem [FIFO_DEPTH];
  dma_cmd_e cmd;
  logic running;
  logic [30:0] cur_addr, remaining;
  ptr_t rpos_t, rpos_gray_t, commit_s1, commit_t_gray, commit_t;
  ptr_t wpos, resv, commit_gray, rpos_s1, rpos_f_gray, rpos_f;
  logic [2:0] blk_cnt;
  logic [$clog2(CREDITS+1)-1:0] credits;
  logic issue, rx;
  logic [3:0] blen;

  assign rpos_f = g2b(rpos_f_gray);
  assign blen   = (remaining >= 31'd64) ? 4'd8 : 4'(remaining[5:3]);
  assign issue  = running && blen != 0 && credits != 0 &&
                  (ptr_t'(FIFO_DEPTH) - (resv - rpos_f)) >= ptr_t'(8);
  assign rx     = fsabi.valid && fsabi.did == FSAB_DID && fsabi.subdid == FSAB_SUBDID;

  always_comb begin
    fsabo = '0;
    if (issue) begin
      fsabo.valid  = 1'b1;
      fsabo.mode   = FSAB_READ;
      fsabo.did    = FSAB_DID;
      fsabo.subdid = FSAB_SUBDID;
      fsabo.addr   = {cur_addr[30:3], 3'b000};
      fsabo.len    = blen;
    end
  end

  always_ff @(posedge fsabi_clk) if (rx) mem[wpos[AW-1:0]] <= fsabi.data;

  always_ff @(posedge fsabi_clk or negedge fsabi_rst_b) begin
    if (!fsabi_rst_b) begin
      cmd <= DEFAULT_COMMAND; running <= 1'b0; cur_addr <= '0; remaining <= '0;
      curr_start_f <= '0; fifo_bytes_read_f <= '0; wpos <= '0; resv <= '0;
      commit_gray <= '0; rpos_s1 <= '0; rpos_f_gray <= '0; blk_cnt <= '0;
      credits <= ($clog2(CREDITS+1))'(CREDITS);
    end else begin
      credits <= credits - ($clog2(CREDITS+1))'(issue) + ($clog2(CREDITS+1))'(fsabo_credit);
      if (cmd_strobe_f) cmd <= dma_cmd_e'(cmd_w_f);
      if (!running) begin
        if (cmd != DMA_STOP && !cmd_strobe_f) begin
          running      <= 1'b1;
          cur_addr     <= next_start_f;
          remaining    <= next_len_f;
          curr_start_f <= next_start_f;
          fifo_bytes_read_f <= '0;
          if (cmd == DMA_TRIGGER_ONCE) cmd <= DMA_STOP;
        end
      end else begin
        if (issue) begin
          cur_addr  <= cur_addr + 31'd64;
          remaining <= (blen == 4'd8) ? remaining - 31'd64 : '0;
          resv      <= resv + ptr_t'(blen);
        end else if (blen == 0 && wpos == resv) begin
          running <= 1'b0;
        end
      end
      if (rx) begin
        wpos    <= wpos + 1'b1;
        blk_cnt <= blk_cnt + 1'b1;
        fifo_bytes_read_f <= fifo_bytes_read_f + 32'd8;
        if (blk_cnt == 3'd7 || wpos + 1'b1 == resv) begin
          commit_gray <= b2g(wpos + 1'b1);
          blk_cnt     <= '0;
        end
      end
      rpos_s1     <= rpos_gray_t;
      rpos_f_gray <= rpos_s1;
    end
  end

  // ---------------- peripheral side (target_clk) ----------------
  assign commit_t   = g2b(commit_t_gray);
  assign fifo_empty = (commit_t == rpos_t);
  assign data_ready = !fifo_empty;

  always_ff @(posedge target_clk) if (request && !fifo_empty) data <= mem[rpos_t[AW-1:0]];

  always_ff @(posedge target_clk or negedge target_rst_b) begin
    if (!target_rst_b) begin
      rpos_t <= '0; rpos_gray_t <= '0; commit_s1 <= '0; commit_t_gray <= '0;
      total_delivered_t <= '0;
    end else begin
      commit_s1     <= commit_gray;
      commit_t_gray <= commit_s1;
      if (request && !fifo_empty) begin
        rpos_t      <= rpos_t + 1'b1;
        rpos_gray_t <= b2g(rpos_t + 1'b1);
        total_delivered_t <= total_delivered_t + 32'd8;
      end
    end
  end
endmodule
