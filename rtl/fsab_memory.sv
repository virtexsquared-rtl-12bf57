// fsab_memory: the memory controller, the only FSAB slave. It sits between the FSAB and a
// Xilinx MIG DDR2 controller (not part of this RTL; its user interface is the mig_* ports).
//
// Input side (towards the MIG). At the start packet of a transaction (fsabo_new_req_0a) the
// transaction is tracked by fsabo_cur_req_len_rem_0a, the number of its packets still to come.
// Write data are paired into 128-bit entries of the input data FIFO, because the MIG takes two
// 64-bit words per clock: an even-addressed packet is held (fsabo_prev_data, fsabo_want_prev)
// until its odd partner arrives; a write that starts on an odd word gets a masked word in front,
// and one that ends on an even word gets a masked word behind. idfif_wr_0a writes an entry.
// Once the whole transaction is stored, its did, subdid, address and length go into the
// request info FIFO. The controller then writes the address/command FIFO of the MIG, and for a
// write also the first data/mask entry in the same cycle, the other three of the 8-word,
// 4-cycle burst on the following cycles, masked beyond the transaction's data.
// Output side (from the MIG). For a read, did, subdid, length and the odd-start flag go into the
// output request info FIFO. Data returned by the MIG fill the output data FIFO; when it is not
// empty the controller takes the request info and returns the words on fsabi, one per cycle
// within a 128-bit entry, then discards the rest of the burst.
// Credits: one per transaction, returned when a write has been handed to the MIG and when a
// read has been answered, so that the output data FIFO (CREDITS bursts) can never overflow.
// Structure, FIFOs and burst handling follow the published description. Two departures are
// this design's own: the start word of a read is remembered (so reads aligned only to 16 bytes
// return the right words) and the unused part of every read burst is discarded. MIG commands
// use the MIG convention: 3'b000 write, 3'b001 read; mig_af_addr is a 64-bit-word address.
// Lint: the input data FIFO's empty flag is not needed (its reads follow the request info FIFO), and only the
// upper bits of the request record are read in one place; both unused-signal warnings are expected.
module fsab_memory
  import vs_pkg::*;
#(
  parameter int CREDITS = FSAB_CREDITS
) (
  input  logic           clk,
  input  logic           rst_b,
  // FSAB slave
  input  fsabo_t         fsabo,
  output logic           fsabo_credit,
  output fsabi_t         fsabi,
  // MIG user interface
  output logic [30:0]    mig_af_addr,
  output logic [2:0]     mig_af_cmd,
  output logic           mig_af_wren,
  input  logic           mig_af_afull,
  output logic [127:0]   mig_wdf_data,
  output logic [15:0]    mig_wdf_mask_data,   // 1 = byte not written (MIG convention)
  output logic           mig_wdf_wren,
  input  logic           mig_wdf_afull,
  input  logic           mig_rd_data_valid,
  input  logic [127:0]   mig_rd_data
);
  localparam int IDW = 2 + 2*FSAB_DID_W + FSAB_ADDR_W + FSAB_LEN_W;   // request info width
  localparam int DDEPTH = 4 * CREDITS;

  typedef struct packed {
    fsab_mode_e             mode;
    logic [FSAB_DID_W-1:0]  did;
    logic [FSAB_DID_W-1:0]  subdid;
    logic [FSAB_ADDR_W-1:0] addr;
    logic [FSAB_LEN_W-1:0]  len;
  } reqinfo_t;

  typedef struct packed {
    logic [FSAB_DID_W-1:0]  did;
    logic [FSAB_DID_W-1:0]  subdid;
    logic [FSAB_LEN_W-1:0]  len;
    logic                   odd;
  } oinfo_t;

  // ---------------- input side: FSAB -> FIFOs ----------------
  logic                  fsabo_new_req_0a;
  logic [FSAB_LEN_W-1:0] fsabo_cur_req_len_rem_0a;   // packets still expected after this cycle
  logic [63:0]           fsabo_prev_data;
  logic [7:0]            fsabo_prev_mask;
  logic                  fsabo_want_prev;            // a held even word waits for its partner
  logic                  idfif_wr_0a;
  logic [143:0]          idfif_wdat;
  reqinfo_t              cur_req, req_wdat;
  logic                  rif_wr;
  logic                  lane;                       // 1 when this packet is the odd word

  assign fsabo_new_req_0a = fsabo.valid && (fsabo_cur_req_len_rem_0a == 0);

  always_comb begin
    lane = fsabo_new_req_0a ? fsabo.addr[3] : fsabo_want_prev;
    idfif_wr_0a = 1'b0;
    idfif_wdat  = '0;
    rif_wr      = 1'b0;
    req_wdat    = fsabo_new_req_0a ? reqinfo_t'{fsabo.mode, fsabo.did, fsabo.subdid, fsabo.addr, fsabo.len}
                                   : cur_req;
    if (fsabo.valid) begin
      if (fsabo_new_req_0a && fsabo.mode == FSAB_READ) begin
        rif_wr = 1'b1;
      end else begin
        // last packet of a write when the remaining count reaches zero
        if (lane) begin
          idfif_wr_0a = 1'b1;
          idfif_wdat  = fsabo_new_req_0a ? {~fsabo.mask, 8'hFF, fsabo.data, 64'h0}
                                         : {~fsabo.mask, ~fsabo_prev_mask, fsabo.data, fsabo_prev_data};
        end else if ((fsabo_new_req_0a ? fsabo.len : fsabo_cur_req_len_rem_0a) == 1) begin
          idfif_wr_0a = 1'b1;
          idfif_wdat  = {8'hFF, ~fsabo.mask, 64'h0, fsabo.data};
        end
        rif_wr = (fsabo_new_req_0a ? fsabo.len : fsabo_cur_req_len_rem_0a) == 1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      fsabo_cur_req_len_rem_0a <= '0; fsabo_want_prev <= 1'b0;
      fsabo_prev_data <= '0; fsabo_prev_mask <= '0; cur_req <= '0;
    end else if (fsabo.valid) begin
      if (fsabo_new_req_0a) begin
        cur_req <= req_wdat;
        fsabo_cur_req_len_rem_0a <= (fsabo.mode == FSAB_WRITE) ? fsabo.len - 1'b1 : '0;
      end else begin
        fsabo_cur_req_len_rem_0a <= fsabo_cur_req_len_rem_0a - 1'b1;
      end
      fsabo_want_prev <= !lane;
      fsabo_prev_data <= fsabo.data;
      fsabo_prev_mask <= fsabo.mask;
      if (rif_wr) fsabo_want_prev <= 1'b0;
    end
  end

  logic rif_rd, rif_empty, idf_rd, idf_empty;
  logic [IDW-1:0] rif_rdat;
  logic [143:0] idf_rdat;
  reqinfo_t req;
  assign req = reqinfo_t'(rif_rdat);

  fifo #(.DEPTH(8), .WIDTH(IDW)) u_req_info (
    .clk(clk), .rst_b(rst_b), .wr_en(rif_wr), .rd_en(rif_rd), .wr_dat(req_wdat),
    .rd_dat(rif_rdat), .empty(rif_empty), .full(), .available(), .afull(), .aempty());
  fifo #(.DEPTH(DDEPTH), .WIDTH(144)) u_data (
    .clk(clk), .rst_b(rst_b), .wr_en(idfif_wr_0a), .rd_en(idf_rd), .wr_dat(idfif_wdat),
    .rd_dat(idf_rdat), .empty(idf_empty), .full(), .available(), .afull(), .aempty());

  // ---------------- FIFOs -> MIG ----------------
  typedef enum logic [1:0] {M_IDLE, M_LOAD, M_ISSUE, M_WDATA} mstate_e;
  mstate_e mstate;
  logic [1:0] k;                       // burst entry being written
  logic [2:0] nent;                    // entries holding transaction data
  logic oif_wr, wr_credit;
  oinfo_t oif_wdat;

  assign nent = 3'((4'(req.addr[3]) + 4'(req.len) + 4'd1) >> 1);
  assign rif_rd = (mstate == M_IDLE) && !rif_empty && !mig_af_afull && !mig_wdf_afull;
  assign idf_rd = ((mstate == M_LOAD) && req.mode == FSAB_WRITE) ||
                  ((mstate == M_ISSUE || mstate == M_WDATA) && req.mode == FSAB_WRITE && (3'(k) + 3'd1 < nent));
  assign mig_af_wren  = (mstate == M_ISSUE);
  assign mig_af_cmd   = (req.mode == FSAB_WRITE) ? 3'b000 : 3'b001;
  assign mig_af_addr  = {3'b000, req.addr[30:4], 1'b0};
  assign mig_wdf_wren = req.mode == FSAB_WRITE && (mstate == M_ISSUE || mstate == M_WDATA);
  assign mig_wdf_data = (3'(k) < nent) ? idf_rdat[127:0] : '0;
  assign mig_wdf_mask_data = (3'(k) < nent) ? idf_rdat[143:128] : 16'hFFFF;
  assign oif_wr   = (mstate == M_ISSUE) && req.mode == FSAB_READ;
  assign oif_wdat = oinfo_t'{req.did, req.subdid, req.len, req.addr[3]};
  assign wr_credit = mig_wdf_wren && k == 2'd3;

  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      mstate <= M_IDLE; k <= '0;
    end else begin
      case (mstate)
        M_IDLE:  if (rif_rd) mstate <= M_LOAD;
        M_LOAD:  begin mstate <= M_ISSUE; k <= '0; end
        M_ISSUE: if (req.mode == FSAB_WRITE) begin mstate <= M_WDATA; k <= 2'd1; end
                 else mstate <= M_IDLE;
        M_WDATA: begin
          k <= k + 1'b1;
          if (k == 2'd3) mstate <= M_IDLE;
        end
      endcase
    end
  end

  // ---------------- MIG -> FSAB ----------------
  logic oif_rd, oif_empty, odf_rd, odf_empty;
  logic [$bits(oinfo_t)-1:0] oif_rdat;
  logic [127:0] odf_rdat;
  fifo #(.DEPTH(8), .WIDTH($bits(oinfo_t))) u_out_info (
    .clk(clk), .rst_b(rst_b), .wr_en(oif_wr), .rd_en(oif_rd), .wr_dat(oif_wdat),
    .rd_dat(oif_rdat), .empty(oif_empty), .full(), .available(), .afull(), .aempty());
  fifo #(.DEPTH(DDEPTH), .WIDTH(128)) u_out_data (
    .clk(clk), .rst_b(rst_b), .wr_en(mig_rd_data_valid), .rd_en(odf_rd), .wr_dat(mig_rd_data),
    .rd_dat(odf_rdat), .empty(odf_empty), .full(), .available(), .afull(), .aempty());

  typedef enum logic [2:0] {R_IDLE, R_WAIT, R_SEND, R_NEXT, R_DRAIN} rstate_e;
  rstate_e rstate;
  oinfo_t  cur;
  logic [127:0] ent;
  logic         half;
  logic [FSAB_LEN_W-1:0] rem;
  logic [2:0]   used;                  // burst entries consumed so far
  logic         rd_credit;

  assign oif_rd = (rstate == R_IDLE) && !oif_empty && !odf_empty;
  assign odf_rd = !odf_empty && ((rstate == R_IDLE && !oif_empty) ||
                  (rstate == R_SEND && half && rem != 1) ||
                  (rstate == R_DRAIN && used != 3'd4));
  assign rd_credit = (rstate == R_DRAIN) && (used == 3'd4);

  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      rstate <= R_IDLE; cur <= '0; ent <= '0; half <= 1'b0; rem <= '0; used <= '0;
      fsabi <= '0;
    end else begin
      fsabi.valid <= 1'b0;
      case (rstate)
        R_IDLE: if (oif_rd) rstate <= R_WAIT;
        R_WAIT: begin
          cur  <= oinfo_t'(oif_rdat);
          ent  <= odf_rdat;
          half <= oif_rdat[0];
          rem  <= oif_rdat[FSAB_LEN_W:1];
          used <= 3'd1;
          rstate <= R_SEND;
        end
        R_SEND: begin
          fsabi <= fsabi_t'{1'b1, cur.did, cur.subdid, half ? ent[127:64] : ent[63:0]};
          half  <= ~half;
          rem   <= rem - 1'b1;
          if (rem == 1) rstate <= R_DRAIN;
          else if (half) rstate <= odf_rd ? R_NEXT : R_SEND;
          if (half && rem != 1) begin
            if (!odf_rd) begin half <= half; rem <= rem; fsabi.valid <= 1'b0; end
            else used <= used + 1'b1;
          end
        end
        R_NEXT: begin ent <= odf_rdat; rstate <= R_SEND; end
        R_DRAIN: begin
          if (odf_rd) used <= used + 1'b1;
          if (used == 3'd4) rstate <= R_IDLE;
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // credit return: writes and reads may both finish in one cycle
  logic [2:0] cpend;
  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      cpend <= '0; fsabo_credit <= 1'b0;
    end else begin
      cpend <= cpend + 3'(wr_credit) + 3'(rd_credit) - 3'(cpend != 0);
      fsabo_credit <= (cpend != 0);
    end
  end
endmodule
