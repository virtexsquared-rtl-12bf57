// dcache: data cache, direct mapped, write-through, 64-byte lines; also the SPAM bus master.
//
// Addresses with bit 31 set go to the SPAM bus (CSR space): the cache sends the request for one
// cycle (did = address bits 27:24, SPAM address = bits 23:0) and waits for a device to answer
// with busy_b. If none answers within TIMEOUT cycles a read returns 0xDEADDEAD. Other addresses
// are cached memory: a read hit is detected in the request cycle (3a) and the word appears on
// dc__rd_data_4a one cycle later; a read miss fills the line through cache_fill_port (an 8-word
// FSAB read on the FSAB clock) and then hits. A write is sent through to memory as a 1-word
// FSAB write with a 4-byte mask, and also updates the cached line if it is present; the core
// waits until the FSAB side has issued it. dc__rw_wait_3a is high while a request cannot
// complete in this cycle. Writes are whole 32-bit words.
// Following the published design: ports, write-through, direct mapping, SPAM master role and
// the 256-cycle timeout with 0xDEADDEAD. SETS, the address split between memory and SPAM and the
// no-allocate-on-write policy are this design's choices.
module dcache
  import vs_pkg::*;
#(
  parameter int SETS = 64,
  parameter int TIMEOUT = 256,
  parameter logic [3:0] DID = DID_DC
) (
  input  logic         clk,
  input  logic         rst_b,
  input  logic [31:0]  dc__addr_3a,
  input  logic         dc__rd_req_3a,
  input  logic         dc__wr_req_3a,
  output logic         dc__rw_wait_3a,
  input  logic [31:0]  dc__wr_data_3a,
  output logic [31:0]  dc__rd_data_4a,
  // SPAM master
  output spamo_t       spamo,
  input  spami_t       spami,
  // FSAB side
  input  logic         fsab_clk,
  input  logic         fsab_rst_b,
  output fsabo_t       dc__fsabo,
  input  logic         dc__fsabo_credit,
  input  fsabi_t       fsabi
);
  localparam int IW = $clog2(SETS);
  localparam int TW = 31 - 6 - IW;

  logic [TW-1:0]   tags  [SETS];
  logic [511:0]    lines [SETS];
  logic [SETS-1:0] valid;

  logic [IW-1:0] idx;
  logic [TW-1:0] tag;
  logic is_spam, req, hit;
  assign idx = dc__addr_3a[6 +: IW];
  assign tag = dc__addr_3a[30 -: TW];
  assign is_spam = dc__addr_3a[31];
  assign req = dc__rd_req_3a || dc__wr_req_3a;
  assign hit = valid[idx] && tags[idx] == tag;

  // memory-side handshake with the fill port
  logic req_toggle, ack_toggle, ack_s1, ack_s2, ack_seen, pending, acked;
  logic req_write;
  logic [31:0] req_addr;
  logic [63:0] req_wdata;
  logic [7:0]  req_wmask;
  logic [511:0] fill_line;
  logic wr_done;                 // write has been issued; complete the store this cycle
  assign pending = (req_toggle != ack_seen);
  assign acked   = pending && (ack_s2 != ack_seen);

  // SPAM state
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_DONE} sstate_e;
  sstate_e sstate;
  logic [$clog2(TIMEOUT+1)-1:0] timer;
  logic [31:0] spam_rdata;

  always_comb begin
    if (!req) dc__rw_wait_3a = 1'b0;
    else if (is_spam) dc__rw_wait_3a = (sstate != S_DONE);
    else if (dc__wr_req_3a) dc__rw_wait_3a = !wr_done;
    else dc__rw_wait_3a = !hit;
  end

  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      req_toggle <= 1'b0; ack_s1 <= 1'b0; ack_s2 <= 1'b0; ack_seen <= 1'b0; valid <= '0;
      req_write <= 1'b0; req_addr <= '0; req_wdata <= '0; req_wmask <= '0; wr_done <= 1'b0;
      sstate <= S_IDLE; timer <= '0; spam_rdata <= '0; spamo <= '0; dc__rd_data_4a <= '0;
    end else begin
      ack_s1 <= ack_toggle;
      ack_s2 <= ack_s1;
      spamo  <= '0;
      wr_done <= 1'b0;
      // memory reads and writes
      if (req && !is_spam && !pending && !wr_done && (dc__wr_req_3a || !hit)) begin
        req_toggle <= ~req_toggle;
        req_write  <= dc__wr_req_3a;
        req_addr   <= dc__addr_3a;
        req_wdata  <= {dc__wr_data_3a, dc__wr_data_3a};
        req_wmask  <= dc__addr_3a[2] ? 8'hF0 : 8'h0F;
      end
      if (acked) begin
        ack_seen <= ack_s2;
        if (req_write) wr_done <= 1'b1;
        else valid[req_addr[6 +: IW]] <= 1'b1;
      end
      if (dc__rd_req_3a && !is_spam && hit) dc__rd_data_4a <= lines[idx][dc__addr_3a[5:2]*32 +: 32];
      // SPAM accesses
      case (sstate)
        S_IDLE: if (req && is_spam) begin
          spamo <= spamo_t'{1'b1, dc__rd_req_3a, dc__addr_3a[27:24], dc__addr_3a[23:0], dc__wr_data_3a};
          timer <= '0;
          sstate <= S_WAIT;
        end
        S_WAIT: begin
          timer <= timer + 1'b1;
          if (spami.busy_b) begin
            spam_rdata <= spami.data;
            sstate <= S_DONE;
          end else if (timer == ($clog2(TIMEOUT+1))'(TIMEOUT - 1)) begin
            spam_rdata <= SPAM_TIMEOUT_DATA;
            sstate <= S_DONE;
          end
        end
        S_DONE: begin
          dc__rd_data_4a <= spam_rdata;
          sstate <= S_IDLE;
        end
        default: sstate <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (acked && !req_write) begin
      tags[req_addr[6 +: IW]]  <= req_addr[30 -: TW];
      lines[req_addr[6 +: IW]] <= fill_line;
    end else if (dc__wr_req_3a && wr_done && hit) begin
      lines[idx][dc__addr_3a[5:2]*32 +: 32] <= dc__wr_data_3a;
    end
  end

  cache_fill_port #(.DID(DID)) u_port (
    .clk(fsab_clk), .rst_b(fsab_rst_b), .req_toggle(req_toggle), .req_write(req_write),
    .req_addr(req_addr), .req_wdata(req_wdata), .req_wmask(req_wmask), .ack_toggle(ack_toggle),
    .line(fill_line), .fsabo(dc__fsabo), .fsabo_credit(dc__fsabo_credit), .fsabi(fsabi));
endmodule
