// cache_fill_port: the FSAB side of a cache, shared by icache and dcache.
//
// The cache core logic runs on the core clock; this block runs on the FSAB clock. The cache
// holds a request stable (req_write, req_addr, req_wdata, req_wmask) and then flips req_toggle.
// The toggle is synchronized by two flip-flops (the request fields are sampled only after
// that, so they are long stable). For a line fill the block sends one 8-word FSAB read of the
// 64-byte line holding req_addr, collects the eight inbound words tagged with its own DID into
// line (word 0 in bits 63:0) and then flips ack_toggle. For a write-through it sends one 1-word
// FSAB write with req_wdata/req_wmask and flips ack_toggle at once. The cache sees ack_toggle
// through its own two flip-flops and only then reads line, which no longer changes.
// It starts with CREDITS credits and spends one per transaction.
// The request/service flag handshake follows the published cache description; the exact
// encoding (toggles) and the single outstanding transaction are this design's choices.
// Lint: line fills ignore the offset bits of req_addr and bit 31 (a SPAM address never reaches this block),
// and fsabi's subdid is not checked; these unused-bit warnings are expected.
module cache_fill_port
  import vs_pkg::*;
#(
  parameter logic [3:0] DID = 4'h0,
  parameter int CREDITS = FSAB_CREDITS
) (
  input  logic          clk,
  input  logic          rst_b,
  input  logic          req_toggle,
  input  logic          req_write,
  input  logic [31:0]   req_addr,
  input  logic [63:0]   req_wdata,
  input  logic [7:0]    req_wmask,
  output logic          ack_toggle,
  output logic [511:0]  line,
  output fsabo_t        fsabo,
  input  logic          fsabo_credit,
  input  fsabi_t        fsabi
);
  logic tog_s1, tog_s2, tog_seen;
  logic [$clog2(CREDITS+1)-1:0] credits;
  typedef enum logic [1:0] {P_IDLE, P_FILL} pstate_e;
  pstate_e state;
  logic [2:0] beat;
  logic issue;

  assign issue = (state == P_IDLE) && (tog_s2 != tog_seen) && (credits != 0);

  always_comb begin
    fsabo = '0;
    if (issue) begin
      fsabo.valid  = 1'b1;
      fsabo.mode   = req_write ? FSAB_WRITE : FSAB_READ;
      fsabo.did    = DID;
      fsabo.subdid = '0;
      fsabo.addr   = req_write ? {req_addr[30:3], 3'b000} : {req_addr[30:6], 6'b0};
      fsabo.len    = req_write ? FSAB_LEN_W'(1) : FSAB_LEN_W'(8);
      fsabo.data   = req_wdata;
      fsabo.mask   = req_wmask;
    end
  end

  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      tog_s1 <= 1'b0; tog_s2 <= 1'b0; tog_seen <= 1'b0; ack_toggle <= 1'b0;
      state <= P_IDLE; beat <= '0; line <= '0;
      credits <= ($clog2(CREDITS+1))'(CREDITS);
    end else begin
      tog_s1 <= req_toggle;
      tog_s2 <= tog_s1;
      credits <= credits - ($clog2(CREDITS+1))'(issue) + ($clog2(CREDITS+1))'(fsabo_credit);
      case (state)
        P_IDLE: if (issue) begin
          tog_seen <= tog_s2;
          beat <= '0;
          if (req_write) ack_toggle <= ~ack_toggle;
          else state <= P_FILL;
        end
        P_FILL: if (fsabi.valid && fsabi.did == DID) begin
          line[beat*64 +: 64] <= fsabi.data;
          beat <= beat + 1'b1;
          if (beat == 3'd7) begin
            ack_toggle <= ~ack_toggle;
            state <= P_IDLE;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end
endmodule
