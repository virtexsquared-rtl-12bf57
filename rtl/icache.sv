// icache: instruction cache, set associative with WAYS ways (a parameter), 64-byte lines.
//
// Lookup happens in the request cycle (0a): ic__rd_wait_0a is combinational and low on a hit,
// and the addressed 32-bit word appears on ic__rd_data_1a one core clock later. On a miss the
// cache holds ic__rd_wait_0a high, hands the line address to its cache_fill_port (which runs
// on the FSAB clock and performs an 8-word FSAB read), and when the filled line comes back
// writes it into the way chosen by a round-robin victim counter; the next lookup then hits.
// The tag, valid and data arrays live on the core clock; the fill port's line buffer is only
// read after the acknowledge has crossed into the core clock, so it is stable.
// Ports, single-cycle latency, zero-cycle miss detection, the way parameter and the two clock
// domains follow the published description. SETS, the round-robin replacement and the 64-byte
// line (one maximal FSAB transaction) are this design's choices.
module icache
  import vs_pkg::*;
#(
  parameter int WAYS = 2,
  parameter int SETS = 64,
  parameter logic [3:0] DID = DID_IC
) (
  input  logic         clk,          // core clock
  input  logic         rst_b,
  input  logic [31:0]  ic__rd_addr_0a,
  input  logic         ic__rd_req_0a,
  output logic         ic__rd_wait_0a,
  output logic [31:0]  ic__rd_data_1a,
  // FSAB side
  input  logic         fsab_clk,
  input  logic         fsab_rst_b,
  output fsabo_t       ic__fsabo,
  input  logic         ic__fsabo_credit,
  input  fsabi_t       fsabi
);
  localparam int IW = $clog2(SETS);
  localparam int TW = 32 - 6 - IW;
  localparam int WW = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic [TW-1:0]  tags  [WAYS][SETS];
  logic [511:0]   lines [WAYS][SETS];
  logic [SETS-1:0] valid [WAYS];

  logic [IW-1:0] idx;
  logic [TW-1:0] tag;
  assign idx = ic__rd_addr_0a[6 +: IW];
  assign tag = ic__rd_addr_0a[31 -: TW];

  logic hit;
  logic [WW-1:0] hit_way;
  always_comb begin
    hit = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[w][idx] && tags[w][idx] == tag) begin
        hit = 1'b1;
        hit_way = WW'(w);
      end
    end
  end
  assign ic__rd_wait_0a = ic__rd_req_0a && !hit;

  always_ff @(posedge clk) begin
    if (ic__rd_req_0a && hit) ic__rd_data_1a <= lines[hit_way][idx][ic__rd_addr_0a[5:2]*32 +: 32];
  end

  // miss handling
  logic req_toggle, ack_toggle, ack_s1, ack_s2, ack_seen;
  logic [31:0] miss_addr;
  logic [511:0] fill_line;
  logic [WW-1:0] victim;
  logic pending;
  assign pending = (req_toggle != ack_seen);

  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      req_toggle <= 1'b0; ack_s1 <= 1'b0; ack_s2 <= 1'b0; ack_seen <= 1'b0;
      miss_addr <= '0; victim <= '0;
      for (int w = 0; w < WAYS; w++) valid[w] <= '0;
    end else begin
      ack_s1 <= ack_toggle;
      ack_s2 <= ack_s1;
      if (ic__rd_wait_0a && !pending) begin
        miss_addr  <= ic__rd_addr_0a;
        req_toggle <= ~req_toggle;
      end
      if (pending && ack_s2 != ack_seen) begin
        ack_seen <= ack_s2;
        valid[victim][miss_addr[6 +: IW]] <= 1'b1;
        victim <= (victim == WW'(WAYS - 1)) ? '0 : victim + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (pending && ack_s2 != ack_seen) begin
      tags[victim][miss_addr[6 +: IW]]  <= miss_addr[31 -: TW];
      lines[victim][miss_addr[6 +: IW]] <= fill_line;
    end
  end

  cache_fill_port #(.DID(DID)) u_port (
    .clk(fsab_clk), .rst_b(fsab_rst_b), .req_toggle(req_toggle), .req_write(1'b0),
    .req_addr(miss_addr), .req_wdata('0), .req_wmask('0), .ack_toggle(ack_toggle),
    .line(fill_line), .fsabo(ic__fsabo), .fsabo_credit(ic__fsabo_credit), .fsabi(fsabi));
endmodule
