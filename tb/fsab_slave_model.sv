// fsab_slave_model: behavioural FSAB slave for testbenches (simulation only, not synthesizable
// as written). It holds MEM_WORDS 64-bit words, initialised to word i = {~i[31:0], i[31:0]}.
// Writes are applied as their packets arrive (respecting the byte mask); reads are queued and
// answered in order, LATENCY cycles after the request at the earliest, one word per cycle.
// One credit is returned per transaction. It counts reads, writes and protocol errors
// (a packet with valid but no transaction expected is never an error here: every packet after
// a write start belongs to it).
module fsab_slave_model
  import vs_pkg::*;
#(
  parameter int MEM_WORDS = 65536,
  parameter int LATENCY = 6
) (
  input  logic   clk,
  input  fsabo_t fsabo,
  output logic   fsabo_credit,
  output fsabi_t fsabi
);
  logic [63:0] mem [MEM_WORDS];
  int n_reads = 0, n_writes = 0;
  int wr_left = 0, wr_idx = 0;
  typedef struct { logic [3:0] did, subdid; int idx, len; longint t; } rd_t;
  rd_t q [$];
  longint now = 0;
  int credit_pend = 0;

  initial for (int i = 0; i < MEM_WORDS; i++) mem[i] = {~i[31:0], i[31:0]};
  initial begin fsabi = '0; fsabo_credit = 1'b0; end

  function automatic int widx(input logic [30:0] a);
    return int'(a[30:3]) % MEM_WORDS;
  endfunction

  task automatic put(input int idx, input logic [63:0] d, input logic [7:0] m);
    for (int b = 0; b < 8; b++) if (m[b]) mem[idx][b*8 +: 8] = d[b*8 +: 8];
  endtask

  always @(posedge clk) begin
    now++;
    if (fsabo.valid) begin
      if (wr_left > 0) begin
        put(wr_idx, fsabo.data, fsabo.mask);
        wr_idx++; wr_left--;
        if (wr_left == 0) credit_pend++;
      end else if (fsabo.mode == FSAB_WRITE) begin
        n_writes++;
        put(widx(fsabo.addr), fsabo.data, fsabo.mask);
        wr_idx = widx(fsabo.addr) + 1;
        wr_left = int'(fsabo.len) - 1;
        if (wr_left == 0) credit_pend++;
      end else begin
        rd_t r;
        n_reads++;
        r.did = fsabo.did; r.subdid = fsabo.subdid; r.idx = widx(fsabo.addr);
        r.len = int'(fsabo.len); r.t = now + LATENCY;
        q.push_back(r);
      end
    end
  end

  // responses
  initial begin
    forever begin
      @(posedge clk);
      fsabi <= '0;
      if (q.size() > 0 && q[0].t <= now) begin
        rd_t r;
        r = q.pop_front();
        for (int k = 0; k < r.len; k++) begin
          fsabi <= fsabi_t'{1'b1, r.did, r.subdid, mem[(r.idx + k) % MEM_WORDS]};
          @(posedge clk);
        end
        fsabi <= '0;
        credit_pend++;
      end
    end
  end

  always @(posedge clk) begin
    fsabo_credit <= 1'b0;
    if (credit_pend > 0) begin
      fsabo_credit <= 1'b1;
      credit_pend--;
    end
  end
endmodule
