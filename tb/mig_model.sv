// mig_model: behavioural model of the user interface of a Xilinx MIG DDR2 controller, for
// testbenches only. Commands (3'b000 write, 3'b001 read) and 64-bit-word addresses arrive on the
// address FIFO; a write burst takes four 128-bit data/mask entries (mask bit 1 = byte not
// written) from the write-data FIFO and stores eight words from the given address on. A read
// returns four 128-bit entries (eight words from the address, lower word in bits 63:0) on
// rd_data_valid, LATENCY cycles after the command, back to back (the data are those in memory
// when the command was accepted, so reads and writes keep their order). The almost-full flags are
// never raised. Memory word i starts as {~i, i}.
module mig_model #(
  parameter int MEM_WORDS = 65536,
  parameter int LATENCY = 10
) (
  input  logic         clk,
  input  logic [30:0]  af_addr,
  input  logic [2:0]   af_cmd,
  input  logic         af_wren,
  output logic         af_afull,
  input  logic [127:0] wdf_data,
  input  logic [15:0]  wdf_mask_data,
  input  logic         wdf_wren,
  output logic         wdf_afull,
  output logic         rd_data_valid,
  output logic [127:0] rd_data
);
  logic [63:0] mem [MEM_WORDS];
  int wq [$];            // write burst base addresses
  int wbeat = 0;
  typedef struct { logic [127:0] d [4]; longint t; } r_t;
  r_t rq [$];
  longint now = 0;
  int n_wr_bursts = 0, n_rd_bursts = 0;
  logic [127:0] wdq [$];
  logic [15:0]  wmq [$];

  initial for (int i = 0; i < MEM_WORDS; i++) mem[i] = {~i[31:0], i[31:0]};
  initial begin af_afull = 1'b0; wdf_afull = 1'b0; rd_data_valid = 1'b0; rd_data = '0; end

  always @(posedge clk) begin
    now++;
    if (af_wren) begin
      if (af_cmd == 3'b000) begin wq.push_back(int'(af_addr)); n_wr_bursts++; end
      else begin
        // data are taken when the command is accepted, so commands keep their order
        r_t r;
        for (int e = 0; e < 4; e++)
          r.d[e] = {mem[(int'(af_addr) + 2*e + 1) % MEM_WORDS], mem[(int'(af_addr) + 2*e) % MEM_WORDS]};
        r.t = now + LATENCY; rq.push_back(r); n_rd_bursts++;
      end
    end
    if (wdf_wren) begin wdq.push_back(wdf_data); wmq.push_back(wdf_mask_data); end
    while (wq.size() > 0 && wdq.size() >= 4) begin
      int a;
      a = wq.pop_front();
      for (int e = 0; e < 4; e++) begin
        logic [127:0] d; logic [15:0] m;
        d = wdq.pop_front(); m = wmq.pop_front();
        for (int b = 0; b < 16; b++)
          if (!m[b]) mem[(a + 2*e + b/8) % MEM_WORDS][(b%8)*8 +: 8] = d[b*8 +: 8];
      end
    end
  end

  initial begin
    forever begin
      @(posedge clk);
      rd_data_valid <= 1'b0;
      if (rq.size() > 0 && rq[0].t <= now) begin
        r_t r;
        r = rq.pop_front();
        for (int e = 0; e < 4; e++) begin
          rd_data_valid <= 1'b1;
          rd_data <= r.d[e];
          @(posedge clk);
        end
        rd_data_valid <= 1'b0;
      end
    end
  end
endmodule
