// tb_fsab_memory: the memory controller between an FSAB master (this testbench) and the MIG
// behavioural model. Random reads and writes of 1 to 8 words, at any word address, with random
// byte masks, against a word-array reference kept by the testbench. Checks: read data in
// order, with the requester's did and subdid; written bytes land (and masked bytes do not);
// one credit per transaction; bursts reach the MIG; and at most CREDITS transactions are ever
// outstanding (the testbench stalls on credits and counts the stalls).
module tb_fsab_memory;
  import vs_pkg::*;
  `include "tb_common.svh"
  localparam int WORDS = 4096;
  localparam bit MASKALL = 0;
  localparam bit RDONLY = 0;
  logic clk = 0, rst_b = 0;
  fsabo_t fsabo = '0;
  logic fsabo_credit;
  fsabi_t fsabi;
  logic [30:0] mig_af_addr; logic [2:0] mig_af_cmd; logic mig_af_wren, mig_af_afull;
  logic [127:0] mig_wdf_data; logic [15:0] mig_wdf_mask_data; logic mig_wdf_wren, mig_wdf_afull;
  logic mig_rd_data_valid; logic [127:0] mig_rd_data;
  logic [63:0] ref_mem [WORDS];
  typedef struct { logic [3:0] did, subdid; logic [63:0] d; } rw_t;
  rw_t rq [$];
  int cred = 4, stalls = 0, nrd = 0;

  fsab_memory #(.CREDITS(4)) dut (.*);
  mig_model #(.MEM_WORDS(WORDS), .LATENCY(12)) u_mig (.clk(clk), .af_addr(mig_af_addr),
    .af_cmd(mig_af_cmd), .af_wren(mig_af_wren), .af_afull(mig_af_afull), .wdf_data(mig_wdf_data),
    .wdf_mask_data(mig_wdf_mask_data), .wdf_wren(mig_wdf_wren), .wdf_afull(mig_wdf_afull),
    .rd_data_valid(mig_rd_data_valid), .rd_data(mig_rd_data));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 200000)

  always @(posedge clk) if (rst_b) begin
    if (fsabo_credit) cred++;
    if (fsabi.valid) begin
      rw_t e;
      check(rq.size() > 0, "read data expected");
      if (rq.size() > 0) begin
        e = rq.pop_front();
        check(fsabi.did == e.did && fsabi.subdid == e.subdid, "did/subdid returned");
        check(fsabi.data == e.d, $sformatf("read data %h expected %h", fsabi.data, e.d));
        nrd++;
      end
    end
  end

  initial begin
    for (int i = 0; i < WORDS; i++) ref_mem[i] = {~i[31:0], i[31:0]};
    repeat (3) @(negedge clk);
    rst_b = 1;
    for (int t = 0; t < 1500; t++) begin
      int w, len;
      logic wr;
      logic [3:0] did;
      w = (t < 1400) ? $urandom % 128 : $urandom % WORDS;
      len = 1 + $urandom % (8 - w % 2);
      wr = RDONLY ? 0 : $urandom % 2;
      did = 4'($urandom);
      if (cred == 0) stalls++;
      while (cred == 0) @(negedge clk);
      cred--;
      if (!wr) begin
        for (int k = 0; k < len; k++) rq.push_back('{did, 4'($urandom % 16), ref_mem[w + k]});
        // subdid is the requester's tag for the whole read
        for (int k = 1; k < len; k++) rq[rq.size() - len + k].subdid = rq[rq.size() - len].subdid;
        fsabo = '{valid: 1'b1, mode: FSAB_READ, did: did, subdid: rq[rq.size() - len].subdid,
                  addr: 31'(w * 8), len: 4'(len), data: 64'h0, mask: 8'h0};
        @(negedge clk);
      end else begin
        for (int k = 0; k < len; k++) begin
          logic [63:0] d; logic [7:0] m;
          d = {$urandom, $urandom}; m = MASKALL ? 8'hFF : 8'($urandom);
          for (int b = 0; b < 8; b++) if (m[b]) ref_mem[w + k][b*8 +: 8] = d[b*8 +: 8];
          fsabo = '{valid: 1'b1, mode: FSAB_WRITE, did: did, subdid: 4'(k), addr: 31'(w * 8),
                    len: 4'(len), data: d, mask: m};
          @(negedge clk);
        end
      end
      fsabo = '0;
      if ($urandom % 4 == 0) repeat ($urandom % 20) @(negedge clk);
    end
    wait (rq.size() == 0);
    repeat (60) @(negedge clk);
    check(cred == 4, $sformatf("all credits back (%0d)", cred));
    check(stalls > 0, "credit stalls happened");
    check(u_mig.n_wr_bursts > 0 && u_mig.n_rd_bursts > 0, "bursts reached the MIG");
    for (int i = 0; i < WORDS; i++) if (u_mig.mem[i] != ref_mem[i]) check(0, $sformatf("memory word %0d", i));
    check(1, "memory compared");
    $display("reads=%0d stalls=%0d", nrd, stalls);
    tb_finish();
  end
endmodule
