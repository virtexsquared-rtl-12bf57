// fsab_preload: boot preloader. After reset it copies a ROM image into the start of main memory
// over the FSAB and holds the CPU core in reset until it is done.
//
// It is a write-only FSAB master: it sends 8-word (64-byte) write transactions to incrementing
// addresses from address 0, each as 8 consecutive packets with a full write mask, whenever it
// holds a credit (it starts with CREDITS and gets one back per fsabo_credit pulse). It never
// reads, so it has no inbound port. core_rst_b stays low until every transaction has been
// sent and its credit has come back (the memory controller has taken it), then rises and stays
// high; after that the block is idle.
// The ROM holds ROM_WORDS 64-bit words, 2048 (16 KB) as in the published system. When ROM_FILE
// names a $readmemh image (one 64-bit word per line) that is loaded; otherwise the ROM holds a
// fixed test pattern, word i = {i ^ 32'hA5A5_5A5A, i}, so that the copy can be checked without a
// boot program. The FSAB did is all ones, as in the original.
module fsab_preload
  import vs_pkg::*;
#(
  parameter int    ROM_WORDS = 2048,
  parameter int    CREDITS   = FSAB_CREDITS,
  parameter string ROM_FILE  = ""
) (
  input  logic   clk,
  input  logic   rst_b,
  output fsabo_t fsabo,
  input  logic   fsabo_credit,
  output logic   core_rst_b
);
  localparam int AW = $clog2(ROM_WORDS);
  logic [63:0] rom [ROM_WORDS];

  initial begin
    if (ROM_FILE != "") $readmemh(ROM_FILE, rom);
    else for (int i = 0; i < ROM_WORDS; i++) rom[i] = {32'(i) ^ 32'hA5A5_5A5A, 32'(i)};
  end

  logic [AW:0] idx;          // next word to send
  logic [2:0]  beat;         // packet within the current transaction
  logic        in_txn;
  logic [$clog2(CREDITS+1)-1:0] credits;
  logic        send, start;

  assign start = !in_txn && (idx != (AW+1)'(ROM_WORDS)) && (credits != 0);
  assign send  = start || in_txn;

  always_comb begin
    fsabo = '0;
    if (send) begin
      fsabo.valid  = 1'b1;
      fsabo.mode   = FSAB_WRITE;
      fsabo.did    = DID_PRE;
      fsabo.subdid = '0;
      fsabo.addr   = FSAB_ADDR_W'({idx, 3'b000});
      fsabo.len    = FSAB_LEN_W'(8);
      fsabo.data   = rom[idx[AW-1:0]];
      fsabo.mask   = 8'hFF;
    end
  end

  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      idx <= '0; beat <= '0; in_txn <= 1'b0; core_rst_b <= 1'b0;
      credits <= ($clog2(CREDITS+1))'(CREDITS);
    end else begin
      credits <= credits - ($clog2(CREDITS+1))'(start) + ($clog2(CREDITS+1))'(fsabo_credit);
      if (send) begin
        idx  <= idx + 1'b1;
        beat <= beat + 1'b1;
        in_txn <= (beat != 3'd7);
      end
      if (!in_txn && idx == (AW+1)'(ROM_WORDS) && credits == ($clog2(CREDITS+1))'(CREDITS))
        core_rst_b <= 1'b1;   // all words sent and all credits back: memory has taken them
    end
  end
endmodule
