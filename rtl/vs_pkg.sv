// vs_pkg: types and constants shared by the whole system.
//
// FSAB (Fast System Access Bus): the transaction bus to main memory. A master sends a start
// packet (valid, mode, did, subdid, address, length, first data word and mask), followed for a
// write by length-1 data packets on consecutive valid cycles. Transactions carry at most 8
// 64-bit words; the slave never reorders them. Flow control is by credits: every transaction
// is one debit, the slave returns one credit per transaction. Inbound data (read responses)
// are broadcast to all masters, tagged with the did/subdid of the request.
//
// SPAM (Slow Peripheral Access Memory) bus: one master (the data cache), many slaves. A request
// is valid for exactly one cycle; the addressed slave answers with busy_b for one cycle with
// read data valid on the same cycle. Idle slaves drive zeros so responses can be ORed.
//
// The 64-bit FSAB data width, the 8-word maximum length, the 8-bit write mask, the 4-bit device
// ids and the 32-bit SPAM data follow the published bus description. The widths of the mode
// field, the SPAM address and the initial credit counts are choices of this implementation.
package vs_pkg;
  localparam int FSAB_DATA_W = 64;
  localparam int FSAB_MASK_W = 8;
  localparam int FSAB_ADDR_W = 31;   // byte address; low 3 bits are always zero
  localparam int FSAB_LEN_W  = 4;    // 1..8 words
  localparam int FSAB_DID_W  = 4;
  localparam int FSAB_MAX_LEN = 8;
  localparam int FSAB_CREDITS = 4;   // transactions a master may have queued at the arbiter

  typedef enum logic [1:0] {FSAB_READ = 2'd0, FSAB_WRITE = 2'd1} fsab_mode_e;

  typedef struct packed {
    logic                    valid;
    fsab_mode_e              mode;
    logic [FSAB_DID_W-1:0]   did;
    logic [FSAB_DID_W-1:0]   subdid;
    logic [FSAB_ADDR_W-1:0]  addr;
    logic [FSAB_LEN_W-1:0]   len;
    logic [FSAB_DATA_W-1:0]  data;
    logic [FSAB_MASK_W-1:0]  mask;
  } fsabo_t;

  typedef struct packed {
    logic                    valid;
    logic [FSAB_DID_W-1:0]   did;
    logic [FSAB_DID_W-1:0]   subdid;
    logic [FSAB_DATA_W-1:0]  data;
  } fsabi_t;

  // FSAB device ids of the masters.
  localparam logic [3:0] DID_IC    = 4'h0;
  localparam logic [3:0] DID_DC    = 4'h1;
  localparam logic [3:0] DID_FB    = 4'h2;
  localparam logic [3:0] DID_AUDIO = 4'h3;
  localparam logic [3:0] DID_BLIT  = 4'h4;
  localparam logic [3:0] DID_CLEAR = 4'h5;
  localparam logic [3:0] DID_PRE   = 4'hF;

  localparam int SPAM_ADDR_W = 24;
  localparam int SPAM_DATA_W = 32;
  localparam int SPAM_DID_W  = 4;

  typedef struct packed {
    logic                    valid;
    logic                    r_nw;
    logic [SPAM_DID_W-1:0]   did;
    logic [SPAM_ADDR_W-1:0]  addr;
    logic [SPAM_DATA_W-1:0]  data;
  } spamo_t;

  typedef struct packed {
    logic                    busy_b;
    logic [SPAM_DATA_W-1:0]  data;
  } spami_t;

  // SPAM device ids: CPU address 0x8D00_0000 + offset reaches device D at offset.
  localparam logic [3:0] SPAM_DID_CONSOLE = 4'h0;
  localparam logic [3:0] SPAM_DID_FB      = 4'h2;
  localparam logic [3:0] SPAM_DID_SYSACE  = 4'h3;
  localparam logic [3:0] SPAM_DID_AUDIO   = 4'h4;
  localparam logic [3:0] SPAM_DID_PS2     = 4'h5;
  localparam logic [3:0] SPAM_DID_TIMER   = 4'h6;
  localparam logic [3:0] SPAM_DID_CLEAR   = 4'h7;
  localparam logic [3:0] SPAM_DID_BLIT    = 4'h8;

  // DMA controller register offsets (low 5 address bits) and commands.
  localparam logic [4:0] DMA_NEXT_START_REG  = 5'h00;
  localparam logic [4:0] DMA_NEXT_LEN_REG    = 5'h04;
  localparam logic [4:0] DMA_COMMAND_REG     = 5'h08;
  localparam logic [4:0] DMA_FIFO_BYTES_REG  = 5'h0c;
  localparam logic [4:0] DMA_TOTAL_BYTES_REG = 5'h10;
  localparam logic [4:0] DMA_CURR_START_REG  = 5'h14;
  typedef enum logic [1:0] {DMA_STOP = 2'b00, DMA_TRIGGER_ONCE = 2'b01, DMA_AUTOTRIGGER = 2'b10} dma_cmd_e;

  localparam logic [31:0] SPAM_TIMEOUT_DATA = 32'hDEADDEAD;

  function automatic logic [3:0] bin2gray4(input logic [3:0] b);
    return b ^ (b >> 1);
  endfunction
endpackage
