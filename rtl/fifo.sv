// fifo: synchronous first-in first-out buffer.
//
// A RAM of DEPTH entries with a read and a write pointer, both reset to zero. Each pointer is
// one bit wider than the RAM index, so that equal pointers mean empty and pointers that differ
// only in the top bit mean full. On a rising edge with wr_en the word at wr_dat is stored; with
// rd_en the entry at the head is registered onto rd_dat (it appears the cycle after rd_en) and
// the head advances. Writing a full FIFO or reading an empty one is ignored.
// Status outputs: empty, full, available (entries held, log2(DEPTH)+1 bits), afull (ALMOST or
// fewer free places) and aempty (ALMOST or fewer entries). This follows the published
// description; the registered read port is this implementation's reading of "presented at
// rd_dat". DEPTH must be a power of two.
module fifo #(
  parameter int DEPTH  = 16,
  parameter int WIDTH  = 32,
  parameter int ALMOST = 2,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_b,
  input  logic             wr_en,
  input  logic             rd_en,
  input  logic [WIDTH-1:0] wr_dat,
  output logic [WIDTH-1:0] rd_dat,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      available,
  output logic             afull,
  output logic             aempty
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, rptr;

  assign available = wptr - rptr;
  assign empty  = (wptr == rptr);
  assign full   = (available == (AW+1)'(DEPTH));
  assign afull  = ((AW+1)'(DEPTH) - available) <= (AW+1)'(ALMOST);
  assign aempty = available <= (AW+1)'(ALMOST);

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wptr[AW-1:0]] <= wr_dat;
    if (rd_en && !empty) rd_dat <= mem[rptr[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_en && !full) wptr <= wptr + 1'b1;
      if (rd_en && !empty) rptr <= rptr + 1'b1;
    end
  end
endmodule
