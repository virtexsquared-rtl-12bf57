// async_fifo: dual-clock first-in first-out buffer.
//
// The RAM is written on iclk and read on oclk. Each side keeps a binary pointer one bit wider
// than the RAM index and a registered Gray-code copy of it; the Gray copy crosses to the other
// clock through two more flip-flops. empty (oclk side) compares the read pointer with the
// synchronized write pointer, full (iclk side) the write pointer with the synchronized read
// pointer. Because the far pointer is always late, the flags can only be pessimistic: empty may
// stay high for a few cycles after a write, full may stay high after a read, never the other
// way round. A read registers the head entry onto rd_dat on the next oclk edge, as in fifo.sv.
// This structure is the published one; DEPTH must be a power of two.
module async_fifo #(
  parameter int DEPTH = 16,
  parameter int WIDTH = 32,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             iclk,
  input  logic             oclk,
  input  logic             iclk_rst_b,
  input  logic             oclk_rst_b,
  input  logic             wr_en,
  input  logic             rd_en,
  input  logic [WIDTH-1:0] wr_dat,
  output logic [WIDTH-1:0] rd_dat,
  output logic             empty,
  output logic             full
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, wgray, rptr, rgray;
  logic [AW:0] rgray_s1, rgray_iclk, wgray_s1, wgray_oclk;

  function automatic logic [AW:0] to_gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write side (iclk)
  assign full = (wgray == {~rgray_iclk[AW:AW-1], rgray_iclk[AW-2:0]});
  always_ff @(posedge iclk) if (wr_en && !full) mem[wptr[AW-1:0]] <= wr_dat;
  always_ff @(posedge iclk or negedge iclk_rst_b) begin
    if (!iclk_rst_b) begin
      wptr <= '0; wgray <= '0; rgray_s1 <= '0; rgray_iclk <= '0;
    end else begin
      if (wr_en && !full) begin
        wptr  <= wptr + 1'b1;
        wgray <= to_gray(wptr + 1'b1);
      end
      rgray_s1   <= rgray;
      rgray_iclk <= rgray_s1;
    end
  end

  // Read side (oclk)
  assign empty = (rgray == wgray_oclk);
  always_ff @(posedge oclk) if (rd_en && !empty) rd_dat <= mem[rptr[AW-1:0]];
  always_ff @(posedge oclk or negedge oclk_rst_b) begin
    if (!oclk_rst_b) begin
      rptr <= '0; rgray <= '0; wgray_s1 <= '0; wgray_oclk <= '0;
    end else begin
      if (rd_en && !empty) begin
        rptr  <= rptr + 1'b1;
        rgray <= to_gray(rptr + 1'b1);
      end
      wgray_s1   <= wgray;
      wgray_oclk <= wgray_s1;
    end
  end
endmodule
