// rs232_tx: serial transmitter, 8 data bits, no parity, one stop bit (8N1), LSB first.
//
// When idle (busy low) a one-cycle wr_en loads wr_data; the line then sends a start bit (0),
// the eight data bits and a stop bit (1), each CLKS_PER_BIT clock cycles long, and busy falls
// after the stop bit. The line idles high. The frame format is standard RS-232; the bit time
// (CLKS_PER_BIT, default for 115200 baud from a 100 MHz clock) is this design's choice.
module rs232_tx #(
  parameter int CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_b,
  input  logic       wr_en,
  input  logic [7:0] wr_data,
  output logic       busy,
  output logic       txd
);
  logic [9:0] shreg;
  logic [3:0] nbits;
  logic [$clog2(CLKS_PER_BIT)-1:0] div;
  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      shreg <= '1; nbits <= '0; div <= '0; busy <= 1'b0; txd <= 1'b1;
    end else if (!busy) begin
      if (wr_en) begin
        shreg <= {1'b1, wr_data, 1'b0};
        nbits <= 4'd10;
        div   <= '0;
        busy  <= 1'b1;
      end
    end else begin
      if (div == '0) begin
        txd   <= shreg[0];
        shreg <= {1'b1, shreg[9:1]};
      end
      if (div == ($clog2(CLKS_PER_BIT))'(CLKS_PER_BIT - 1)) begin
        div <= '0;
        nbits <= nbits - 1'b1;
        if (nbits == 4'd1) busy <= 1'b0;
      end else begin
        div <= div + 1'b1;
      end
    end
  end
endmodule
