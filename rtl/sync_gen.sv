// sync_gen: video timing generator.
//
// Counts pixels (x) and lines (y) on the pixel clock and produces horizontal and vertical sync
// pulses and a border flag that is high outside the visible H_ACTIVE x V_ACTIVE area.
// x and y count from 0 at the first visible pixel; after the visible part of a line come the
// front porch, the sync pulse and the back porch. All outputs are registered and change on the
// same fbclk edge. While rst_b is low the outputs describe the first visible pixel
// (x = y = 0, border low), which is shown as soon as rst_b rises (the framebuffer holds this
// block in reset until its pixel FIFO has data, so the first frame starts with the first fetched word).
// The port names follow the published framebuffer; the timing numbers are the standard
// 640x480 at 60 Hz mode (25 MHz pixel clock), with active-low sync pulses, chosen here because
// the system draws 640x480 frames.
module sync_gen #(
  parameter int H_ACTIVE = 640, parameter int H_FP = 16, parameter int H_SYNC = 96, parameter int H_BP = 48,
  parameter int V_ACTIVE = 480, parameter int V_FP = 10, parameter int V_SYNC = 2,  parameter int V_BP = 33
) (
  input  logic        fbclk,
  input  logic        rst_b,
  output logic        vs,
  output logic        hs,
  output logic [11:0] x,
  output logic [11:0] y,
  output logic        border
);
  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  logic [11:0] nx, ny;

  always_comb begin
    nx = x + 12'd1;
    ny = y;
    if (nx == 12'(H_TOTAL)) begin
      nx = '0;
      ny = (y == 12'(V_TOTAL - 1)) ? '0 : y + 12'd1;
    end
  end

  always_ff @(posedge fbclk or negedge rst_b) begin
    if (!rst_b) begin
      x <= '0; y <= '0; hs <= 1'b1; vs <= 1'b1; border <= 1'b0;
    end else begin
      x <= nx;
      y <= ny;
      hs <= !(nx >= 12'(H_ACTIVE + H_FP) && nx < 12'(H_ACTIVE + H_FP + H_SYNC));
      vs <= !(ny >= 12'(V_ACTIVE + V_FP) && ny < 12'(V_ACTIVE + V_FP + V_SYNC));
      border <= (nx >= 12'(H_ACTIVE)) || (ny >= 12'(V_ACTIVE));
    end
  end
endmodule
