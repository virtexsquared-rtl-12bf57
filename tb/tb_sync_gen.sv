// tb_sync_gen: the video timing generator with a small mode (8x4 visible, porches and syncs
// of a few pixels/lines) so that whole frames run quickly. An independent pixel/line counter
// in the testbench follows the outputs. Checks: x and y step in raster order and wrap at the
// totals; border is low exactly on the visible area (count per frame); hs is low for H_SYNC
// pixels per line starting H_ACTIVE+H_FP after the line start; vs is low for V_SYNC whole lines;
// counters stay at 0 in reset.
module tb_sync_gen;
  `include "tb_common.svh"
  localparam int HA = 8, HF = 2, HS = 3, HB = 2, VA = 4, VF = 1, VS = 2, VB = 1;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  logic fbclk = 0, rst_b = 0, vs, hs, border;
  logic [11:0] x, y;
  sync_gen #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
             .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)) dut (.*);
  always #5 fbclk = ~fbclk;
  `WATCHDOG(fbclk, 10000)

  initial begin
    int ex, ey, vis, hsl, vsl;
    repeat (5) @(negedge fbclk);
    check(x == 0 && y == 0 && hs && vs, "idle in reset");
    rst_b = 1;
    ex = 0; ey = 0;
    for (int f = 0; f < 3; f++) begin
      vis = 0; vsl = 0;
      for (int l = 0; l < VT; l++) begin
        hsl = 0;
        for (int p = 0; p < HT; p++) begin
          @(negedge fbclk);
          ex = (ex + 1) % HT;
          if (ex == 0) ey = (ey + 1) % VT;
          check(x == 12'(ex) && y == 12'(ey), $sformatf("position %0d,%0d got %0d,%0d", ex, ey, x, y));
          check(border == !(ex < HA && ey < VA), "border outside the visible area only");
          check(hs == !(ex >= HA + HF && ex < HA + HF + HS), "hs position");
          check(vs == !(ey >= VA + VF && ey < VA + VF + VS), "vs position");
          if (!border) vis++;
          if (!hs) hsl++;
          if (!vs) vsl++;
        end
        check(hsl == HS, "hs width");
      end
      check(vis == HA * VA, $sformatf("visible pixels per frame %0d", vis));
      check(vsl == VS * HT, "vs width in lines");
    end
    tb_finish();
  end
endmodule
