// vga_monitor: independent VGA receiver for testbenches. It knows only the
// VGA line and frame timing (segment lengths and clocks per pixel), locks
// to the falling edges of the sync pulses, and samples the colour in the
// middle of every pixel slot. Each complete visible window is stored in
// `frame` and counted in `frames`. It also checks, once locked, that the
// sync pulses have the right width and period and that the colour is black
// outside the visible window; every violation is counted in `errors`.
module vga_monitor
  import vga_pkg::*;
#(
  parameter int unsigned CLK_DIV   = 4,
  parameter int unsigned H_FRONT   = 8,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned H_BACK    = 40,
  parameter int unsigned H_LBORDER = 8,
  parameter int unsigned H_PIXEL   = 640,
  parameter int unsigned H_RBORDER = 8,
  parameter int unsigned V_FRONT   = 2,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_BACK    = 25,
  parameter int unsigned V_TBORDER = 8,
  parameter int unsigned V_PIXEL   = 480,
  parameter int unsigned V_BBORDER = 8
) (
  input logic clk,
  input logic hsync_n,
  input logic vsync_n,
  input rgb_t rgb
);

  localparam int H_PERIOD = H_FRONT + H_SYNC + H_BACK + H_LBORDER + H_PIXEL + H_RBORDER;
  localparam int V_PERIOD = V_FRONT + V_SYNC + V_BACK + V_TBORDER + V_PIXEL + V_BBORDER;
  localparam int H_VIS0   = H_FRONT + H_SYNC + H_BACK + H_LBORDER;  // first visible x
  localparam int V_VIS0   = V_FRONT + V_SYNC + V_BACK + V_TBORDER;  // first visible y

  rgb_t frame [V_PIXEL][H_PIXEL];
  int unsigned frames = 0;
  int unsigned errors = 0;
  int unsigned hsyncs = 0;
  int unsigned vsyncs = 0;

  logic hs_d = 1'b1, vs_d = 1'b1;
  int   hcnt = 0;         // clocks since the last hsync fall
  int   hlow = 0;         // clocks hsync has been low
  int   lcnt = -1;        // hsync falls since the last vsync fall
  int   vlow_lines = 0;   // hsync falls seen while vsync low
  bit   h_locked = 0, v_locked = 0;
  int   px, py;

  function automatic void note_error(input int line);
    errors++;
    if (errors <= 5) $display("vga_monitor: violation (check at line %0d) x slot %0d, line %0d, t=%0t",
                              line, hcnt / int'(CLK_DIV), lcnt, $time);
  endfunction

  always @(negedge clk) begin
    // horizontal
    if (hs_d && !hsync_n) begin
      if (h_locked && hcnt + 1 != H_PERIOD * int'(CLK_DIV)) note_error(`__LINE__);
      h_locked = 1;
      hcnt = 0;
      hlow = 0;
      hsyncs++;
      if (v_locked) begin
        lcnt++;
        if (!vsync_n) vlow_lines++;
        if (lcnt == V_VIS0 + int'(V_PIXEL) - V_FRONT) frames++;
      end
    end else begin
      hcnt++;
    end
    if (!hsync_n) hlow++;
    if (!hs_d && hsync_n && h_locked && hlow != H_SYNC * int'(CLK_DIV)) note_error(`__LINE__);

    // vertical
    if (vs_d && !vsync_n) begin
      if (v_locked && lcnt != V_PERIOD - 1) note_error(`__LINE__);
      v_locked = 1;
      lcnt = -1;
      vlow_lines = 0;
      vsyncs++;
    end
    if (!vs_d && vsync_n && v_locked && vlow_lines != V_SYNC) note_error(`__LINE__);

    // pixel: slot position relative to the sync falls
    if (h_locked && v_locked && lcnt >= 0) begin
      px = hcnt / int'(CLK_DIV) + H_FRONT;
      py = lcnt + V_FRONT;
      if (px >= H_VIS0 && px < H_VIS0 + int'(H_PIXEL) &&
          py >= V_VIS0 && py < V_VIS0 + int'(V_PIXEL)) begin
        if (hcnt % int'(CLK_DIV) == int'(CLK_DIV) / 2)
          frame[py - V_VIS0][px - H_VIS0] = rgb;
      end else if (rgb != '0) begin
        note_error(`__LINE__);
      end
    end
    hs_d = hsync_n;
    vs_d = vsync_n;
  end

endmodule
