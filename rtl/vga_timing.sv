// vga_timing: pixel-rate enable and raster counters for a 640x480 VGA
// screen driven from the 100 MHz bus clock.
//
// A free-running counter divides the clock by CLK_DIV (4: 100 MHz -> 25 MHz,
// close enough to the nominal 25.175 MHz pixel clock). `tick` is high for
// one clock out of CLK_DIV; it is an enable, never used as a clock. On each
// tick the horizontal position x advances through H_PERIOD = 800 pixel
// slots and, at the end of a line, the vertical position y through
// V_PERIOD = 525 lines.
//
// A line starts with the front porch, then the sync pulse, back porch,
// left border, the 640 visible pixels and the right border; a frame is
// ordered the same way with lines. The sync pulses are active low. All
// outputs describe the current position (x, y): they are decoded
// combinationally from the counters, which change on the clock edge that
// ends a tick cycle. Counter widths and the segment lengths follow the
// original controller; the synchronous active-high reset is this
// implementation's choice.
//
// Ports
//   clk, rst      bus clock, synchronous reset
//   tick          pixel enable, 1 clock in CLK_DIV
//   x, y          current raster position
//   hsync_n       low while x is inside the horizontal sync pulse
//   vsync_n       low while y is inside the vertical sync pulse
//   h_act, v_act  x (resp. y) is inside the visible 640 (480) window
//   last_col      x is the last visible pixel of a line
//   row_odd       y is an odd line counted from the first visible one
module vga_timing #(
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
  parameter int unsigned V_BBORDER = 8,
  localparam int unsigned H_PERIOD = H_FRONT + H_SYNC + H_BACK + H_LBORDER + H_PIXEL + H_RBORDER,
  localparam int unsigned V_PERIOD = V_FRONT + V_SYNC + V_BACK + V_TBORDER + V_PIXEL + V_BBORDER,
  localparam int unsigned XW = $clog2(H_PERIOD),
  localparam int unsigned YW = $clog2(V_PERIOD)
) (
  input  logic          clk,
  input  logic          rst,
  output logic          tick,
  output logic [XW-1:0] x,
  output logic [YW-1:0] y,
  output logic          hsync_n,
  output logic          vsync_n,
  output logic          h_act,
  output logic          v_act,
  output logic          last_col,
  output logic          row_odd
);

  localparam int unsigned DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  // Segment start positions within a line / frame.
  localparam int unsigned H_SYNC_START  = H_FRONT;
  localparam int unsigned H_SYNC_END    = H_SYNC_START + H_SYNC;
  localparam int unsigned H_PIXEL_START = H_SYNC_END + H_BACK + H_LBORDER;
  localparam int unsigned H_PIXEL_END   = H_PIXEL_START + H_PIXEL;
  localparam int unsigned V_SYNC_START  = V_FRONT;
  localparam int unsigned V_SYNC_END    = V_SYNC_START + V_SYNC;
  localparam int unsigned V_PIXEL_START = V_SYNC_END + V_BACK + V_TBORDER;
  localparam int unsigned V_PIXEL_END   = V_PIXEL_START + V_PIXEL;

  logic [DW-1:0] div_cnt;
  logic [YW-1:0] row_rel;

  assign tick = (div_cnt == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt <= '0;
      x       <= '0;
      y       <= '0;
    end else begin
      div_cnt <= (div_cnt == DW'(CLK_DIV - 1)) ? '0 : div_cnt + 1'b1;
      if (tick) begin
        if (x == XW'(H_PERIOD - 1)) begin
          x <= '0;
          y <= (y == YW'(V_PERIOD - 1)) ? '0 : y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end

  always_comb begin
    hsync_n  = !(x >= XW'(H_SYNC_START) && x < XW'(H_SYNC_END));
    vsync_n  = !(y >= YW'(V_SYNC_START) && y < YW'(V_SYNC_END));
    h_act    = (x >= XW'(H_PIXEL_START)) && (x < XW'(H_PIXEL_END));
    v_act    = (y >= YW'(V_PIXEL_START)) && (y < YW'(V_PIXEL_END));
    last_col = (x == XW'(H_PIXEL_END - 1));
    row_rel  = y - YW'(V_PIXEL_START);
    row_odd  = row_rel[0];
  end

endmodule
