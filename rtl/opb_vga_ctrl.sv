// opb_vga_ctrl: 16-colour VGA controller with its own frame store, attached
// to the on-chip peripheral bus.
//
// The processor writes one 4-bit colour index per pixel of a 320 x 240
// picture into the controller's video memory; the controller scans that
// memory continuously and shows it on a 640 x 480, 60 Hz VGA screen,
// painting each stored pixel as a 2x2 block. Whatever is in memory is on
// the screen, so a picture appears as soon as it has been written.
//
// Inside:
//   opb_vga_slave  bus writes in the address window -> video-memory port B
//   vram           COLS x ROWS x 4 bits, port A read by the display
//   vga_timing     divides the bus clock by CLK_DIV, x/y raster counters
//   vga_addr_gen   read address with each stored pixel used for 2x2 screen
//                  pixels
//   color_lut      index -> 3 bits each of red, green, blue; black when
//                  blanked
//
// Timing: on a pixel tick the raster counters and the read address move to
// pixel P; memory returns its word one clock later; on the next tick the
// colour of P and the sync levels of P are registered onto the VGA pins
// together. The outputs thus lag the counters by one pixel period
// (CLK_DIV clocks) and are glitch-free, with sync and colour aligned. This
// needs CLK_DIV >= 2. A write from the bus is visible from the next frame
// that scans its address.
//
// The structure, sizes, colour table, the 100 MHz / 4 pixel rate and the
// line and frame timing follow the original controller. The single
// register stage on the outputs and the address pairing described in
// vga_addr_gen are this implementation's choices.
//
// Ports
//   clk, rst        bus clock (100 MHz), synchronous reset
//   opb_req/opb_rsp bus request from the master, this slave's response
//   vga_hsync_n, vga_vsync_n   sync pulses, active low
//   vga_rgb         3-bit red, green and blue levels
module opb_vga_ctrl
  import vga_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'h8000_0000,
  parameter logic [31:0] C_HIGHADDR = 32'h8001_FFFF,
  parameter int unsigned CLK_DIV    = 4,
  parameter int unsigned H_FRONT    = 8,
  parameter int unsigned H_SYNC     = 96,
  parameter int unsigned H_BACK     = 40,
  parameter int unsigned H_LBORDER  = 8,
  parameter int unsigned H_PIXEL    = 640,
  parameter int unsigned H_RBORDER  = 8,
  parameter int unsigned V_FRONT    = 2,
  parameter int unsigned V_SYNC     = 2,
  parameter int unsigned V_BACK     = 25,
  parameter int unsigned V_TBORDER  = 8,
  parameter int unsigned V_PIXEL    = 480,
  parameter int unsigned V_BBORDER  = 8
) (
  input  logic     clk,
  input  logic     rst,
  input  opb_req_t opb_req,
  output opb_rsp_t opb_rsp,
  output logic     vga_hsync_n,
  output logic     vga_vsync_n,
  output rgb_t     vga_rgb
);

  localparam int unsigned COLS  = H_PIXEL / 2;
  localparam int unsigned ROWS  = V_PIXEL / 2;
  localparam int unsigned DEPTH = COLS * ROWS;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  // Bus side.
  logic          we;
  logic [AW-1:0] waddr;
  logic [3:0]    wdata;

  opb_vga_slave #(
    .C_BASEADDR(C_BASEADDR), .C_HIGHADDR(C_HIGHADDR), .AW(AW), .DW(4)
  ) u_slave (
    .clk, .rst, .req(opb_req), .rsp(opb_rsp),
    .we, .waddr, .wdata
  );

  // Display side.
  logic                        tick, hsync_n, vsync_n, h_act, v_act, last_col, row_odd;
  logic [AW-1:0]               raddr;
  logic [3:0]                  rdata;
  rgb_t                        rgb;

  vga_timing #(
    .CLK_DIV(CLK_DIV),
    .H_FRONT(H_FRONT), .H_SYNC(H_SYNC), .H_BACK(H_BACK),
    .H_LBORDER(H_LBORDER), .H_PIXEL(H_PIXEL), .H_RBORDER(H_RBORDER),
    .V_FRONT(V_FRONT), .V_SYNC(V_SYNC), .V_BACK(V_BACK),
    .V_TBORDER(V_TBORDER), .V_PIXEL(V_PIXEL), .V_BBORDER(V_BBORDER)
  ) u_timing (
    .clk, .rst, .tick, .x(), .y(), .hsync_n, .vsync_n,
    .h_act, .v_act, .last_col, .row_odd
  );

  vga_addr_gen #(.COLS(COLS), .AW(AW)) u_addr (
    .clk, .rst, .tick, .h_act, .v_act, .last_col, .row_odd, .addr(raddr)
  );

  vram #(.DEPTH(DEPTH), .WIDTH(4), .AW(AW)) u_vram (
    .clka(clk), .addra(raddr), .douta(rdata),
    .clkb(clk), .addrb(waddr), .dinb(wdata), .web(we)
  );

  color_lut u_lut (.idx(rdata), .visible(h_act && v_act), .rgb);

  // Output register: sync and colour of the pixel that is ending.
  always_ff @(posedge clk) begin
    if (rst) begin
      vga_hsync_n <= 1'b1;
      vga_vsync_n <= 1'b1;
      vga_rgb     <= '0;
    end else if (tick) begin
      vga_hsync_n <= hsync_n;
      vga_vsync_n <= vsync_n;
      vga_rgb     <= rgb;
    end
  end

  initial assert (CLK_DIV >= 2) else $error("opb_vga_ctrl needs CLK_DIV >= 2");

endmodule
