// bmp_display_top: FPGA-side hardware of a small image viewer. A soft
// processor receives a 16-colour bitmap over a serial line, keeps it in
// external SDRAM, optionally replaces it by its differences along x or y
// (a simple edge detector) according to the board switches, and copies
// the result into the frame store of a VGA controller, which shows it at
// 640 x 480.
//
// All image processing is software. The hardware built here is the VGA
// controller and the response side of the peripheral bus (OPB) that the
// processor uses to reach it. The processor itself, the switch GPIO, the
// serial UART and the DDR SDRAM controller are standard parts of the
// processor platform and are not included: the processor's bus request
// enters on `cpu_req` (and is what the other peripherals see too), their
// responses enter on `gpio_rsp`, `uart_rsp` and `ddr_rsp`, and the
// combined response leaves on `cpu_rsp`.
//
// The system structure follows the original; the packaging of the bus
// into structs is this implementation's choice. Parameters are passed to
// the VGA controller, see opb_vga_ctrl for their meaning and timing.
module bmp_display_top
  import vga_pkg::*;
#(
  parameter logic [31:0] VGA_BASEADDR = 32'h8000_0000,
  parameter logic [31:0] VGA_HIGHADDR = 32'h8001_FFFF,
  parameter int unsigned CLK_DIV      = 4,
  parameter int unsigned H_FRONT      = 8,
  parameter int unsigned H_SYNC       = 96,
  parameter int unsigned H_BACK       = 40,
  parameter int unsigned H_LBORDER    = 8,
  parameter int unsigned H_PIXEL      = 640,
  parameter int unsigned H_RBORDER    = 8,
  parameter int unsigned V_FRONT      = 2,
  parameter int unsigned V_SYNC       = 2,
  parameter int unsigned V_BACK       = 25,
  parameter int unsigned V_TBORDER    = 8,
  parameter int unsigned V_PIXEL      = 480,
  parameter int unsigned V_BBORDER    = 8
) (
  input  logic     clk,
  input  logic     rst,
  // processor bus master
  input  opb_req_t cpu_req,
  output opb_rsp_t cpu_rsp,
  // responses of the platform peripherals
  input  opb_rsp_t gpio_rsp,
  input  opb_rsp_t uart_rsp,
  input  opb_rsp_t ddr_rsp,
  // VGA connector
  output logic     vga_hsync_n,
  output logic     vga_vsync_n,
  output rgb_t     vga_rgb
);

  opb_rsp_t vga_rsp;
  opb_rsp_t slv_rsp [4];

  opb_vga_ctrl #(
    .C_BASEADDR(VGA_BASEADDR), .C_HIGHADDR(VGA_HIGHADDR), .CLK_DIV(CLK_DIV),
    .H_FRONT(H_FRONT), .H_SYNC(H_SYNC), .H_BACK(H_BACK),
    .H_LBORDER(H_LBORDER), .H_PIXEL(H_PIXEL), .H_RBORDER(H_RBORDER),
    .V_FRONT(V_FRONT), .V_SYNC(V_SYNC), .V_BACK(V_BACK),
    .V_TBORDER(V_TBORDER), .V_PIXEL(V_PIXEL), .V_BBORDER(V_BBORDER)
  ) u_vga (
    .clk, .rst, .opb_req(cpu_req), .opb_rsp(vga_rsp),
    .vga_hsync_n, .vga_vsync_n, .vga_rgb
  );

  always_comb begin
    slv_rsp[0] = vga_rsp;
    slv_rsp[1] = gpio_rsp;
    slv_rsp[2] = uart_rsp;
    slv_rsp[3] = ddr_rsp;
  end

  opb_bus #(.NSLV(4)) u_bus (.slv_rsp, .mst_rsp(cpu_rsp));

endmodule
