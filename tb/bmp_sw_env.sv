// bmp_sw_env: everything around the FPGA hardware of the image viewer, for
// system testbenches. It holds behavioural models of the processor's bus
// master (opb_cpu_model), of the DDR SDRAM controller with its memory and
// of the switch GPIO (opb_mem_model), an independent VGA receiver
// (vga_monitor), and, in `run_mode`, the viewer's program written as bus
// transfers:
//   load_image   a 4-bit-per-pixel bitmap as it arrives on the serial line
//                (bottom line first, two pixels per byte, high nibble
//                first) is unpacked into SDRAM, one byte per pixel;
//   flip_image   the lines are swapped in place so the top line comes first;
//   run_mode     the switches are read; mode 0 copies the picture to video
//                memory, mode 1 writes the difference of horizontally
//                adjacent pixels, mode 2 that of vertically adjacent ones,
//                each into SDRAM after the picture and then to video memory.
// Every pixel written to video memory is also kept in a shadow copy;
// check_frame compares a captured frame with the shadow, each stored pixel
// expected as a 2x2 block of its palette colour.
module bmp_sw_env
  import vga_pkg::*;
  import tb_vga_pkg::*;
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
  parameter int unsigned V_BBORDER = 8,
  parameter logic [31:0] VGA_BASE  = 32'h8000_0000,
  parameter logic [31:0] DDR_BASE  = 32'h2000_0000,
  parameter logic [31:0] GPIO_BASE = 32'h4000_0000
) (
  input  logic     clk,
  output opb_req_t cpu_req,
  input  opb_rsp_t cpu_rsp,
  output opb_rsp_t gpio_rsp,
  output opb_rsp_t ddr_rsp,
  input  logic     hsync_n,
  input  logic     vsync_n,
  input  rgb_t     rgb
);

  localparam int W = H_PIXEL / 2;
  localparam int H = V_PIXEL / 2;
  localparam int N = W * H;

  opb_cpu_model u_cpu (.clk, .req(cpu_req), .rsp(cpu_rsp));
  opb_mem_model #(.BASE(DDR_BASE), .BYTES(2 * N + 16)) u_ddr (.clk, .req(cpu_req), .rsp(ddr_rsp));
  opb_mem_model #(.BASE(GPIO_BASE), .BYTES(4)) u_gpio (.clk, .req(cpu_req), .rsp(gpio_rsp));

  vga_monitor #(
    .CLK_DIV(CLK_DIV),
    .H_FRONT(H_FRONT), .H_SYNC(H_SYNC), .H_BACK(H_BACK), .H_LBORDER(H_LBORDER),
    .H_PIXEL(H_PIXEL), .H_RBORDER(H_RBORDER),
    .V_FRONT(V_FRONT), .V_SYNC(V_SYNC), .V_BACK(V_BACK), .V_TBORDER(V_TBORDER),
    .V_PIXEL(V_PIXEL), .V_BBORDER(V_BBORDER)
  ) u_mon (.clk, .hsync_n, .vsync_n, .rgb);

  logic [3:0] shadow [N];
  logic [3:0] picture [N];      // the picture as it should look, top line first
  int unsigned checks = 0, failures = 0;
  int unsigned bus_errors = 0;
  int unsigned vga_writes = 0, ddr_xfers = 0, gpio_reads = 0;
  int unsigned h_pairs = 0, v_pairs = 0, frames_checked = 0;
  int unsigned mode_runs [3] = '{0, 0, 0};

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic ddr_wr(input int a, input logic [7:0] d);
    bit ok;
    u_cpu.write(DDR_BASE + 32'(a), {24'h0, d}, ok);
    if (!ok) bus_errors++;
    ddr_xfers++;
  endtask

  task automatic ddr_rd(input int a, output logic [7:0] d);
    bit ok;
    logic [31:0] v;
    u_cpu.read(DDR_BASE + 32'(a), v, ok);
    if (!ok) bus_errors++;
    d = v[7:0];
    ddr_xfers++;
  endtask

  task automatic vga_wr(input int a, input logic [7:0] d);
    bit ok;
    u_cpu.write(VGA_BASE + 32'(a), {24'h0, d}, ok);
    if (!ok) bus_errors++;
    shadow[a] = d[3:0];
    vga_writes++;
  endtask

  // Unpack a generated bitmap, bottom line first as a BMP file stores it.
  task automatic load_image(input int seed);
    int n = 0;
    for (int i = 0; i < N; i++) picture[i] = 4'($urandom);
    if (seed == 0) for (int i = 0; i < N; i++) picture[i] = 4'(i % 16);
    for (int row = H - 1; row >= 0; row--)
      for (int j = 0; j < W; j += 2) begin
        logic [7:0] b = {picture[row * W + j], picture[row * W + j + 1]};
        ddr_wr(n++, {4'h0, b[7:4]});
        ddr_wr(n++, {4'h0, b[3:0]});
      end
  endtask

  task automatic flip_image();
    logic [7:0] a, b;
    for (int i = 0; i < H / 2; i++)
      for (int j = 0; j < W; j++) begin
        ddr_rd(j + i * W, a);
        ddr_rd(j + (H - 1 - i) * W, b);
        ddr_wr(j + i * W, b);
        ddr_wr(j + (H - 1 - i) * W, a);
      end
  endtask

  task automatic run_mode(input int mode);
    logic [31:0] sw;
    logic [7:0]  p, q, d;
    bit ok;
    int n;
    u_gpio.mem[0] = 8'(mode << 6);
    u_cpu.read(GPIO_BASE, sw, ok);
    if (!ok) bus_errors++;
    gpio_reads++;
    chk(int'(sw[7:6]) == mode, "switches read back");
    mode_runs[mode]++;
    n = N;
    if (mode == 0) begin
      for (int i = 0; i < N; i++) begin
        ddr_rd(i, p);
        vga_wr(i, p);
      end
    end else begin
      // differences along x (mode 1) or y (mode 2) stored after the picture
      for (int i = 0; i < (mode == 2 ? H - 1 : H); i++)
        for (int j = 0; j < W; j++) begin
          ddr_rd(j + W * i, p);
          ddr_rd(mode == 1 ? j + 1 + W * i : j + W * (i + 1), q);
          d = p - q;
          ddr_wr(n++, d);
        end
      for (int k = N; k < n; k++) begin
        ddr_rd(k, p);
        vga_wr(k - N, p);
      end
    end
  endtask

  task automatic wait_frames(input int n);
    int f0 = u_mon.frames;
    while (u_mon.frames < f0 + n) @(negedge clk);
  endtask

  task automatic check_frame();
    int bad = 0;
    for (int r = 0; r < V_PIXEL; r++)
      for (int c = 0; c < H_PIXEL; c++) begin
        logic [8:0] exp_c = PAL[shadow[(r / 2) * W + c / 2]];
        if (u_mon.frame[r][c] !== exp_c) begin
          bad++;
          if (bad < 5) $display("FAIL pixel r=%0d c=%0d got %b exp %b", r, c, u_mon.frame[r][c], exp_c);
        end
        if (c % 2 == 1 && u_mon.frame[r][c] === u_mon.frame[r][c - 1]) h_pairs++;
        if (r % 2 == 1 && u_mon.frame[r][c] === u_mon.frame[r - 1][c]) v_pairs++;
      end
    checks += V_PIXEL * H_PIXEL;
    failures += bad;
    frames_checked++;
  endtask

  // The picture in SDRAM after flipping must be the picture, top line first.
  task automatic check_sdram_picture();
    int bad = 0;
    for (int i = 0; i < N; i++) if (u_ddr.mem[i] !== {4'h0, picture[i]}) bad++;
    chk(bad == 0, "picture upright in SDRAM");
  endtask

endmodule
