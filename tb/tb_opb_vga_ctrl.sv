// tb_opb_vga_ctrl: the VGA controller with a shrunken screen (16 x 8
// visible pixels, 8 x 4 stored) so that many frames fit in a short run.
// A bus-master model writes random pictures pixel by pixel; an independent
// VGA receiver locks to the sync pulses and captures whole frames. Each
// captured frame must show every stored pixel as a 2x2 block in the right
// palette colour, be black outside the picture and have correct sync
// timing. A picture is also rewritten while being displayed, and a write
// just outside the controller's address window must go unanswered.
module tb_opb_vga_ctrl;
  import vga_pkg::*;
  import tb_vga_pkg::*;

  localparam int CD = 4;
  localparam int HF = 2, HS = 4, HB = 3, HL = 1, HP = 16, HR = 2;
  localparam int VF = 1, VS = 2, VB = 2, VT = 1, VP = 8, VBB = 1;
  localparam int COLS = HP / 2, ROWS = VP / 2;
  localparam logic [31:0] BASE = 32'h8000_0000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  opb_req_t req;
  opb_rsp_t rsp;
  logic     hs_n, vs_n;
  rgb_t     rgb;

  opb_vga_ctrl #(
    .C_BASEADDR(BASE), .C_HIGHADDR(BASE + 32'h1_FFFF), .CLK_DIV(CD),
    .H_FRONT(HF), .H_SYNC(HS), .H_BACK(HB), .H_LBORDER(HL), .H_PIXEL(HP), .H_RBORDER(HR),
    .V_FRONT(VF), .V_SYNC(VS), .V_BACK(VB), .V_TBORDER(VT), .V_PIXEL(VP), .V_BBORDER(VBB)
  ) dut (.clk, .rst, .opb_req(req), .opb_rsp(rsp),
         .vga_hsync_n(hs_n), .vga_vsync_n(vs_n), .vga_rgb(rgb));

  opb_cpu_model u_cpu (.clk, .req, .rsp);

  vga_monitor #(
    .CLK_DIV(CD),
    .H_FRONT(HF), .H_SYNC(HS), .H_BACK(HB), .H_LBORDER(HL), .H_PIXEL(HP), .H_RBORDER(HR),
    .V_FRONT(VF), .V_SYNC(VS), .V_BACK(VB), .V_TBORDER(VT), .V_PIXEL(VP), .V_BBORDER(VBB)
  ) u_mon (.clk, .hsync_n(hs_n), .vsync_n(vs_n), .rgb);

  int checks = 0, failures = 0;
  logic [3:0] img [COLS * ROWS];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic wait_frames(input int n);
    int f0 = u_mon.frames;
    while (u_mon.frames < f0 + n) @(negedge clk);
  endtask

  task automatic check_frame();
    for (int r = 0; r < VP; r++)
      for (int c = 0; c < HP; c++) begin
        checks++;
        if (u_mon.frame[r][c] !== PAL[img[(r / 2) * COLS + c / 2]]) begin
          failures++;
          if (failures < 10) $display("FAIL pixel r=%0d c=%0d got %b exp %b",
                                      r, c, u_mon.frame[r][c], PAL[img[(r / 2) * COLS + c / 2]]);
        end
      end
  endtask

  initial begin
    bit ok;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int pic = 0; pic < 4; pic++) begin
      for (int a = 0; a < COLS * ROWS; a++) begin
        img[a] = (pic == 0) ? 4'(a) : 4'($urandom);
        u_cpu.write(BASE + 32'(a), ($urandom & 32'hFFFF_FFF0) | 32'(img[a]), ok);
        chk(ok, "write acknowledged");
      end
      wait_frames(2);
      check_frame();
    end
    // Outside the window: no acknowledge, picture unchanged.
    u_cpu.write(BASE + 32'h2_0000, 32'hF, ok);
    chk(!ok, "write outside window not acknowledged");
    wait_frames(1);
    check_frame();
    chk(u_mon.errors == 0, "sync timing and blanking");
    chk(u_mon.frames >= 9, "frames seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
