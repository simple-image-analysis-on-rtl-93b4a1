// tb_bmp_display_top: end-to-end run of the image viewer on a shrunken
// screen (32 x 24 visible, 16 x 12 stored). The viewer program runs on the
// processor model against the hardware: a bitmap is unpacked into SDRAM
// and flipped upright, then the switches select, in turn, the plain
// picture, the x differences, the y differences and the plain picture
// again; after each, two frames are captured from the VGA pins and
// compared with what was written to video memory. Each mechanism must have
// happened: video-memory writes acknowledged by the controller, SDRAM and
// switch transfers answered by other slaves through the shared bus (whose
// addresses alias video-memory addresses and must not land there), every
// mode, horizontal pixel doubling, line repetition, blanking and sync.
module tb_bmp_display_top;
  import vga_pkg::*;

  localparam int CD = 4;
  localparam int HF = 2, HS = 4, HB = 3, HL = 1, HP = 32, HR = 2;
  localparam int VF = 1, VS = 2, VB = 2, VT = 1, VP = 24, VBB = 1;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  opb_req_t cpu_req;
  opb_rsp_t cpu_rsp, gpio_rsp, ddr_rsp, uart_rsp;
  logic     hs_n, vs_n;
  rgb_t     rgb;

  assign uart_rsp = '0;

  bmp_display_top #(
    .CLK_DIV(CD),
    .H_FRONT(HF), .H_SYNC(HS), .H_BACK(HB), .H_LBORDER(HL), .H_PIXEL(HP), .H_RBORDER(HR),
    .V_FRONT(VF), .V_SYNC(VS), .V_BACK(VB), .V_TBORDER(VT), .V_PIXEL(VP), .V_BBORDER(VBB)
  ) dut (.clk, .rst, .cpu_req, .cpu_rsp, .gpio_rsp, .uart_rsp, .ddr_rsp,
         .vga_hsync_n(hs_n), .vga_vsync_n(vs_n), .vga_rgb(rgb));

  bmp_sw_env #(
    .CLK_DIV(CD),
    .H_FRONT(HF), .H_SYNC(HS), .H_BACK(HB), .H_LBORDER(HL), .H_PIXEL(HP), .H_RBORDER(HR),
    .V_FRONT(VF), .V_SYNC(VS), .V_BACK(VB), .V_TBORDER(VT), .V_PIXEL(VP), .V_BBORDER(VBB)
  ) env (.clk, .cpu_req, .cpu_rsp, .gpio_rsp, .ddr_rsp, .hsync_n(hs_n), .vsync_n(vs_n), .rgb);

  int checks = 0, failures = 0;

  task automatic happened(input int unsigned n, input string what);
    $display("  %-34s %0d", what, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL never happened: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int pic = 0; pic < 2; pic++) begin
      env.load_image(pic);
      env.flip_image();
      env.check_sdram_picture();
      foreach (env.mode_runs[m]) begin
        env.run_mode(m);
        env.wait_frames(2);
        env.check_frame();
      end
    end
    env.run_mode(0);
    env.wait_frames(1);
    env.check_frame();

    checks += env.checks;
    failures += env.failures;
    checks++;
    if (env.bus_errors != 0) begin failures++; $display("FAIL %0d unanswered transfers", env.bus_errors); end
    checks++;
    if (env.u_mon.errors != 0) begin failures++; $display("FAIL sync/blanking violations"); end
    $display("mechanism counts:");
    happened(env.vga_writes, "video-memory writes acknowledged");
    happened(env.ddr_xfers, "SDRAM transfers via shared bus");
    happened(env.gpio_reads, "switch reads via shared bus");
    happened(env.mode_runs[0], "mode 0 (plain picture)");
    happened(env.mode_runs[1], "mode 1 (x differences)");
    happened(env.mode_runs[2], "mode 2 (y differences)");
    happened(env.frames_checked, "frames compared");
    happened(env.h_pairs, "horizontal pixel doubling");
    happened(env.v_pairs, "line repetition");
    happened(env.u_mon.hsyncs, "hsync pulses");
    happened(env.u_mon.vsyncs, "vsync pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
