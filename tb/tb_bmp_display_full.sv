// tb_bmp_display_full: the image viewer at its real size, every parameter
// at its default: 320 x 240 pictures shown at 640 x 480 with the standard
// 800 x 525 raster and a 100 MHz bus clock. One complete operation: a
// bitmap is unpacked into SDRAM, flipped upright and shown; then the x and
// y difference modes are run. After each, a full frame is captured from
// the VGA pins and compared pixel by pixel with what was written to video
// memory, and the sync timing and blanking are checked throughout.
module tb_bmp_display_full;
  import vga_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  opb_req_t cpu_req;
  opb_rsp_t cpu_rsp, gpio_rsp, ddr_rsp, uart_rsp;
  logic     hs_n, vs_n;
  rgb_t     rgb;

  assign uart_rsp = '0;

  bmp_display_top dut (.clk, .rst, .cpu_req, .cpu_rsp, .gpio_rsp, .uart_rsp, .ddr_rsp,
                       .vga_hsync_n(hs_n), .vga_vsync_n(vs_n), .vga_rgb(rgb));

  bmp_sw_env env (.clk, .cpu_req, .cpu_rsp, .gpio_rsp, .ddr_rsp,
                  .hsync_n(hs_n), .vsync_n(vs_n), .rgb);

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    env.load_image(1);
    env.flip_image();
    env.check_sdram_picture();
    for (int m = 0; m < 3; m++) begin
      env.run_mode(m);
      env.wait_frames(2);
      env.check_frame();
      $display("mode %0d shown and checked at %0t", m, $time);
    end
    checks += env.checks;
    failures += env.failures;
    checks++;
    if (env.bus_errors != 0) begin failures++; $display("FAIL %0d unanswered transfers", env.bus_errors); end
    checks++;
    if (env.u_mon.errors != 0) begin failures++; $display("FAIL sync/blanking violations"); end
    checks++;
    if (env.frames_checked != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
