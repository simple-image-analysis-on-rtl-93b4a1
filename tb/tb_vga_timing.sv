// tb_vga_timing: checks the raster generator at its default 640x480 timing
// against a reference counter kept by the testbench: the pixel enable
// comes every 4th clock, x and y follow an 800 x 525 raster, and the sync,
// visible-window, last-column and row-parity outputs match the segment
// boundaries of the VGA mode (sync at x 8..103 and y 2..3, picture at
// x 152..791 and y 37..516). Runs a little over one frame.
module tb_vga_timing;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       tick, hsync_n, vsync_n, h_act, v_act, last_col, row_odd;
  logic [9:0] x;
  logic [9:0] y;

  vga_timing dut (.clk, .rst, .tick, .x, .y, .hsync_n, .vsync_n,
                  .h_act, .v_act, .last_col, .row_odd);

  int checks = 0, failures = 0;
  int rx = 0, ry = 0, since_tick = 0;
  int hs_pulses = 0, vs_pulses = 0, act_pixels = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at x=%0d y=%0d", what, rx, ry);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // Over one frame plus 10 lines.
    for (int n = 0; n < 800 * 535; n++) begin
      // wait for a tick, counting clocks
      while (!tick) begin
        @(negedge clk);
        since_tick++;
      end
      if (n > 0) chk(since_tick == 4, "tick period");
      // position before this tick edge
      chk(x == 10'(rx) && y == 10'(ry), "position");
      chk(hsync_n == !(rx >= 8 && rx < 104), "hsync");
      chk(vsync_n == !(ry >= 2 && ry < 4), "vsync");
      chk(h_act == (rx >= 152 && rx < 792), "h_act");
      chk(v_act == (ry >= 37 && ry < 517), "v_act");
      chk(last_col == (rx == 791), "last_col");
      chk(row_odd == (((ry - 37) & 1) == 1), "row_odd");
      if (rx == 8) hs_pulses++;
      if (rx == 0 && ry == 2) vs_pulses++;
      if (h_act && v_act) act_pixels++;
      @(negedge clk);
      since_tick = 1;
      rx = rx + 1;
      if (rx == 800) begin
        rx = 0;
        ry = (ry == 524) ? 0 : ry + 1;
      end
    end
    chk(vs_pulses == 2, "vsync once per 525 lines");
    chk(hs_pulses == 535, "one hsync per line");
    chk(act_pixels == 640 * 480, "visible pixels per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * 800 * 540 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
