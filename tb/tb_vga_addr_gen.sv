// tb_vga_addr_gen: runs the address generator from the raster counters at
// the default 640x480 timing for two frames and checks, for every visible
// screen pixel (sx, sy), that the read address is the stored pixel it
// should show: (sy / 2) * 320 + sx / 2. Counts how often a stored line was
// repeated (address wound back) and how often it moved on.
module tb_vga_addr_gen;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        tick, hsync_n, vsync_n, h_act, v_act, last_col, row_odd;
  logic [9:0]  x, y;
  logic [16:0] addr;

  vga_timing u_timing (.clk, .rst, .tick, .x, .y, .hsync_n, .vsync_n,
                       .h_act, .v_act, .last_col, .row_odd);
  vga_addr_gen dut (.clk, .rst, .tick, .h_act, .v_act, .last_col, .row_odd, .addr);

  int checks = 0, failures = 0;
  int rewinds = 0, advances = 0;
  int sx, sy, exp_addr;
  logic [16:0] prev_addr;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2 * 800 * 525; n++) begin
      @(negedge clk);
      while (!tick) @(negedge clk);
      prev_addr = addr;
      @(negedge clk);               // after the tick edge: new position
      if (h_act && v_act) begin
        sx = int'(x) - 152;
        sy = int'(y) - 37;
        exp_addr = (sy / 2) * 320 + sx / 2;
        checks++;
        if (int'(addr) != exp_addr) begin
          failures++;
          if (failures < 10) $display("FAIL sx=%0d sy=%0d addr=%0d exp=%0d", sx, sy, addr, exp_addr);
        end
        if (sx == 0 && sy > 0) begin
          if (sy % 2 == 1) rewinds++;
          else advances++;
        end
      end
    end
    checks++;
    if (rewinds != 2 * 240) begin failures++; $display("FAIL rewinds=%0d", rewinds); end
    checks++;
    if (advances != 2 * 239) begin failures++; $display("FAIL advances=%0d", advances); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * 800 * 525 * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
