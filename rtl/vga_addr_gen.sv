// vga_addr_gen: video-memory read address for a picture shown at double
// size in both directions.
//
// The memory holds COLS x ROWS pixels (320 x 240) but the screen shows
// 640 x 480, so every stored pixel is painted as a 2x2 block: the colour
// read from memory plus three copies. The address is therefore not
// computed from (x, y); a running address walks the memory instead:
//   - along a visible line it advances by one every second pixel (`hold`
//     marks the second pixel of a pair);
//   - at the end of the first line of a pair it is wound back to the start
//     of the same stored line (`line_addr`), so the next screen line repeats
//     it; at the end of the second line it moves on and `line_addr` follows;
//   - outside the visible lines it is held at zero for the next frame.
// The pairing of pixels and the wind-back come from the original controller.
// Counting the pairs from the first visible line and pixel, and holding the
// start of the stored line in a register rather than subtracting COLS, are
// this implementation's choices: the first visible line then starts at
// address 0 and the pixel pairs line up with the stored pixels.
//
// Timing: all updates happen on `tick` and look at the raster position that
// is ending (the timing signals before the tick edge), so after the edge
// `addr` is the address of the new position. Video memory then has the
// rest of the pixel period to return the word.
//
// Ports
//   clk, rst   bus clock, synchronous reset
//   tick       pixel enable from vga_timing
//   h_act, v_act, last_col, row_odd   current raster position, see vga_timing
//   addr       read address for the pixel being fetched
module vga_addr_gen #(
  parameter int unsigned COLS = 320,
  parameter int unsigned AW   = 17
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          tick,
  input  logic          h_act,
  input  logic          v_act,
  input  logic          last_col,
  input  logic          row_odd,
  output logic [AW-1:0] addr
);

  logic [AW-1:0] line_addr;
  logic          hold;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr      <= '0;
      line_addr <= '0;
      hold      <= 1'b0;
    end else if (tick) begin
      if (!v_act) begin
        addr      <= '0;
        line_addr <= '0;
        hold      <= 1'b0;
      end else if (h_act) begin
        hold <= !hold;
        if (hold) begin
          if (!last_col) begin
            addr <= addr + 1'b1;
          end else if (row_odd) begin
            // Second screen line of the pair done: next stored line.
            addr      <= addr + 1'b1;
            line_addr <= addr + 1'b1;
          end else begin
            // First screen line of the pair done: repeat the stored line.
            addr <= line_addr;
          end
        end
      end
    end
  end

  // The stored line is always COLS words behind the running address at
  // the end of a first line.
  assert property (@(posedge clk) disable iff (rst)
                   (tick && v_act && h_act && hold && last_col && !row_odd)
                   |-> (addr + 1'b1 == line_addr + AW'(COLS)));

endmodule
