// color_lut: turns a 4-bit pixel index into the 9-bit VGA colour.
//
// Sixteen colours are chosen from a fixed table (vga_pkg::COLOR_LUT): the
// stored index selects 3 bits each of red, green and blue, which go
// straight to the VGA connector's resistor ladders. Outside the visible
// window (`visible` low) the output is black, as the VGA standard requires
// during blanking. Purely combinational. The table and the blanking rule
// follow the original controller.
//
// Ports
//   idx      colour index 0..15 read from video memory
//   visible  the current raster position is inside the picture
//   rgb      {r, g, b}, 3 bits each
module color_lut
  import vga_pkg::*;
(
  input  logic [3:0] idx,
  input  logic       visible,
  output rgb_t       rgb
);

  always_comb begin
    rgb = visible ? COLOR_LUT[idx] : '0;
  end

endmodule
