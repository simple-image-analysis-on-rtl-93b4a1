// tb_color_lut: checks all 16 colour indices against the palette written
// out here as 9-bit rrr_ggg_bbb strings, and that every index gives black
// when the position is not visible.
module tb_color_lut;
  import vga_pkg::*;
  logic [3:0] idx;
  logic       visible;
  rgb_t       rgb;

  color_lut dut (.idx, .visible, .rgb);

  localparam logic [8:0] PAL [16] = '{
    9'b000_000_000, 9'b001_000_000, 9'b000_001_000, 9'b000_000_001,
    9'b001_001_000, 9'b001_000_001, 9'b000_001_001, 9'b001_001_001,
    9'b011_011_011, 9'b011_000_000, 9'b000_011_000, 9'b000_000_011,
    9'b011_011_000, 9'b011_000_011, 9'b000_011_011, 9'b111_111_111
  };

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 16; i++) begin
      idx = 4'(i);
      visible = 1;
      #1;
      checks++;
      if ({rgb.r, rgb.g, rgb.b} !== PAL[i]) begin
        failures++;
        $display("FAIL index %0d got %b exp %b", i, rgb, PAL[i]);
      end
      visible = 0;
      #1;
      checks++;
      if (rgb !== '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
