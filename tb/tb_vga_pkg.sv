// tb_vga_pkg: reference data for testbenches, written independently of the
// design: the 16-entry palette as 9-bit rrr_ggg_bbb values.
package tb_vga_pkg;
  localparam logic [8:0] PAL [16] = '{
    9'b000_000_000, 9'b001_000_000, 9'b000_001_000, 9'b000_000_001,
    9'b001_001_000, 9'b001_000_001, 9'b000_001_001, 9'b001_001_001,
    9'b011_011_011, 9'b011_000_000, 9'b000_011_000, 9'b000_000_011,
    9'b011_011_000, 9'b011_000_011, 9'b000_011_011, 9'b111_111_111
  };
endpackage
