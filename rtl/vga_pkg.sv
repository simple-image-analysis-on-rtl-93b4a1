// vga_pkg: types and constants shared by the 16-colour VGA controller and
// the on-chip peripheral bus (OPB) that feeds it.
//
// The OPB request/response bundles are packed structs. The bus numbers its
// bits big-endian (bit 0 is the most significant); here every vector is
// [31:0] with bit 31 the most significant, so OPB bit i is bit 31-i here.
//
// COLOR_LUT is the 16-entry colour table of the controller: each 4-bit
// pixel index selects a 3-bit red, green and blue level. The sixteen
// entries are the palette of the original controller (black, dark and
// bright primaries and their mixes, grey, white). The struct types and
// the bit renumbering are this implementation's choice.
package vga_pkg;

  // 3 bits per colour channel on the VGA connector.
  typedef struct packed {
    logic [2:0] r;
    logic [2:0] g;
    logic [2:0] b;
  } rgb_t;

  // Signals a bus master drives to every slave.
  typedef struct packed {
    logic [31:0] abus;     // byte address
    logic [3:0]  be;       // byte enables
    logic [31:0] dbus;     // write data
    logic        rnw;      // 1 = read, 0 = write
    logic        select;   // transfer in progress
    logic        seqaddr;  // sequential burst hint
  } opb_req_t;

  // Signals each slave drives back; slaves not addressed drive zeros and
  // the bus ORs the responses together.
  typedef struct packed {
    logic [31:0] dbus;     // read data
    logic        errack;   // error acknowledge
    logic        retry;    // retry request
    logic        toutsup;  // suppress bus timeout
    logic        xferack;  // transfer acknowledge
  } opb_rsp_t;

  localparam opb_rsp_t OPB_RSP_IDLE = '0;

  // Colour table, index 0..15 -> {r, g, b}.
  localparam rgb_t COLOR_LUT [16] = '{
    '{3'd0, 3'd0, 3'd0},  //  0 black
    '{3'd1, 3'd0, 3'd0},  //  1 dark red
    '{3'd0, 3'd1, 3'd0},  //  2 dark green
    '{3'd0, 3'd0, 3'd1},  //  3 dark blue
    '{3'd1, 3'd1, 3'd0},  //  4
    '{3'd1, 3'd0, 3'd1},  //  5
    '{3'd0, 3'd1, 3'd1},  //  6
    '{3'd1, 3'd1, 3'd1},  //  7
    '{3'd3, 3'd3, 3'd3},  //  8 grey
    '{3'd3, 3'd0, 3'd0},  //  9 red
    '{3'd0, 3'd3, 3'd0},  // 10 green
    '{3'd0, 3'd0, 3'd3},  // 11 blue
    '{3'd3, 3'd3, 3'd0},  // 12
    '{3'd3, 3'd0, 3'd3},  // 13
    '{3'd0, 3'd3, 3'd3},  // 14
    '{3'd7, 3'd7, 3'd7}   // 15 white
  };

endpackage
