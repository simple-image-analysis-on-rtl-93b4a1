// vram: dual-port video memory of the VGA controller.
//
// DEPTH words of WIDTH bits, by default 320 x 240 = 76800 colour indices of
// 4 bits (307200 bits), enough for one whole low-resolution screen. Port A
// is read-only and feeds the display; port B is write-only and is filled
// from the bus. Both ports are synchronous: a read address presented before
// a clka edge gives its word on douta after that edge (one clock of
// latency); a write with web high lands on the clkb edge. Addresses at or
// above DEPTH are ignored on writes and read as zero.
//
// The size, the 4-bit width and the port list (addra, douta, clka; addrb,
// dinb, web, clkb) follow the original generated memory core. Simultaneous
// read and write of one address returns the old word (read-first); that
// and the zero for out-of-range reads are this implementation's choices.
module vram #(
  parameter int unsigned DEPTH = 76800,
  parameter int unsigned WIDTH = 4,
  parameter int unsigned AW    = 17
) (
  input  logic             clka,
  input  logic [AW-1:0]    addra,
  output logic [WIDTH-1:0] douta,
  input  logic             clkb,
  input  logic [AW-1:0]    addrb,
  input  logic [WIDTH-1:0] dinb,
  input  logic             web
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clka) begin
    if (32'(addra) < DEPTH) douta <= mem[addra];
    else                    douta <= '0;
  end

  always_ff @(posedge clkb) begin
    if (web && 32'(addrb) < DEPTH) mem[addrb] <= dinb;
  end

endmodule
