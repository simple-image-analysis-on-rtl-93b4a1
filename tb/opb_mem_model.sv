// opb_mem_model: behavioural bus slave standing in for a platform
// peripheral in testbenches: the DDR controller with its SDRAM, or (with
// a small window and preset contents) the switch GPIO. It answers any
// transfer to [BASE, BASE+BYTES) one clock after select with a one-clock
// acknowledge; a write stores the low byte of the data bus, a read returns
// the addressed byte in the low byte of the data bus. Outside its window
// its response is all zeros, as the OR-combined bus requires.
module opb_mem_model
  import vga_pkg::*;
#(
  parameter logic [31:0] BASE  = 32'h2000_0000,
  parameter int unsigned BYTES = 1024
) (
  input  logic     clk,
  input  opb_req_t req,
  output opb_rsp_t rsp
);

  logic [7:0]  mem [BYTES];
  logic        ack_q = 1'b0;
  logic [7:0]  rdata_q = '0;
  logic        hit;
  logic [31:0] off;

  assign off = req.abus - BASE;
  assign hit = req.select && req.abus >= BASE && off < BYTES;

  always @(posedge clk) begin
    ack_q <= hit && !ack_q;
    if (hit && !ack_q) begin
      if (!req.rnw) mem[off] <= req.dbus[7:0];
      rdata_q <= mem[off];
    end
  end

  always_comb begin
    rsp = OPB_RSP_IDLE;
    rsp.xferack = ack_q;
    rsp.dbus    = ack_q ? {24'h0, rdata_q} : 32'h0;
  end

endmodule
