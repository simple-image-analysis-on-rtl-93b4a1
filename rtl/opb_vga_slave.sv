// opb_vga_slave: bus side of the VGA controller; turns bus writes into
// video-memory writes.
//
// A transfer is for this slave when `select` is high and the byte address
// lies in [C_BASEADDR, C_HIGHADDR]. A write (rnw low) to that window writes
// the least significant DW bits of the data bus into video memory at the
// least significant AW address bits, so the processor fills the screen
// with one byte store (or memcpy) per pixel at consecutive byte addresses.
// The write strobe is combinational and repeats for every clock the
// master holds `select`; rewriting the same word is harmless.
//
// Timing: `xferack` rises on the clock after the first cycle of a write
// and lasts exactly one clock; the master ends the transfer on it. Reads
// are not supported: the slave returns zero data and never acknowledges
// them. errack, retry and toutsup are always low.
//
// Address decode, data and address bit selection, and the write-only
// behaviour follow the original controller. Limiting `xferack` to a
// one-clock pulse (so a held `select` cannot produce a second acknowledge
// that would end the next transfer early), the reset of `xferack`, and the
// default address window are this implementation's choices. Byte enables
// and seqaddr are not used.
module opb_vga_slave
  import vga_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'h8000_0000,
  parameter logic [31:0] C_HIGHADDR = 32'h8001_FFFF,
  parameter int unsigned AW         = 17,
  parameter int unsigned DW         = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  opb_req_t      req,
  output opb_rsp_t      rsp,
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic [DW-1:0] wdata
);

  logic cs;
  logic ack_q;

  always_comb begin
    cs    = req.select && (req.abus >= C_BASEADDR) && (req.abus <= C_HIGHADDR);
    we    = cs && !req.rnw;
    waddr = req.abus[AW-1:0];
    wdata = req.dbus[DW-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) ack_q <= 1'b0;
    else     ack_q <= we && !ack_q;
  end

  always_comb begin
    rsp         = OPB_RSP_IDLE;
    rsp.xferack = ack_q;
  end

  // An acknowledge answers a write to this slave and never lasts two clocks.
  assert property (@(posedge clk) disable iff (rst) ack_q |-> $past(we));
  assert property (@(posedge clk) disable iff (rst) ack_q |=> !ack_q);

endmodule
