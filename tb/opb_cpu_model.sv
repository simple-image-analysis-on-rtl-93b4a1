// opb_cpu_model: behavioural bus master standing in for the soft processor
// in testbenches. It drives one OPB transfer at a time: the request is set
// up on a falling clock edge, held until the addressed slave acknowledges,
// and removed on the falling edge where the acknowledge is seen. A transfer
// that is not acknowledged within TIMEOUT clocks is abandoned, like the
// bus timeout of a real OPB, and reported through `acked`.
module opb_cpu_model
  import vga_pkg::*;
#(
  parameter int unsigned TIMEOUT = 16
) (
  input  logic     clk,
  output opb_req_t req,
  input  opb_rsp_t rsp
);

  int unsigned n_writes = 0;
  int unsigned n_reads  = 0;
  int unsigned n_timeouts = 0;

  initial req = '0;

  task automatic xfer(input logic [31:0] addr, input logic rnw, input logic [31:0] wdata,
                      output logic [31:0] rdata, output bit acked, output int cycles);
    acked  = 0;
    cycles = 0;
    rdata  = '0;
    @(negedge clk);
    req.abus   = addr;
    req.dbus   = rnw ? 32'h0 : wdata;
    req.be     = 4'hF;
    req.rnw    = rnw;
    req.seqaddr = 1'b0;
    req.select = 1'b1;
    while (!acked && cycles < int'(TIMEOUT)) begin
      @(negedge clk);
      cycles++;
      if (rsp.xferack) begin
        acked = 1;
        rdata = rsp.dbus;
      end
    end
    req = '0;
    if (!acked) n_timeouts++;
    else if (rnw) n_reads++;
    else n_writes++;
  endtask

  task automatic write(input logic [31:0] addr, input logic [31:0] data, output bit acked);
    logic [31:0] unused;
    int cyc;
    xfer(addr, 1'b0, data, unused, acked, cyc);
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data, output bit acked);
    int cyc;
    xfer(addr, 1'b1, 32'h0, data, acked, cyc);
  endtask

endmodule
