// opb_bus: response side of the on-chip peripheral bus (OPB) that joins
// the processor to its peripherals.
//
// The OPB is an AND-OR bus: the master's request reaches every slave
// unchanged, and each slave drives its response signals to zero unless it
// is the one addressed. The master therefore sees the bitwise OR of all
// slave responses. This module forms that OR over NSLV slaves (the VGA
// controller, the switch GPIO, the UART and the DDR memory controller in
// the default system). With a single master no arbiter is needed. The bus
// is only named in the system drawing; this realisation is the usual
// OR-combining of such a bus. Purely combinational.
//
// Ports
//   slv_rsp    response of each slave
//   mst_rsp    combined response seen by the master
module opb_bus
  import vga_pkg::*;
#(
  parameter int unsigned NSLV = 4
) (
  input  opb_rsp_t slv_rsp [NSLV],
  output opb_rsp_t mst_rsp
);

  always_comb begin
    mst_rsp = OPB_RSP_IDLE;
    for (int i = 0; i < NSLV; i++) mst_rsp = mst_rsp | slv_rsp[i];
  end

endmodule
