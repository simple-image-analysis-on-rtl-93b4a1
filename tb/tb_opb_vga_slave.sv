// tb_opb_vga_slave: drives bus requests at the controller's slave and
// checks the decode: writes inside [base, high] produce a write strobe
// with the low 17 address bits and low 4 data bits and exactly one
// acknowledge one clock later; writes outside the window, reads, and idle
// cycles produce neither; error, retry and timeout-suppress stay low.
module tb_opb_vga_slave;
  import vga_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  opb_req_t    req;
  opb_rsp_t    rsp;
  logic        we;
  logic [16:0] waddr;
  logic [3:0]  wdata;

  opb_vga_slave dut (.clk, .rst, .req, .rsp, .we, .waddr, .wdata);

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // One transfer, held until acknowledged (as a bus master does) or for
  // `hold` clocks.
  task automatic transfer(input logic [31:0] a, input logic [31:0] d, input logic rnw,
                          input int hold, input bit expect_hit);
    int acks = 0;
    @(negedge clk);
    req = '0;
    req.abus = a; req.dbus = d; req.rnw = rnw; req.select = 1; req.be = 4'hF;
    #1;
    chk(we == (expect_hit && !rnw), "write strobe");
    if (expect_hit && !rnw) chk(waddr == a[16:0] && wdata == d[3:0], "write address/data");
    chk(rsp.xferack == 0, "no ack in first cycle");
    for (int c = 0; c < hold; c++) begin
      @(negedge clk);
      if (rsp.xferack) begin
        acks++;
        chk(c == 0, "ack one clock after select");
        break;
      end
      chk(rsp.errack == 0 && rsp.retry == 0 && rsp.toutsup == 0 && rsp.dbus == 0, "idle lines");
    end
    chk(acks == ((expect_hit && !rnw) ? 1 : 0), "number of acks");
    // The acknowledge lasts one clock even if the next transfer to the
    // slave starts at once.
    if (expect_hit) begin
      req.abus = a ^ 32'h1;
      @(negedge clk);
      chk(rsp.xferack == 0, "single-clock ack");
    end
    req = '0;
    @(negedge clk);
    chk(rsp.xferack == 0, "no late ack");
  endtask

  initial begin
    logic [31:0] off, d;
    req = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      off = 32'($urandom_range(32'h1_FFFF));
      d = $urandom;
      // in the window
      transfer(32'h8000_0000 + off, d, 1'b0, 4, 1);
      // reads are never acknowledged
      transfer(32'h8000_0000 + off, d, 1'b1, 3, 1);
      // just below and just above the window
      transfer(32'h7FFF_FFFF - 32'($urandom_range(255)), d, 1'b0, 3, 0);
      transfer(32'h8002_0000 + 32'($urandom_range(255)), d, 1'b0, 3, 0);
    end
    // idle bus
    @(negedge clk);
    req = '0;
    req.abus = 32'h8000_0010;
    #1;
    chk(we == 0, "no write without select");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
