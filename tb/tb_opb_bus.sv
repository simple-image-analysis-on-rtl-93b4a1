// tb_opb_bus: random slave responses, some with one slave active and the
// rest idle as on a real bus and some with arbitrary bits, checked against
// the bitwise OR computed field by field in the testbench.
module tb_opb_bus;
  import vga_pkg::*;
  opb_rsp_t slv_rsp [4];
  opb_rsp_t mst_rsp;

  opb_bus #(.NSLV(4)) dut (.slv_rsp, .mst_rsp);

  int checks = 0, failures = 0;
  logic [31:0] exp_d;
  logic        exp_ack, exp_err, exp_retry, exp_tout;

  initial begin
    int active;
    for (int n = 0; n < 2000; n++) begin
      active = $urandom_range(4);   // 4 = all random
      exp_d = 0; exp_ack = 0; exp_err = 0; exp_retry = 0; exp_tout = 0;
      for (int s = 0; s < 4; s++) begin
        if (active == 4 || active == s) begin
          slv_rsp[s].dbus    = $urandom;
          slv_rsp[s].xferack = 1'($urandom);
          slv_rsp[s].errack  = 1'($urandom);
          slv_rsp[s].retry   = 1'($urandom);
          slv_rsp[s].toutsup = 1'($urandom);
        end else begin
          slv_rsp[s] = '0;
        end
        exp_d     = exp_d | slv_rsp[s].dbus;
        exp_ack   = exp_ack | slv_rsp[s].xferack;
        exp_err   = exp_err | slv_rsp[s].errack;
        exp_retry = exp_retry | slv_rsp[s].retry;
        exp_tout  = exp_tout | slv_rsp[s].toutsup;
      end
      #1;
      checks++;
      if (mst_rsp.dbus !== exp_d || mst_rsp.xferack !== exp_ack || mst_rsp.errack !== exp_err ||
          mst_rsp.retry !== exp_retry || mst_rsp.toutsup !== exp_tout) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
