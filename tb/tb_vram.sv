// tb_vram: writes random words to random addresses of the full 76800 x 4
// video memory through port B while reading random addresses on port A,
// and compares every read, one clock after its address, with a reference
// array. Also checks that writes above the last word are dropped and that
// such addresses read as zero.
module tb_vram;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int DEPTH = 76800;
  logic [16:0] addra, addrb;
  logic [3:0]  douta, dinb;
  logic        web;

  vram dut (.clka(clk), .addra, .douta, .clkb(clk), .addrb, .dinb, .web);

  int checks = 0, failures = 0;
  logic [3:0] ref_mem [DEPTH];
  logic [3:0] expect_q;

  initial begin
    web = 0; addra = 0; addrb = 0; dinb = 0;
    // Fill every word.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      addrb = 17'(a); dinb = 4'($urandom); web = 1;
      ref_mem[a] = dinb;
    end
    @(negedge clk);
    web = 0;
    // Random mixed traffic.
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks++;
        if (douta !== expect_q) begin
          failures++;
          if (failures < 10) $display("FAIL read %0d got %0d exp %0d", addra, douta, expect_q);
        end
      end
      addra = 17'($urandom_range(DEPTH - 1));
      expect_q = ref_mem[addra];           // read-first: old contents
      web = $urandom_range(1);
      addrb = 17'($urandom_range(DEPTH - 1));
      dinb = 4'($urandom);
      if (web) ref_mem[addrb] = dinb;
    end
    // Out-of-range write is dropped and reads as zero.
    @(negedge clk);
    web = 1; addrb = 17'(DEPTH); dinb = 4'hF; addra = 17'(DEPTH);
    @(negedge clk);
    web = 0;
    checks++;
    if (douta !== 4'h0) failures++;
    addra = 0;
    @(negedge clk);
    checks++;
    if (douta !== ref_mem[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
