// Self-checking testbench of the CLINT: mtime counting on tick, the exact
// cycle mtip rises at mtime == mtimecmp, msip, and register read-back.
module tb_clint;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic        tick, sel, we, mtip, msip;
  logic [15:0] addr;
  logic [31:0] wdata, rdata;
  logic [63:0] mtime;

  clint dut (.clk, .rst_n, .tick, .sel, .we, .addr, .wdata, .rdata, .mtime, .mtip, .msip);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [15:0] a, logic [31:0] d);
    sel = 1; we = 1; addr = a; wdata = d;
    @(posedge clk); #1;
    sel = 0; we = 0;
  endtask

  logic [31:0] rv;
  task automatic rd(logic [15:0] a);
    addr = a;
    #1 rv = rdata;
  endtask

  initial begin
    tick = 0; sel = 0; we = 0; addr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check("mtime reset", mtime == 64'd0);
    check("no mtip after reset", !mtip);
    wr(16'h4004, 32'd0);
    wr(16'h4000, 32'd20);
    rd(16'h4000); check("mtimecmp lo readback", rv == 32'd20);
    tick = 1;
    for (int c = 1; c <= 25; c++) begin
      @(posedge clk); #1;
      check($sformatf("mtime %0d", c), mtime == 64'(c));
      check($sformatf("mtip at %0d", c), mtip == (c >= 20));
    end
    tick = 0;
    rd(16'hBFF8); check("mtime lo read", rv == 32'd25);
    wr(16'hBFFC, 32'h1);
    check("mtime hi write", mtime == 64'h1_0000_0019);
    wr(16'h4004, 32'h2);
    check("mtip clears on new compare", !mtip);
    wr(16'h0000, 32'h1);
    rd(16'h0000); check("msip set", msip && rv == 32'h1);
    wr(16'h0000, 32'h0);
    check("msip cleared", !msip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
