// Self-checking testbench of the APLIC: edge, inverted-edge and level sources
// in the machine domain, priority and threshold selection, claim, and a
// source delegated to the supervisor domain (and one that is not).
module tb_aplic;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic        sel, we, meip, seip;
  logic [15:0] addr;
  logic [31:0] wdata, rdata, rv;
  logic [8:1]  irq_src;

  aplic #(.N_SRC(8)) dut (.clk, .rst_n, .sel, .we, .addr, .wdata, .rdata, .irq_src, .meip, .seip);

  localparam logic [15:0] S = 16'h8000;   // supervisor domain window

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [15:0] a, logic [31:0] d);
    sel = 1; we = 1; addr = a; wdata = d;
    @(posedge clk); #1;
    sel = 0; we = 0;
  endtask

  // Plain read (no side effect unless the address is claimi)
  task automatic rd(logic [15:0] a);
    sel = 1; we = 0; addr = a; #1;
    rv = rdata;
    @(posedge clk); #1;
    sel = 0;
  endtask

  task automatic pulse(int n);
    irq_src[n] = 1'b1; @(posedge clk); #1;
    irq_src[n] = 1'b0; @(posedge clk); #1;
  endtask

  initial begin
    sel = 0; we = 0; addr = 0; wdata = 0; irq_src = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // Machine domain
    wr(16'h0000, 32'h100);                 // IE
    wr(16'h0004, 32'd4);                   // src1 edge rising
    wr(16'h0008, 32'd6);                   // src2 level high
    wr(16'h000C, 32'h400);                 // src3 delegated
    wr(16'h0010, 32'd5);                   // src4 edge falling
    wr(16'h3004, 32'd5);                   // prio src1 = 5
    wr(16'h3008, 32'd3);                   // prio src2 = 3
    wr(16'h3010, 32'd7);                   // prio src4 = 7
    wr(16'h1E00, 32'b1_0110);              // enable 1, 2, 4
    wr(16'h4000, 32'd1);                   // idelivery
    // Supervisor domain
    wr(S | 16'h0000, 32'h100);
    wr(S | 16'h000C, 32'd6);               // src3 level high
    wr(S | 16'h0004, 32'd4);               // src1 not delegated: ignored
    wr(S | 16'h300C, 32'd0);               // prio 0 becomes 1
    wr(S | 16'h1EDC, 32'd3);               // enable 3 by number
    wr(S | 16'h1EDC, 32'd1);               // enable 1 by number: not owned
    wr(S | 16'h4000, 32'd1);

    rd(16'h000C);      check("root sourcecfg3 shows D", rv == 32'h400);
    rd(S | 16'h0004);  check("child sourcecfg1 not owned", rv == 32'h0);
    rd(S | 16'h300C);  check("child prio 0 -> 1", rv == 32'd1);
    check("no eip at start", !meip && !seip);

    pulse(1);
    check("meip after edge", meip && !seip);
    rd(16'h4018);      check("topi src1", rv == {16'd1, 16'd5});
    rd(16'h401C);      check("claimi src1", rv == {16'd1, 16'd5});
    check("meip cleared by claim", !meip);

    irq_src[2] = 1; irq_src[1] = 1; @(posedge clk); #1; @(posedge clk); #1;
    rd(16'h4018);      check("src2 wins on priority", rv == {16'd2, 16'd3});
    wr(16'h4008, 32'd4);
    rd(16'h4018);      check("threshold 4 keeps src2", rv == {16'd2, 16'd3});
    wr(16'h4008, 32'd3);
    rd(16'h4018);      check("threshold 3 hides all", rv == 32'd0);
    check("meip off under threshold", !meip);
    wr(16'h4008, 32'd0);
    irq_src[2] = 0; irq_src[1] = 0; @(posedge clk); #1; @(posedge clk); #1;
    rd(16'h401C);      check("level src2 gone, claim src1", rv == {16'd1, 16'd5});
    rd(16'h4018);      check("nothing pending", rv == 32'd0);

    irq_src[4] = 1; @(posedge clk); #1; @(posedge clk); #1;
    check("no meip before falling edge", !meip);
    irq_src[4] = 0; @(posedge clk); #1; @(posedge clk); #1;
    rd(16'h401C);      check("falling edge src4", rv == {16'd4, 16'd7});

    irq_src[3] = 1; @(posedge clk); #1; @(posedge clk); #1;
    check("seip from delegated src3", seip && !meip);
    rd(S | 16'h4018);  check("child topi src3", rv == {16'd3, 16'd1});
    irq_src[3] = 0; @(posedge clk); #1; @(posedge clk); #1;
    check("seip follows level", !seip);

    pulse(1);
    check("undelegated src1 stays in root", meip && !seip);
    wr(16'h1D00, 32'b10);                  // clear pending src1
    check("clrip clears", !meip);
    wr(16'h1CDC, 32'd1);                   // set pending by number
    check("setipnum sets", meip);
    wr(16'h1FDC, 32'd1);                   // disable src1
    check("clrienum masks", !meip);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
