// Self-checking testbench of the Sstc timers: STIP at time >= stimecmp,
// VSTIP at time + htimedelta >= vstimecmp, the STCE enables and read-back.
module tb_sstc_timer;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [63:0] time_i;
  logic        menvcfg_stce, henvcfg_stce, we, stip, vstip, rd_virt;
  logic [2:0]  sel, rd_sel;
  logic [31:0] wdata, rdata;

  sstc_timer dut (.clk, .rst_n, .time_i, .menvcfg_stce, .henvcfg_stce, .we, .sel, .wdata,
                  .rd_sel, .rd_virt, .rdata, .stip, .vstip);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int s, logic [31:0] d);
    we = 1; sel = 3'(s); wdata = d;
    @(posedge clk); #1;
    we = 0;
  endtask

  initial begin
    time_i = 0; menvcfg_stce = 1; henvcfg_stce = 1; we = 0; sel = 0; rd_sel = 0; wdata = 0; rd_virt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check("no stip after reset", !stip && !vstip);
    wr(1, 0); wr(0, 100);          // stimecmp = 100
    wr(3, 0); wr(2, 150);          // vstimecmp = 150
    wr(5, 0); wr(4, 100);          // htimedelta = 100
    rd_sel = 3'd4; #1;
    check("htimedelta readback", rdata == 32'd100);
    for (int t = 0; t < 120; t += 7) begin
      time_i = 64'(t); #1;
      check($sformatf("stip t=%0d", t), stip == (t >= 100));
      check($sformatf("vstip t=%0d", t), vstip == (t + 100 >= 150));
    end
    time_i = 64'd120;
    henvcfg_stce = 0; #1;
    check("vstip gated by henvcfg", !vstip && stip);
    menvcfg_stce = 0; #1;
    check("stip gated by menvcfg", !stip && !vstip);
    menvcfg_stce = 1; henvcfg_stce = 1;
    wr(1, 32'h1);                  // stimecmp = 2^32 + 100
    check("stip cleared by high compare", !stip);
    time_i = 64'h1_0000_0064; #1;
    check("stip 64-bit compare", stip);
    // time counter reads: physical, and shifted by htimedelta for a guest
    rd_sel = 3'd6; #1;
    check("time lo", rdata == 32'h0000_0064);
    rd_virt = 1; #1;
    check("guest time lo", rdata == 32'h0000_00C8);
    rd_sel = 3'd7; #1;
    check("guest time hi", rdata == 32'h0000_0001);
    wr(4, 32'hFFFF_FFA0);          // htimedelta = 0xFFFF_FFA0: carry into hi
    check("guest time hi carry", rdata == 32'h0000_0002);
    rd_sel = 3'd6; #1;
    check("guest time lo wrap", rdata == 32'h0000_0004);
    rd_virt = 0; rd_sel = 3'd7; #1;
    check("time hi", rdata == 32'h0000_0001);
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
