// Self-checking testbench of the SPMP table in both roles: the unified,
// hypervisor-controlled SPMP (S/U mode bit, switch register, VS/VU checked
// as user accesses, M not checked) and the guest vSPMP (checks only V=1,
// VS as supervisor, no switch). Expected results are worked out by hand.
module tb_spmp;
  import ba51h_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mpu_csr_if hcsr ();
  mpu_csr_if vcsr ();
  mode_t       mode   [1];
  acc_e        acc    [1];
  logic [31:0] pa     [1];
  logic        allow_h[1];
  logic        allow_v[1];

  spmp #(.N_ENTRIES(16), .N_PORTS(1), .VIRTUAL(1'b0), .HAS_SWITCH(1'b1)) dut_h (
    .clk, .rst_n, .csr(hcsr), .mode, .acc, .pa, .allow(allow_h));
  spmp #(.N_ENTRIES(16), .N_PORTS(1), .VIRTUAL(1'b1), .HAS_SWITCH(1'b0)) dut_v (
    .clk, .rst_n, .csr(vcsr), .mode, .acc, .pa, .allow(allow_v));

  localparam mode_t M  = '{v:1'b0, prv:PRV_M};
  localparam mode_t HS = '{v:1'b0, prv:PRV_S};
  localparam mode_t HU = '{v:1'b0, prv:PRV_U};
  localparam mode_t VS = '{v:1'b1, prv:PRV_S};
  localparam mode_t VU = '{v:1'b1, prv:PRV_U};

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic wr_h(int kind, int idx, logic [31:0] d);
    hcsr.cfg_we = (kind == 0); hcsr.addr_we = (kind == 1); hcsr.sw_we = (kind == 2);
    hcsr.idx = 4'(idx); hcsr.wdata = d;
    @(posedge clk); #1;
    hcsr.cfg_we = 0; hcsr.addr_we = 0; hcsr.sw_we = 0;
  endtask

  task automatic wr_v(int kind, int idx, logic [31:0] d);
    vcsr.cfg_we = (kind == 0); vcsr.addr_we = (kind == 1); vcsr.sw_we = (kind == 2);
    vcsr.idx = 4'(idx); vcsr.wdata = d;
    @(posedge clk); #1;
    vcsr.cfg_we = 0; vcsr.addr_we = 0; vcsr.sw_we = 0;
  endtask

  task automatic chk_h(string what, mode_t m, acc_e a, logic [31:0] ad, logic exp);
    mode[0] = m; acc[0] = a; pa[0] = ad; #1;
    check({"spmp ", what}, allow_h[0], exp);
  endtask

  task automatic chk_v(string what, mode_t m, acc_e a, logic [31:0] ad, logic exp);
    mode[0] = m; acc[0] = a; pa[0] = ad; #1;
    check({"vspmp ", what}, allow_v[0], exp);
  endtask

  initial begin
    hcsr.cfg_we = 0; hcsr.addr_we = 0; hcsr.sw_we = 0; hcsr.sec_we = 0; hcsr.idx = 0; hcsr.wdata = 0;
    hcsr.rd_sel = 0; hcsr.rd_idx = 0;
    vcsr.cfg_we = 0; vcsr.addr_we = 0; vcsr.sw_we = 0; vcsr.sec_we = 0; vcsr.idx = 0; vcsr.wdata = 0;
    vcsr.rd_sel = 0; vcsr.rd_idx = 0;
    mode[0] = M; acc[0] = ACC_R; pa[0] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // Unified SPMP: e0 S-rule RW 0x1000-0x1FFF, e1 U-rule RX 0x2000-0x2FFF,
    // e2 U-rule RWX 0x3000-0x3FFF
    wr_h(1, 0, 32'h0000_05FF);
    wr_h(1, 1, 32'h0000_09FF);
    wr_h(1, 2, 32'h0000_0DFF);
    wr_h(0, 0, 32'h001F_1D9B);
    // Entries stay inactive until switched on
    chk_h("HS no entry active", HS, ACC_R, 32'h0000_2000, 1'b1);
    chk_h("HU no entry active", HU, ACC_X, 32'h0000_2000, 1'b0);
    wr_h(2, 0, 32'h0000_0003);

    chk_h("HS R S-rule",    HS, ACC_R, 32'h0000_1000, 1'b1);
    chk_h("HS X S-rule",    HS, ACC_X, 32'h0000_1000, 1'b0);
    chk_h("HU R S-rule",    HU, ACC_R, 32'h0000_1000, 1'b0);
    chk_h("HS R U-rule",    HS, ACC_R, 32'h0000_2000, 1'b0);
    chk_h("HU X U-rule",    HU, ACC_X, 32'h0000_2000, 1'b1);
    chk_h("VS X U-rule",    VS, ACC_X, 32'h0000_2FFC, 1'b1);
    chk_h("VS R S-rule",    VS, ACC_R, 32'h0000_1000, 1'b0);
    chk_h("VU W U-rule",    VU, ACC_W, 32'h0000_2000, 1'b0);
    chk_h("HS no match",    HS, ACC_W, 32'h0000_5000, 1'b1);
    chk_h("HU no match",    HU, ACC_R, 32'h0000_5000, 1'b0);
    chk_h("VS no match",    VS, ACC_R, 32'h0000_5000, 1'b0);
    chk_h("M bypass",       M,  ACC_W, 32'h0000_5000, 1'b1);
    chk_h("VU switched off", VU, ACC_W, 32'h0000_3000, 1'b0);
    wr_h(2, 0, 32'h0000_0007);
    chk_h("VU switched on", VU, ACC_W, 32'h0000_3000, 1'b1);
    wr_h(2, 0, 32'h0000_0006);
    chk_h("HS e0 off",      HS, ACC_X, 32'h0000_1000, 1'b1);
    chk_h("HU e0 off",      HU, ACC_R, 32'h0000_1000, 1'b0);
    hcsr.rd_sel = 2'd2; hcsr.rd_idx = 0; #1;
    check("switch readback", hcsr.rdata == 32'h0000_0006, 1'b1);

    // Shared regions: e3 shared data (S=0, W only) 0x4000-0x4FFF,
    // e4 shared code (S=1, W+X) 0x6000-0x6FFF, e5 shared read-only (S=1, RWX)
    // 0x7000-0x7FFF
    wr_h(1, 3, 32'h0000_11FF);
    wr_h(1, 4, 32'h0000_19FF);
    wr_h(1, 5, 32'h0000_1DFF);
    wr_h(0, 0, 32'h1A1F_1D9B);
    wr_h(0, 1, 32'h0000_9F9E);
    wr_h(2, 0, 32'h0000_003E);
    chk_h("HS W shared data", HS, ACC_W, 32'h0000_4000, 1'b1);
    chk_h("HU R shared data", HU, ACC_R, 32'h0000_4000, 1'b1);
    chk_h("VS W shared data", VS, ACC_W, 32'h0000_4000, 1'b0);
    chk_h("HS X shared data", HS, ACC_X, 32'h0000_4000, 1'b0);
    chk_h("HS X shared code", HS, ACC_X, 32'h0000_6000, 1'b1);
    chk_h("HS R shared code", HS, ACC_R, 32'h0000_6000, 1'b1);
    chk_h("HS W shared code", HS, ACC_W, 32'h0000_6000, 1'b0);
    chk_h("VU X shared code", VU, ACC_X, 32'h0000_6000, 1'b1);
    chk_h("VU R shared code", VU, ACC_R, 32'h0000_6000, 1'b0);
    chk_h("HS R shared RO",   HS, ACC_R, 32'h0000_7000, 1'b1);
    chk_h("HS W shared RO",   HS, ACC_W, 32'h0000_7000, 1'b0);
    chk_h("HU R shared RO",   HU, ACC_R, 32'h0000_7000, 1'b1);
    chk_h("HS X shared RO",   HS, ACC_X, 32'h0000_7000, 1'b0);

    // vSPMP: e0 S-rule RX 0x2000-0x2FFF, e1 U-rule RW 0x3000-0x3FFF
    wr_v(1, 0, 32'h0000_09FF);
    wr_v(1, 1, 32'h0000_0DFF);
    wr_v(0, 0, 32'h0000_1B9D);
    wr_v(2, 0, 32'h0000_0000);   // no switch: ignored
    chk_v("HS bypass",   HS, ACC_R, 32'h0000_9000, 1'b1);
    chk_v("HU bypass",   HU, ACC_X, 32'h0000_9000, 1'b1);
    chk_v("VS X S-rule", VS, ACC_X, 32'h0000_2000, 1'b1);
    chk_v("VU R S-rule", VU, ACC_R, 32'h0000_2000, 1'b0);
    chk_v("VU W U-rule", VU, ACC_W, 32'h0000_3000, 1'b1);
    chk_v("VU X U-rule", VU, ACC_X, 32'h0000_3000, 1'b0);
    chk_v("VS W U-rule", VS, ACC_W, 32'h0000_3000, 1'b0);
    chk_v("VS no match", VS, ACC_R, 32'h0000_9000, 1'b1);
    chk_v("VU no match", VU, ACC_R, 32'h0000_9000, 1'b0);

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
