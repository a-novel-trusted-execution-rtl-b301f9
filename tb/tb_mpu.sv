// Self-checking testbench of the MPU: the three tables combined on two ports,
// the access-fault cause per access type and which stage refused (vSPMP before
// SPMP before PMP). Expected results are worked out by hand.
module tb_mpu;
  import ba51h_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mpu_csr_if pcsr ();
  mpu_csr_if scsr ();
  mpu_csr_if vcsr ();
  mode_t        mode   [2];
  acc_e         acc    [2];
  logic [31:0]  pa     [2];
  logic         allow  [2];
  fault_stage_e fstage [2];
  logic [4:0]   cause  [2];

  mpu dut (.clk, .rst_n, .pmp_csr(pcsr), .spmp_csr(scsr), .vspmp_csr(vcsr),
           .mode, .acc, .pa, .allow, .fstage, .cause);

  localparam mode_t M  = '{v:1'b0, prv:PRV_M};
  localparam mode_t HS = '{v:1'b0, prv:PRV_S};
  localparam mode_t HU = '{v:1'b0, prv:PRV_U};
  localparam mode_t VS = '{v:1'b1, prv:PRV_S};
  localparam mode_t VU = '{v:1'b1, prv:PRV_U};

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic idle_all();
    pcsr.cfg_we = 0; pcsr.addr_we = 0; pcsr.sw_we = 0; pcsr.sec_we = 0;
    scsr.cfg_we = 0; scsr.addr_we = 0; scsr.sw_we = 0; scsr.sec_we = 0;
    vcsr.cfg_we = 0; vcsr.addr_we = 0; vcsr.sw_we = 0; vcsr.sec_we = 0;
  endtask

  // tbl: 0 PMP, 1 SPMP, 2 vSPMP; kind: 0 cfg, 1 addr, 2 switch
  task automatic wr(int tbl, int kind, int idx, logic [31:0] d);
    unique case (tbl)
      0: begin pcsr.cfg_we = (kind == 0); pcsr.addr_we = (kind == 1); pcsr.idx = 4'(idx); pcsr.wdata = d; end
      1: begin scsr.cfg_we = (kind == 0); scsr.addr_we = (kind == 1); scsr.sw_we = (kind == 2);
               scsr.idx = 4'(idx); scsr.wdata = d; end
      default: begin vcsr.cfg_we = (kind == 0); vcsr.addr_we = (kind == 1); vcsr.idx = 4'(idx); vcsr.wdata = d; end
    endcase
    @(posedge clk); #1;
    idle_all();
  endtask

  task automatic chk(string what, int p, mode_t m, acc_e a, logic [31:0] ad,
                     logic exp_allow, fault_stage_e exp_fs, logic [4:0] exp_cause);
    mode[p] = m; acc[p] = a; pa[p] = ad; #1;
    check($sformatf("%s allow=%0b exp %0b", what, allow[p], exp_allow), allow[p] == exp_allow);
    check($sformatf("%s stage=%0d exp %0d", what, fstage[p], exp_fs), fstage[p] == exp_fs);
    check($sformatf("%s cause=%0d exp %0d", what, cause[p], exp_cause), cause[p] == exp_cause);
  endtask

  initial begin
    idle_all();
    pcsr.idx = 0; pcsr.wdata = 0; pcsr.rd_sel = 0; pcsr.rd_idx = 0;
    scsr.idx = 0; scsr.wdata = 0; scsr.rd_sel = 0; scsr.rd_idx = 0;
    vcsr.idx = 0; vcsr.wdata = 0; vcsr.rd_sel = 0; vcsr.rd_idx = 0;
    for (int p = 0; p < 2; p++) begin mode[p] = M; acc[p] = ACC_R; pa[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // PMP e0: NAPOT 0x0-0xFFFF RWX
    wr(0, 1, 0, 32'h0000_1FFF);
    wr(0, 0, 0, 32'h0000_001F);
    // SPMP e0: U-rule RW 0x2000-0x2FFF, e1: S-rule RX 0x1000-0x1FFF; both switched on
    wr(1, 1, 0, 32'h0000_09FF);
    wr(1, 1, 1, 32'h0000_05FF);
    wr(1, 0, 0, 32'h0000_9D1B);
    wr(1, 2, 0, 32'h0000_0003);
    // vSPMP e0: U-rule R 0x2000-0x27FF
    wr(2, 1, 0, 32'h0000_08FF);
    wr(2, 0, 0, 32'h0000_0019);

    chk("VU R guest data",      0, VU, ACC_R, 32'h0000_2000, 1'b1, FS_NONE,  CAUSE_LOAD_ACCESS);
    chk("VU W stage1",          1, VU, ACC_W, 32'h0000_2000, 1'b0, FS_VSPMP, CAUSE_STORE_ACCESS);
    chk("VS W stage1 U-rule",   0, VS, ACC_W, 32'h0000_2004, 1'b0, FS_VSPMP, CAUSE_STORE_ACCESS);
    chk("VU R no vSPMP match",  1, VU, ACC_R, 32'h0000_2800, 1'b0, FS_VSPMP, CAUSE_LOAD_ACCESS);
    chk("VS R stage2 S-rule",   0, VS, ACC_R, 32'h0000_1000, 1'b0, FS_SPMP,  CAUSE_LOAD_ACCESS);
    chk("VS W stage2 allowed",  1, VS, ACC_W, 32'h0000_2800, 1'b1, FS_NONE,  CAUSE_STORE_ACCESS);
    chk("HU X stage2",          0, HU, ACC_X, 32'h0000_2000, 1'b0, FS_SPMP,  CAUSE_INSTR_ACCESS);
    chk("HS X hyp code",        1, HS, ACC_X, 32'h0000_1000, 1'b1, FS_NONE,  CAUSE_INSTR_ACCESS);
    chk("HS R pmp",             0, HS, ACC_R, 32'h0002_0000, 1'b0, FS_PMP,   CAUSE_LOAD_ACCESS);
    chk("M R no checks",        1, M,  ACC_R, 32'h0002_0000, 1'b1, FS_NONE,  CAUSE_LOAD_ACCESS);
    chk("VU X stage1 first",    0, VU, ACC_X, 32'h0002_0000, 1'b0, FS_VSPMP, CAUSE_INSTR_ACCESS);

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
