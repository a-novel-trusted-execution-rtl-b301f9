// End-to-end testbench of the BA51-H virtualization/TEE hardware at its
// default sizes (16-entry PMP, SPMP and vSPMP, 8 interrupt sources, 64 KiB
// SRAM). It plays the software stack of a hypervisor-based TEE:
//   1. M-mode firmware opens the low 256 MiB in the PMP and delegates traps;
//   2. the hypervisor (HS) lays out its own, guest A's and guest B's regions
//      in the unified SPMP and loads the guest images into SRAM;
//   3. guest A (VS) programs its vSPMP through the redirected S-level CSRs,
//      runs its kernel and application, and is stopped by the first stage
//      (its own rules) and the second stage (the hypervisor's rules), and
//      reads but cannot write a page the hypervisor shares with it;
//   4. a guest timer (vstimecmp with htimedelta) interrupts guest A directly;
//   5. the hypervisor switches to guest B by rewriting the SPMP switch and
//      the vSPMP, and guest B is confined to its own memory;
//   6. the PMP stops the hypervisor outside the firmware's window;
//   7. APLIC interrupts reach HS (delegated source) and M (kept source),
//      the CLINT timer reaches M, and M reaches the external bus, while a
//      refused access shows nothing on it;
//   8. a debug trigger turns an M-mode load into a breakpoint;
//   9. the firmware locks itself out of the open window by setting the
//      enhanced-PMP MML bit (mseccfg), after which M can no longer fetch or
//      load from the supervisor's SRAM.
// Every access result is compared with values fixed by the scenario, and
// each mechanism is counted; one that never happens is a failure.
module tb_ba51h_tee_hw;
  import ba51h_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // DUT ports
  mode_t        mode;
  logic         if_req, if_rvalid, if_fault;
  logic [31:0]  if_addr, if_rdata;
  fault_stage_e if_fstage, d_fstage;
  logic         d_req, d_we, d_rvalid, d_fault;
  logic [3:0]   d_be, ext_d_be;
  logic [31:0]  d_addr, d_wdata, d_rdata;
  logic         ext_i_req, ext_d_req, ext_d_we;
  logic [31:0]  ext_i_addr, ext_i_rdata, ext_d_addr, ext_d_wdata, ext_d_rdata;
  logic         csr_valid, csr_we, csr_hit, csr_illegal;
  logic [11:0]  csr_addr;
  logic [31:0]  csr_wdata, csr_rdata;
  logic         menvcfg_stce, henvcfg_stce, mstatus_mie, mstatus_sie, vsstatus_sie;
  logic         mcounteren_tm, hcounteren_tm, scounteren_tm;
  logic         ssip, vssip, vseip, time_tick;
  logic [12:0]  mie, mideleg, hideleg, mip;
  logic [31:0]  medeleg, hedeleg;
  logic [8:1]   irq_src;
  logic         trap, trap_is_irq;
  logic [4:0]   trap_cause;
  trap_tgt_e    trap_target;

  ba51h_tee_hw dut (.*);

  localparam mode_t M  = '{v:1'b0, prv:PRV_M};
  localparam mode_t HS = '{v:1'b0, prv:PRV_S};
  localparam mode_t VS = '{v:1'b1, prv:PRV_S};
  localparam mode_t VU = '{v:1'b1, prv:PRV_U};

  // External memory model: read data are a fixed function of the address
  function automatic logic [31:0] ext_word(logic [31:0] a);
    return a ^ 32'h5A5A_0000;
  endfunction
  always_ff @(posedge clk) begin
    ext_i_rdata <= ext_word(ext_i_addr);
    ext_d_rdata <= ext_word(ext_d_addr);
  end

  // Mechanism counters
  int n_stage1, n_stage2, n_pmp, n_redirect, n_switch, n_csr_illegal;
  int n_shared, n_trigger;
  int n_trap_m, n_trap_hs, n_trap_vs, n_vstimer, n_seip, n_meip, n_mtip, n_ext, n_vmswitch;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic csr_w(mode_t m, logic [11:0] a, logic [31:0] d, logic exp_illegal = 1'b0);
    mode = m; csr_valid = 1; csr_we = 1; csr_addr = a; csr_wdata = d; #1;
    check($sformatf("csr write %h illegal=%0b", a, csr_illegal), csr_illegal == exp_illegal);
    if (csr_illegal) n_csr_illegal++;
    if (m.v && a[11:8] == 4'h1 && a[7:4] inside {4'hA, 4'hB}) n_redirect++;
    if (a == 12'h170) n_switch++;
    @(posedge clk); #1;
    csr_valid = 0; csr_we = 0;
  endtask

  logic [31:0] rv;
  task automatic csr_r(mode_t m, logic [11:0] a);
    mode = m; csr_valid = 1; csr_we = 0; csr_addr = a; #1;
    rv = csr_rdata;
    @(posedge clk); #1;
    csr_valid = 0;
  endtask

  // One data access; checks the response and, on a fault, the trap it raises
  task automatic dacc(string what, mode_t m, logic we, logic [31:0] a, logic [31:0] wd,
                      fault_stage_e exp_fs, logic [31:0] exp_rd = 32'h0, logic chk_rd = 1'b0,
                      trap_tgt_e exp_tgt = TGT_HS);
    mode = m; d_req = 1; d_we = we; d_be = 4'hF; d_addr = a; d_wdata = wd;
    @(posedge clk); #1;
    d_req = 0; d_we = 0;
    check({what, " rvalid"}, d_rvalid);
    check($sformatf("%s fault stage %0d exp %0d", what, d_fstage, exp_fs), d_fstage == exp_fs);
    check({what, " fault flag"}, d_fault == (exp_fs != FS_NONE));
    if (chk_rd) check($sformatf("%s rdata %h exp %h", what, d_rdata, exp_rd), d_rdata == exp_rd);
    if (exp_fs != FS_NONE) begin
      check($sformatf("%s trap cause %0d tgt %0d", what, trap_cause, trap_target),
            trap && !trap_is_irq && trap_cause == (we ? CAUSE_STORE_ACCESS : CAUSE_LOAD_ACCESS) &&
            trap_target == exp_tgt);
      count_fault(exp_fs);
      count_trap();
    end else begin
      check({what, " no trap"}, !trap);
    end
  endtask

  task automatic fetch(string what, mode_t m, logic [31:0] a, fault_stage_e exp_fs,
                       logic [31:0] exp_rd = 32'h0);
    mode = m; if_req = 1; if_addr = a;
    @(posedge clk); #1;
    if_req = 0;
    check({what, " rvalid"}, if_rvalid);
    check($sformatf("%s fetch stage %0d exp %0d", what, if_fstage, exp_fs), if_fstage == exp_fs);
    if (exp_fs == FS_NONE) check($sformatf("%s fetch data %h", what, if_rdata), if_rdata == exp_rd);
    else begin
      check({what, " fetch trap"}, trap && trap_cause == CAUSE_INSTR_ACCESS);
      count_fault(exp_fs);
      count_trap();
    end
  endtask

  task automatic count_fault(fault_stage_e fs);
    unique case (fs)
      FS_VSPMP: n_stage1++;
      FS_SPMP:  n_stage2++;
      FS_PMP:   n_pmp++;
      default: ;
    endcase
  endtask

  task automatic count_trap();
    unique case (trap_target)
      TGT_M:   n_trap_m++;
      TGT_HS:  n_trap_hs++;
      default: n_trap_vs++;
    endcase
  endtask

  // Wait until an interrupt trap with the given cause and target shows; the
  // number of clock edges waited is left in irq_wait
  int irq_wait;
  logic [31:0] mt;
  task automatic wait_irq(string what, logic [4:0] c, trap_tgt_e tg, int max_cycles);
    int k;
    for (k = 0; k < max_cycles; k++) begin
      if (trap && trap_is_irq) break;
      @(posedge clk); #1;
    end
    check($sformatf("%s: trap=%0b irq=%0b cause=%0d tgt=%0d", what, trap, trap_is_irq, trap_cause, trap_target),
          trap && trap_is_irq && trap_cause == c && trap_target == tg);
    if (trap && trap_is_irq) count_trap();
    irq_wait = k;
  endtask

  initial begin
    mode = M; if_req = 0; if_addr = 0; d_req = 0; d_we = 0; d_be = 0; d_addr = 0; d_wdata = 0;
    csr_valid = 0; csr_we = 0; csr_addr = 0; csr_wdata = 0;
    mcounteren_tm = 1; hcounteren_tm = 1; scounteren_tm = 1;
    menvcfg_stce = 1; henvcfg_stce = 1; mstatus_mie = 0; mstatus_sie = 0; vsstatus_sie = 1;
    ssip = 0; vssip = 0; vseip = 0; time_tick = 0; irq_src = '0;
    mie = '1;
    mideleg = 13'((1 << IRQ_SEI) | (1 << IRQ_STI) | (1 << IRQ_SSI) |
                  (1 << IRQ_VSEI) | (1 << IRQ_VSTI) | (1 << IRQ_VSSI));
    hideleg = 13'((1 << IRQ_VSEI) | (1 << IRQ_VSTI) | (1 << IRQ_VSSI));
    medeleg = 32'((1 << 1) | (1 << 5) | (1 << 7));
    hedeleg = 32'h0;
    n_stage1 = 0; n_stage2 = 0; n_pmp = 0; n_redirect = 0; n_switch = 0; n_csr_illegal = 0;
    n_shared = 0; n_trigger = 0;
    n_trap_m = 0; n_trap_hs = 0; n_trap_vs = 0; n_vstimer = 0; n_seip = 0; n_meip = 0;
    n_mtip = 0; n_ext = 0; n_vmswitch = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check("no trap after reset", !trap && mip == '0);

    // 1. Firmware: PMP e0 NAPOT 0x0000_0000-0x0FFF_FFFF RWX
    csr_w(M, 12'h3B0, 32'h01FF_FFFF);
    csr_w(M, 12'h3A0, 32'h0000_001F);
    dacc("HS write before SPMP setup", HS, 1, 32'h0000_0100, 32'h1111_2222, FS_NONE);

    // 2. Hypervisor layout in the unified SPMP
    csr_w(HS, 12'h1B0, 32'h0000_07FF);   // e0 hyp   0x0000-0x3FFF S RW
    csr_w(HS, 12'h1B1, 32'h0000_17FF);   // e1 A     0x4000-0x7FFF U RWX
    csr_w(HS, 12'h1B2, 32'h0000_27FF);   // e2 B     0x8000-0xBFFF U RWX
    csr_w(HS, 12'h1B3, 32'h01FF_FFFF);   // e3 all   0x0-0x0FFF_FFFF S RW
    csr_w(HS, 12'h1B4, 32'h0000_31FF);   // e4 shared 0xC000-0xCFFF S RW / U R
    csr_w(HS, 12'h1A0, 32'h9B1F_1F9B);
    csr_w(HS, 12'h1A1, 32'h0000_001A);
    csr_w(HS, 12'h170, 32'h0000_0019);   // hypervisor running: e0, e3, e4
    dacc("HS fills shared page", HS, 1, 32'h0000_C000, 32'h5A5A_0003, FS_NONE);
    dacc("HS load guest A image", HS, 1, 32'h0000_4000, 32'hA0A0_0001, FS_NONE);
    dacc("HS load guest B image", HS, 1, 32'h0000_8000, 32'hB0B0_0002, FS_NONE);
    dacc("HS read own data", HS, 0, 32'h0000_0100, 0, FS_NONE, 32'h1111_2222, 1);
    csr_w(HS, 12'h605, 32'd0);           // htimedelta
    csr_w(HS, 12'h615, 32'd0);
    csr_w(HS, 12'h170, 32'h0000_0012);   // enter guest A: e1 and the shared e4
    n_vmswitch++;

    // 3. Guest A programs its vSPMP with the S-level CSR numbers
    csr_w(VS, 12'h1B0, 32'h0000_13FF);   // ve0 kernel 0x4000-0x5FFF S RX
    csr_w(VS, 12'h1B1, 32'h0000_1BFF);   // ve1 app    0x6000-0x7FFF U RW
    csr_w(VS, 12'h1A0, 32'h0000_1B9D);
    csr_w(VS, 12'h170, 32'h0, 1'b1);     // no switch for guests
    fetch("guest A kernel fetch", VS, 32'h0000_4000, FS_NONE, 32'hA0A0_0001);
    dacc("guest A kernel writes app page", VS, 1, 32'h0000_6000, 32'h0, FS_VSPMP);
    dacc("guest A app write", VU, 1, 32'h0000_6000, 32'h0000_CAFE, FS_NONE);
    dacc("guest A app read", VU, 0, 32'h0000_6000, 0, FS_NONE, 32'h0000_CAFE, 1);
    dacc("guest A app reads kernel", VU, 0, 32'h0000_4000, 0, FS_VSPMP);
    dacc("guest A reads guest B", VS, 0, 32'h0000_8000, 0, FS_SPMP);
    dacc("guest A reads hypervisor", VS, 0, 32'h0000_0100, 0, FS_SPMP);
    dacc("guest A reads CLINT", VS, 0, 32'h0200_BFF8, 0, FS_SPMP);
    fetch("guest A app fetch", VU, 32'h0000_6000, FS_VSPMP);
    dacc("guest A reads shared page", VS, 0, 32'h0000_C000, 0, FS_NONE, 32'h5A5A_0003, 1);
    n_shared++;
    dacc("guest A writes shared page", VS, 1, 32'h0000_C000, 32'h0, FS_SPMP);
    n_shared++;

    // 4. Guest timer: vstimecmp = 40 through stimecmp, time counts from 0
    csr_w(VS, 12'h15D, 32'd0);
    csr_w(VS, 12'h14D, 32'd40);
    mode = VS;
    time_tick = 1;
    wait_irq("guest timer to VS", 5'd5, TGT_VS, 200);
    n_vstimer++;
    check("vstimer not early", dut.mtime >= 64'd40 && dut.mtime <= 64'd42);
    csr_w(VS, 12'h15D, 32'hFFFF_FFFF);
    check("vstip cleared", !mip[IRQ_VSTI]);

    // 5. Back to the hypervisor, check the redirection, switch to guest B
    csr_w(HS, 12'h170, 32'h0000_0009);
    csr_r(HS, 12'h2B0); check("guest write landed in vSPMP", rv == 32'h0000_13FF);
    csr_r(HS, 12'h1B0); check("hypervisor SPMP untouched", rv == 32'h0000_07FF);
    csr_w(HS, 12'h2B0, 32'h0000_27FF);   // guest B: ve0 0x8000-0xBFFF S RW
    csr_w(HS, 12'h2A0, 32'h0000_009B);
    csr_w(HS, 12'h170, 32'h0000_0004);   // only e2
    n_vmswitch++;
    dacc("guest B reads own image", VS, 0, 32'h0000_8000, 0, FS_NONE, 32'hB0B0_0002, 1);
    dacc("guest B reads guest A", VS, 0, 32'h0000_4000, 0, FS_SPMP);
    dacc("guest B writes guest A app", VS, 1, 32'h0000_6000, 32'h0, FS_SPMP);
    csr_w(HS, 12'h170, 32'h0000_0009);

    // 6. The PMP bounds even the hypervisor
    dacc("hypervisor outside firmware window", HS, 0, 32'h2000_0000, 0, FS_PMP);
    fetch("hypervisor fetch from RW-only region", HS, 32'h0000_8000, FS_SPMP);

    // 7. Interrupt controllers
    dacc("M APLIC IE",        M, 1, 32'h0C00_0000, 32'h100, FS_NONE);
    dacc("M delegate src1",   M, 1, 32'h0C00_0004, 32'h400, FS_NONE);
    dacc("M src2 edge",       M, 1, 32'h0C00_0008, 32'd4,   FS_NONE);
    dacc("M src2 prio",       M, 1, 32'h0C00_3008, 32'd1,   FS_NONE);
    dacc("M enable src2",     M, 1, 32'h0C00_1EDC, 32'd2,   FS_NONE);
    dacc("M idelivery",       M, 1, 32'h0C00_4000, 32'd1,   FS_NONE);
    dacc("HS APLIC IE",       HS, 1, 32'h0C00_8000, 32'h100, FS_NONE);
    dacc("HS src1 level",     HS, 1, 32'h0C00_8004, 32'd6,   FS_NONE);
    dacc("HS src1 prio",      HS, 1, 32'h0C00_B004, 32'd1,   FS_NONE);
    dacc("HS enable src1",    HS, 1, 32'h0C00_9EDC, 32'd1,   FS_NONE);
    dacc("HS idelivery",      HS, 1, 32'h0C00_C000, 32'd1,   FS_NONE);
    dacc("HS reads root cfg", HS, 0, 32'h0C00_0004, 0, FS_NONE, 32'h400, 1);

    mode = VS;
    irq_src[1] = 1;
    wait_irq("delegated APLIC source to HS", 5'd9, TGT_HS, 10);
    // The line-to-trap path must leave the core most of its 4-cycle budget
    // from interrupt to handler: one clock (the APLIC's pending flop) here
    check($sformatf("APLIC level source to trap in %0d clock(s)", irq_wait), irq_wait == 1);
    n_seip++;
    dacc("HS claims src1", HS, 0, 32'h0C00_C01C, 0, FS_NONE, 32'h0001_0001, 1);
    irq_src[1] = 0;
    @(posedge clk); #1; @(posedge clk); #1;
    check("seip gone", !mip[IRQ_SEI]);

    mode = HS;
    irq_src[2] = 1; @(posedge clk); #1; irq_src[2] = 0;
    wait_irq("kept APLIC source to M", 5'd11, TGT_M, 10);
    check($sformatf("APLIC edge source to trap in %0d clock(s)", 1 + irq_wait), 1 + irq_wait == 1);
    n_meip++;
    dacc("M claims src2", M, 0, 32'h0C00_401C, 0, FS_NONE, 32'h0002_0001, 1);
    check("meip gone", !mip[IRQ_MEI]);

    time_tick = 0;
    dacc("M reads mtime", M, 0, 32'h0200_BFF8, 0, FS_NONE);
    rv = d_rdata;
    check("mtime readable", rv == dut.mtime[31:0]);
    dacc("M mtimecmp hi", M, 1, 32'h0200_4004, 32'd0, FS_NONE);
    dacc("M mtimecmp lo", M, 1, 32'h0200_4000, rv + 32'd8, FS_NONE);
    mode = HS;
    time_tick = 1;
    wait_irq("CLINT timer to M", 5'd7, TGT_M, 40);
    n_mtip++;
    dacc("M mtimecmp off", M, 1, 32'h0200_4004, 32'hFFFF_FFFF, FS_NONE);
    check("mtip gone", !mip[IRQ_MTI]);

    // External bus, reachable by M only
    mode = M; d_req = 1; d_we = 1; d_be = 4'h3; d_addr = 32'h2000_0010; d_wdata = 32'h0BAD_F00D; #1;
    check("ext write request", ext_d_req && ext_d_we && ext_d_be == 4'h3 && ext_d_addr == 32'h2000_0010);
    if (ext_d_req) n_ext++;
    @(posedge clk); #1; d_req = 0; d_we = 0;
    dacc("M ext read", M, 0, 32'h2000_0020, 0, FS_NONE, ext_word(32'h2000_0020), 1);
    fetch("M ext fetch", M, 32'h3000_0040, FS_NONE, ext_word(32'h3000_0040));
    n_ext++;
    mode = HS; d_req = 1; d_we = 1; d_be = 4'hF; d_addr = 32'h2000_0010; d_wdata = 32'h5EC2_E700; #1;
    check("refused write kept off the bus",
          !ext_d_req && !ext_d_we && ext_d_be == 4'h0 && ext_d_addr == 32'h0 && ext_d_wdata == 32'h0);
    d_req = 0; d_we = 0; #1;

    // Guest time: a VS read of time is shifted by htimedelta
    csr_w(HS, 12'h605, 32'd1000);
    mt = dut.mtime[31:0];
    csr_r(VS, 12'hC01);
    check($sformatf("guest time %0d mtime %0d", rv, mt), rv == mt + 32'd1000);
    mt = dut.mtime[31:0];
    csr_r(HS, 12'hC01);
    check($sformatf("host time %0d mtime %0d", rv, mt), rv == mt);
    n_redirect++;

    // Debug trigger: an M load from 0x8000 becomes a breakpoint
    csr_w(M, 12'h7A0, 32'd0);
    csr_w(M, 12'h7A2, 32'h0000_8000);
    csr_w(M, 12'h7A1, 32'h0000_0041);   // m, load, match equal
    mode = M; d_req = 1; d_we = 0; d_be = 4'hF; d_addr = 32'h0000_8000;
    @(posedge clk); #1;
    d_req = 0;
    check($sformatf("trigger breakpoint: fault=%0b stage=%0d trap=%0b cause=%0d tgt=%0d",
                    d_fault, d_fstage, trap, trap_cause, trap_target),
          d_fault && d_fstage == FS_NONE && trap && !trap_is_irq &&
          trap_cause == CAUSE_BREAKPOINT && trap_target == TGT_M);
    if (d_fault && trap_cause == CAUSE_BREAKPOINT) n_trigger++;
    count_trap();
    fetch("M fetch at load trigger address", M, 32'h0000_8000, FS_NONE, 32'hB0B0_0002);
    csr_r(M, 12'h7A1);
    check($sformatf("trigger hit0 %h", rv), rv[22]);
    csr_w(M, 12'h7A1, 32'h0);

    // Enhanced PMP: with MML the open window (L=0) serves S/U only
    csr_w(M, 12'h747, 32'h0000_0001);
    csr_r(M, 12'h747);
    check($sformatf("mseccfg %h", rv), rv == 32'h0000_0001);
    fetch("M fetch under MML", M, 32'h0000_4000, FS_PMP);
    check("MML fetch fault to M", trap_target == TGT_M);
    dacc("M load under MML", M, 0, 32'h0000_4000, 0, FS_PMP, 0, 0, TGT_M);

    // Every mechanism must have been seen
    check($sformatf("stage-1 faults %0d", n_stage1), n_stage1 > 0);
    check($sformatf("stage-2 faults %0d", n_stage2), n_stage2 > 0);
    check($sformatf("PMP faults %0d", n_pmp), n_pmp > 0);
    check($sformatf("VS CSR redirections %0d", n_redirect), n_redirect > 0);
    check($sformatf("switch writes %0d", n_switch), n_switch > 0);
    check($sformatf("shared-region accesses %0d", n_shared), n_shared > 1);
    check($sformatf("trigger breakpoints %0d", n_trigger), n_trigger > 0);
    check($sformatf("VM switches %0d", n_vmswitch), n_vmswitch > 1);
    check($sformatf("illegal CSR %0d", n_csr_illegal), n_csr_illegal > 0);
    check($sformatf("traps to M %0d", n_trap_m), n_trap_m > 0);
    check($sformatf("traps to HS %0d", n_trap_hs), n_trap_hs > 0);
    check($sformatf("traps to VS %0d", n_trap_vs), n_trap_vs > 0);
    check("guest timer, SEIP, MEIP, MTIP", n_vstimer > 0 && n_seip > 0 && n_meip > 0 && n_mtip > 0);
    check($sformatf("external accesses %0d", n_ext), n_ext > 1);
    $display("mechanisms: stage1=%0d stage2=%0d pmp=%0d redirect=%0d switch=%0d shared=%0d trigger=%0d illegal=%0d trapM=%0d trapHS=%0d trapVS=%0d",
             n_stage1, n_stage2, n_pmp, n_redirect, n_switch, n_shared, n_trigger, n_csr_illegal, n_trap_m, n_trap_hs, n_trap_vs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
