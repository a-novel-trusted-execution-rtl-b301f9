// Self-checking testbench of the trap router: interrupt levels and global
// enables per mode, priority order, VS cause renumbering and exception
// delegation through medeleg/hedeleg. Expected results are worked out by hand.
module tb_hyp_trap_router;
  import ba51h_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  mode_t       mode;
  logic [12:0] mip, mie, mideleg, hideleg;
  logic        mstatus_mie, mstatus_sie, vsstatus_sie, exc_valid, trap, is_irq;
  logic [4:0]  exc_cause, cause;
  logic [31:0] medeleg, hedeleg;
  trap_tgt_e   target;

  hyp_trap_router dut (.mode, .mip, .mie, .mideleg, .hideleg, .mstatus_mie, .mstatus_sie,
                       .vsstatus_sie, .exc_valid, .exc_cause, .medeleg, .hedeleg,
                       .trap, .is_irq, .cause, .target);

  localparam mode_t M  = '{v:1'b0, prv:PRV_M};
  localparam mode_t HS = '{v:1'b0, prv:PRV_S};
  localparam mode_t HU = '{v:1'b0, prv:PRV_U};
  localparam mode_t VS = '{v:1'b1, prv:PRV_S};
  localparam mode_t VU = '{v:1'b1, prv:PRV_U};

  task automatic expect_trap(string what, logic t, logic irq, logic [4:0] c, trap_tgt_e tg);
    #1;
    checks++;
    if (trap !== t || (t && (is_irq !== irq || cause !== c || target !== tg))) begin
      failures++;
      $display("FAIL %s: trap=%0b irq=%0b cause=%0d tgt=%0d", what, trap, is_irq, cause, target);
    end
  endtask

  initial begin
    mie = '1; mideleg = '0; hideleg = '0; medeleg = '0; hedeleg = '0;
    mstatus_mie = 1; mstatus_sie = 1; vsstatus_sie = 1; exc_valid = 0; exc_cause = 0;
    mode = M; mip = '0;
    expect_trap("nothing pending", 0, 0, 0, TGT_M);
    mip = 13'(1 << IRQ_MTI);
    expect_trap("MTI in M", 1, 1, 7, TGT_M);
    mstatus_mie = 0;
    expect_trap("MTI masked in M", 0, 0, 0, TGT_M);
    mode = HS;
    expect_trap("MTI from HS ignores MIE", 1, 1, 7, TGT_M);
    mip = 13'((1 << IRQ_MTI) | (1 << IRQ_MSI));
    expect_trap("MSI before MTI", 1, 1, 3, TGT_M);
    mip = 13'((1 << IRQ_MEI) | (1 << IRQ_MSI));
    expect_trap("MEI first", 1, 1, 11, TGT_M);

    mideleg = 13'((1 << IRQ_SEI) | (1 << IRQ_STI) | (1 << IRQ_SSI) |
                  (1 << IRQ_VSEI) | (1 << IRQ_VSTI) | (1 << IRQ_VSSI));
    mip = 13'(1 << IRQ_STI); mstatus_sie = 0;
    expect_trap("STI masked in HS", 0, 0, 0, TGT_M);
    mode = HU;
    expect_trap("STI from HU", 1, 1, 5, TGT_HS);
    mode = M; mstatus_mie = 1;
    expect_trap("STI never in M", 0, 0, 0, TGT_M);
    mode = VS; mstatus_sie = 0; vsstatus_sie = 0;
    mip = 13'(1 << IRQ_SEI);
    expect_trap("SEI in VS goes to HS", 1, 1, 9, TGT_HS);

    hideleg = 13'((1 << IRQ_VSEI) | (1 << IRQ_VSTI) | (1 << IRQ_VSSI));
    mip = 13'(1 << IRQ_VSTI);
    expect_trap("VSTI masked in VS", 0, 0, 0, TGT_M);
    vsstatus_sie = 1;
    expect_trap("VSTI to VS renumbered", 1, 1, 5, TGT_VS);
    mip = 13'((1 << IRQ_VSEI) | (1 << IRQ_VSSI));
    expect_trap("VSEI before VSSI", 1, 1, 9, TGT_VS);
    mip = 13'(1 << IRQ_VSSI); vsstatus_sie = 0; mode = VU;
    expect_trap("VSSI from VU", 1, 1, 1, TGT_VS);
    mode = HS; mstatus_sie = 1;
    expect_trap("VS interrupt not taken with V=0", 0, 0, 0, TGT_M);
    mode = VU; mip = 13'((1 << IRQ_VSTI) | (1 << IRQ_MEI));
    expect_trap("MEI over VSTI", 1, 1, 11, TGT_M);
    hideleg = '0;
    mip = 13'(1 << IRQ_VSTI);
    expect_trap("VSTI kept by HS when not in hideleg", 1, 1, 6, TGT_HS);

    // Exceptions
    mip = '0; exc_valid = 1; exc_cause = CAUSE_LOAD_ACCESS;
    mode = VU;
    expect_trap("load fault not delegated", 1, 0, 5, TGT_M);
    medeleg = 32'(1 << 5);
    expect_trap("load fault to HS", 1, 0, 5, TGT_HS);
    hedeleg = 32'(1 << 5);
    expect_trap("load fault to VS", 1, 0, 5, TGT_VS);
    mode = HU;
    expect_trap("hedeleg ignored with V=0", 1, 0, 5, TGT_HS);
    mode = M;
    expect_trap("exception in M stays in M", 1, 0, 5, TGT_M);
    mode = VS; exc_cause = CAUSE_STORE_ACCESS;
    expect_trap("store fault not delegated", 1, 0, 7, TGT_M);
    mip = 13'(1 << IRQ_MTI);
    expect_trap("interrupt before exception", 1, 1, 7, TGT_M);

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
