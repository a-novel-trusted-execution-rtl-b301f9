// Trap routing of the hypervisor extension: which level takes a trap.
//
// Combinational. An interrupt is chosen first: every pending and enabled
// interrupt (mip & mie) belongs to M-level unless delegated by mideleg, to
// HS-level if delegated by mideleg only, and to VS-level if also delegated by
// hideleg. A level's interrupts are taken when the hart runs below that level
// or at that level with its global enable set (mstatus.MIE, mstatus.SIE,
// vsstatus.SIE); VS-level interrupts only while V = 1. Higher levels win,
// within a level the order is MEI, MSI, MTI, SEI, SSI, STI, VSEI, VSSI,
// VSTI. A VS-level interrupt reaches the guest with its cause renumbered to
// the supervisor one (VSEI 10 -> 9, VSTI 6 -> 5, VSSI 2 -> 1).
// Without an interrupt, an exception goes to M unless medeleg delegates it
// from a mode below M; a delegated exception raised in V-mode goes to VS if
// hedeleg delegates it further, otherwise to HS.
//
// The design states that the hypervisor extension changed the trap handling
// and that interrupts are delegated; the rules used are the RISC-V
// hypervisor extension's, and taking interrupts before a simultaneous
// exception is this design's choice.
module hyp_trap_router
  import ba51h_pkg::*;
(
  input  mode_t       mode,
  input  logic [12:0] mip,
  input  logic [12:0] mie,
  input  logic [12:0] mideleg,
  input  logic [12:0] hideleg,
  input  logic        mstatus_mie,
  input  logic        mstatus_sie,
  input  logic        vsstatus_sie,
  input  logic        exc_valid,
  input  logic [4:0]  exc_cause,
  input  logic [31:0] medeleg,
  input  logic [31:0] hedeleg,
  output logic        trap,
  output logic        is_irq,
  output logic [4:0]  cause,
  output trap_tgt_e   target
);
  localparam int unsigned N_ORDER = 9;
  localparam int unsigned ORDER [N_ORDER] = '{IRQ_MEI, IRQ_MSI, IRQ_MTI, IRQ_SEI, IRQ_SSI,
                                              IRQ_STI, IRQ_VSEI, IRQ_VSSI, IRQ_VSTI};

  logic m_en, hs_en, vs_en;
  assign m_en  = (mode.prv != PRV_M) || mstatus_mie;
  assign hs_en = (mode.prv != PRV_M) && (mode.v || mode.prv == PRV_U || mstatus_sie);
  assign vs_en = mode.v && (mode.prv == PRV_U || vsstatus_sie);

  always_comb begin
    logic [12:0] pend;
    logic        found;
    trap   = 1'b0;
    is_irq = 1'b0;
    cause  = '0;
    target = TGT_M;
    found  = 1'b0;
    pend   = mip & mie;
    // Three passes: M-level, HS-level, VS-level
    for (int lvl = 0; lvl < 3; lvl++) begin
      for (int k = 0; k < N_ORDER; k++) begin
        int unsigned n;
        logic        here;
        n = ORDER[k];
        unique case (lvl)
          0:       here = !mideleg[n] && m_en;
          1:       here = mideleg[n] && !hideleg[n] && hs_en;
          default: here = mideleg[n] && hideleg[n] && vs_en;
        endcase
        if (!found && pend[n] && here) begin
          found  = 1'b1;
          trap   = 1'b1;
          is_irq = 1'b1;
          target = trap_tgt_e'(lvl);
          cause  = (lvl == 2 && (n == IRQ_VSEI || n == IRQ_VSTI || n == IRQ_VSSI)) ? 5'(n - 1) : 5'(n);
        end
      end
    end
    if (!found && exc_valid) begin
      trap  = 1'b1;
      cause = exc_cause;
      if (mode.prv == PRV_M || !medeleg[exc_cause]) target = TGT_M;
      else if (mode.v && hedeleg[exc_cause])         target = TGT_VS;
      else                                           target = TGT_HS;
    end
  end
endmodule
