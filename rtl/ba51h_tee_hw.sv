// BA51-H virtualization and TEE hardware: everything the hypervisor-based
// TEE needs around the RISC-V pipeline of the core.
//
// The core (not part of this block) presents its current privilege mode
// {V, PRV}, an instruction-fetch port, a data port and a CSR port. Here:
//   - the MPU checks every fetch and data access against the guest's vSPMP
//     (first stage), the hypervisor's unified SPMP (second stage) and the
//     M-mode PMP, all in the request cycle;
//   - allowed accesses go to the 64 KiB SRAM, the CLINT, the APLIC or, for
//     any other address, out through the external request ports;
//   - refused accesses never leave the block and return an access fault;
//   - eight debug triggers watch both ports; a firing trigger replaces the
//     access with a breakpoint exception (cause 3, fault stage none);
//   - the CSR file gives the core the protection registers (with the
//     enhanced-PMP mseccfg), the trigger registers, the Sstc registers and
//     the time counter, redirecting VS-mode accesses to the guest copies;
//   - CLINT, Sstc and APLIC produce the interrupt-pending bits, and the trap
//     router decides whether an interrupt or a reported access fault traps,
//     with which cause, and to M, HS or VS.
//
// Timing: fetch and data requests are single-cycle, fully pipelined; the
// response (rvalid, rdata, fault, cause, fault stage) comes one clock later.
// External ports return read data in that same next cycle. CSR accesses are
// combinational with writes at the clock edge. The trap outputs are
// combinational from the registered faults and the interrupt state.
//
// Address map (this design's choice): SRAM 0x0000_0000-0x0000_FFFF,
// CLINT 0x0200_0000-0x0200_FFFF, APLIC 0x0C00_0000 (machine domain) and
// 0x0C00_8000 (supervisor domain); everything else is external. Fetches are
// served from SRAM or the external port only.
module ba51h_tee_hw
  import ba51h_pkg::*;
#(
  parameter int unsigned PMP_ENTRIES   = 16,
  parameter int unsigned SPMP_ENTRIES  = 16,
  parameter int unsigned VSPMP_ENTRIES = 16,
  parameter int unsigned N_IRQ         = 8,
  parameter int unsigned N_TRIG        = 8,
  parameter int unsigned SRAM_BYTES    = 65536
) (
  input  logic            clk,
  input  logic            rst_n,
  input  mode_t           mode,
  // instruction fetch
  input  logic            if_req,
  input  logic [31:0]     if_addr,
  output logic            if_rvalid,
  output logic [31:0]     if_rdata,
  output logic            if_fault,
  output fault_stage_e    if_fstage,
  // data access
  input  logic            d_req,
  input  logic            d_we,
  input  logic [3:0]      d_be,
  input  logic [31:0]     d_addr,
  input  logic [31:0]     d_wdata,
  output logic            d_rvalid,
  output logic [31:0]     d_rdata,
  output logic            d_fault,
  output fault_stage_e    d_fstage,
  // external instruction and data buses (requests that passed the MPU)
  output logic            ext_i_req,
  output logic [31:0]     ext_i_addr,
  input  logic [31:0]     ext_i_rdata,
  output logic            ext_d_req,
  output logic            ext_d_we,
  output logic [3:0]      ext_d_be,
  output logic [31:0]     ext_d_addr,
  output logic [31:0]     ext_d_wdata,
  input  logic [31:0]     ext_d_rdata,
  // CSR port
  input  logic            csr_valid,
  input  logic            csr_we,
  input  logic [11:0]     csr_addr,
  input  logic [31:0]     csr_wdata,
  output logic [31:0]     csr_rdata,
  output logic            csr_hit,
  output logic            csr_illegal,
  // core CSR state used here
  input  logic            menvcfg_stce,
  input  logic            henvcfg_stce,
  input  logic            mcounteren_tm,   // counter-enable TM bits gating time reads
  input  logic            hcounteren_tm,
  input  logic            scounteren_tm,
  input  logic [12:0]     mie,
  input  logic [12:0]     mideleg,
  input  logic [12:0]     hideleg,
  input  logic [31:0]     medeleg,
  input  logic [31:0]     hedeleg,
  input  logic            mstatus_mie,
  input  logic            mstatus_sie,
  input  logic            vsstatus_sie,
  input  logic            ssip,         // software-set mip.SSIP
  input  logic            vssip,        // hypervisor-set hvip.VSSIP
  input  logic            vseip,        // hypervisor-set hvip.VSEIP
  // platform
  input  logic            time_tick,
  input  logic [N_IRQ:1]  irq_src,
  // interrupt and trap outcome
  output logic [12:0]     mip,
  output logic            trap,
  output logic            trap_is_irq,
  output logic [4:0]      trap_cause,
  output trap_tgt_e       trap_target
);
  localparam int unsigned SRAM_AW = $clog2(SRAM_BYTES / 4);

  typedef enum logic [2:0] {D_SRAM, D_CLINT, D_APLIC, D_EXT, D_NONE} dsel_e;

  // ---------------- CSR file, tables, timers -------------------------------
  mpu_csr_if pmp_csr ();
  mpu_csr_if spmp_csr ();
  mpu_csr_if vspmp_csr ();

  logic        sstc_we;
  logic [2:0]  sstc_sel, sstc_rd_sel;
  logic        sstc_rd_virt;
  logic        trig_we;
  logic [1:0]  trig_sel;
  logic [31:0] trig_wdata, trig_rdata;
  logic [31:0] sstc_wdata, sstc_rdata;
  logic        stip, vstip;

  tee_csr_file #(.PMP_ENTRIES(PMP_ENTRIES), .SPMP_ENTRIES(SPMP_ENTRIES),
                 .VSPMP_ENTRIES(VSPMP_ENTRIES)) u_csr (
    .mode, .csr_valid, .csr_we, .csr_addr, .csr_wdata, .csr_rdata, .csr_hit, .csr_illegal,
    .menvcfg_stce, .henvcfg_stce, .mcounteren_tm, .hcounteren_tm, .scounteren_tm,
    .pmp_csr(pmp_csr), .spmp_csr(spmp_csr), .vspmp_csr(vspmp_csr),
    .sstc_we, .sstc_sel, .sstc_wdata, .sstc_rd_sel, .sstc_rd_virt, .sstc_rdata,
    .trig_we, .trig_sel, .trig_wdata, .trig_rdata
  );

  // ---------------- MPU on both ports --------------------------------------
  mode_t        pmode  [2];
  acc_e         pacc   [2];
  logic [31:0]  ppa    [2];
  logic         pallow [2];
  fault_stage_e pfs    [2];
  logic [4:0]   pcause [2];

  assign pmode[0] = mode;
  assign pmode[1] = mode;
  assign pacc[0]  = ACC_X;
  assign pacc[1]  = d_we ? ACC_W : ACC_R;
  assign ppa[0]   = if_addr;
  assign ppa[1]   = d_addr;

  mpu #(.PMP_ENTRIES(PMP_ENTRIES), .SPMP_ENTRIES(SPMP_ENTRIES),
        .VSPMP_ENTRIES(VSPMP_ENTRIES), .N_PORTS(2)) u_mpu (
    .clk, .rst_n, .pmp_csr(pmp_csr), .spmp_csr(spmp_csr), .vspmp_csr(vspmp_csr),
    .mode(pmode), .acc(pacc), .pa(ppa), .allow(pallow), .fstage(pfs), .cause(pcause)
  );

  // ---------------- debug triggers on both ports ---------------------------
  // A firing trigger turns the access into a breakpoint exception, taking
  // precedence over a protection fault, and the access is not performed.
  logic treq [2];
  logic thit [2];

  assign treq[0] = if_req;
  assign treq[1] = d_req;

  trigger_unit #(.N_TRIG(N_TRIG), .N_PORTS(2)) u_trig (
    .clk, .rst_n, .csr_we(trig_we), .csr_sel(trig_sel), .csr_wdata(trig_wdata),
    .csr_rdata(trig_rdata), .req(treq), .mode(pmode), .acc(pacc), .addr(ppa), .hit(thit)
  );

  // ---------------- address decode -----------------------------------------
  logic  if_ok, d_ok, if_sram;
  dsel_e dsel;

  assign if_ok   = if_req && pallow[0] && !thit[0];
  assign d_ok    = d_req && pallow[1] && !thit[1];
  assign if_sram = (if_addr[31:16] == 16'h0000);

  always_comb begin
    if (!d_ok)                          dsel = D_NONE;
    else if (d_addr[31:16] == 16'h0000) dsel = D_SRAM;
    else if (d_addr[31:16] == 16'h0200) dsel = D_CLINT;
    else if (d_addr[31:16] == 16'h0C00) dsel = D_APLIC;
    else                                dsel = D_EXT;
  end

  // ---------------- SRAM ----------------------------------------------------
  logic [31:0] sram_i_rdata, sram_d_rdata;

  sram #(.SIZE_BYTES(SRAM_BYTES)) u_sram (
    .clk,
    .i_req  (if_ok && if_sram),
    .i_addr (if_addr[SRAM_AW+1:2]),
    .i_rdata(sram_i_rdata),
    .d_req  (dsel == D_SRAM),
    .d_we   (d_we),
    .d_be   (d_be),
    .d_addr (d_addr[SRAM_AW+1:2]),
    .d_wdata(d_wdata),
    .d_rdata(sram_d_rdata)
  );

  // ---------------- CLINT, APLIC --------------------------------------------
  logic [31:0] clint_rdata, aplic_rdata;
  logic [63:0] mtime;
  logic        mtip, msip, meip, seip;

  clint u_clint (
    .clk, .rst_n, .tick(time_tick),
    .sel(dsel == D_CLINT), .we(d_we), .addr(d_addr[15:0]), .wdata(d_wdata), .rdata(clint_rdata),
    .mtime, .mtip, .msip
  );

  aplic #(.N_SRC(N_IRQ)) u_aplic (
    .clk, .rst_n,
    .sel(dsel == D_APLIC), .we(d_we), .addr(d_addr[15:0]), .wdata(d_wdata), .rdata(aplic_rdata),
    .irq_src, .meip, .seip
  );

  sstc_timer u_sstc (
    .clk, .rst_n, .time_i(mtime), .menvcfg_stce, .henvcfg_stce,
    .we(sstc_we), .sel(sstc_sel), .wdata(sstc_wdata), .rd_sel(sstc_rd_sel), .rd_virt(sstc_rd_virt), .rdata(sstc_rdata),
    .stip, .vstip
  );

  // ---------------- external buses ------------------------------------------
  assign ext_i_req   = if_ok && !if_sram;
  // Refused or internal accesses never show their address or data outside
  assign ext_i_addr  = ext_i_req ? if_addr : 32'd0;
  assign ext_d_req   = (dsel == D_EXT);
  assign ext_d_we    = ext_d_req && d_we;
  assign ext_d_be    = ext_d_req ? d_be : 4'd0;
  assign ext_d_addr  = ext_d_req ? d_addr : 32'd0;
  assign ext_d_wdata = ext_d_req ? d_wdata : 32'd0;

  // ---------------- responses -----------------------------------------------
  logic        if_sram_q;
  dsel_e       dsel_q;
  logic [31:0] per_rdata_q;
  logic [4:0]  if_cause_q, d_cause_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      if_rvalid   <= 1'b0;
      if_fault    <= 1'b0;
      if_fstage   <= FS_NONE;
      if_sram_q   <= 1'b0;
      d_rvalid    <= 1'b0;
      d_fault     <= 1'b0;
      d_fstage    <= FS_NONE;
      dsel_q      <= D_NONE;
      per_rdata_q <= '0;
      if_cause_q  <= CAUSE_INSTR_ACCESS;
      d_cause_q   <= CAUSE_LOAD_ACCESS;
    end else begin
      if_rvalid   <= if_req;
      if_fault    <= if_req && (!pallow[0] || thit[0]);
      if_fstage   <= (if_req && !thit[0]) ? pfs[0] : FS_NONE;
      if_sram_q   <= if_sram;
      d_rvalid    <= d_req;
      d_fault     <= d_req && (!pallow[1] || thit[1]);
      d_fstage    <= (d_req && !thit[1]) ? pfs[1] : FS_NONE;
      dsel_q      <= (d_req && !d_we) ? dsel : D_NONE;
      per_rdata_q <= (dsel == D_CLINT) ? clint_rdata : aplic_rdata;
      if_cause_q  <= thit[0] ? CAUSE_BREAKPOINT : pcause[0];
      d_cause_q   <= thit[1] ? CAUSE_BREAKPOINT : pcause[1];
    end
  end

  always_comb begin
    if_rdata = if_fault ? 32'd0 : (if_sram_q ? sram_i_rdata : ext_i_rdata);
    unique case (dsel_q)
      D_SRAM:           d_rdata = sram_d_rdata;
      D_CLINT, D_APLIC: d_rdata = per_rdata_q;
      D_EXT:            d_rdata = ext_d_rdata;
      default:          d_rdata = '0;
    endcase
  end

  // ---------------- interrupts and traps -------------------------------------
  logic       exc_valid;
  logic [4:0] exc_cause;

  always_comb begin
    mip = '0;
    mip[IRQ_SSI]  = ssip;
    mip[IRQ_VSSI] = vssip;
    mip[IRQ_MSI]  = msip;
    mip[IRQ_STI]  = stip;
    mip[IRQ_VSTI] = vstip;
    mip[IRQ_MTI]  = mtip;
    mip[IRQ_SEI]  = seip;
    mip[IRQ_VSEI] = vseip;
    mip[IRQ_MEI]  = meip;
  end

  // A data fault is reported ahead of a fetch fault of the same cycle
  assign exc_valid = d_fault || if_fault;
  assign exc_cause = d_fault ? d_cause_q : if_cause_q;

  hyp_trap_router u_trap (
    .mode, .mip, .mie, .mideleg, .hideleg, .mstatus_mie, .mstatus_sie, .vsstatus_sie,
    .exc_valid, .exc_cause, .medeleg, .hedeleg,
    .trap, .is_irq(trap_is_irq), .cause(trap_cause), .target(trap_target)
  );

  // A write must enable at least one byte
  a_write_has_bytes: assert property (@(posedge clk) disable iff (!rst_n) !(d_req && d_we && d_be == 4'd0))
    else $error("data write with no byte enable");
endmodule
