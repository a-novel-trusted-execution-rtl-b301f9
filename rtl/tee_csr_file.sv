// CSR decode for the protection tables and supervisor timers of the BA51-H.
//
// Combinational. The core presents one CSR access per cycle (csr_valid,
// csr_we, address, write data) with the current privilege mode; this block
// checks the mode, routes the access to the PMP, unified SPMP, vSPMP or Sstc
// registers, and returns read data or flags it illegal (no register is
// written then). Writes land at the next clock edge in the selected table.
//
// CSR numbers:
//   0x3A0-0x3A3 pmpcfg0-3      0x3B0-0x3BF pmpaddr0-15         (M only)
//   0x1A0-0x1A3 spmpcfg0-3     0x1B0-0x1BF spmpaddr0-15        (HS, M)
//   0x170/0x171 spmpswitch lo/hi                               (HS, M)
//   0x2A0-0x2A3 vspmpcfg0-3    0x2B0-0x2BF vspmpaddr0-15       (HS, M)
//   0x747/0x757 mseccfg(h)  (M only; the high half reads as zero)
//   0x14D/0x15D stimecmp(h)    0x24D/0x25D vstimecmp(h)  0x605/0x615 htimedelta(h)
//   0x7A0-0x7A2 tselect, tdata1, tdata2; 0x7A4 tinfo; 0x7A3 tdata3 reads 0  (M only)
//   0xC01/0xC81 time(h), read-only; below M gated by mcounteren.TM, in V-mode
//   also by hcounteren.TM, in U/VU also by scounteren.TM; V-mode reads get
//   time + htimedelta
// In VS-mode the S-level numbers reach the guest's own copies, as the
// hypervisor extension does for other supervisor CSRs: spmpcfg/spmpaddr go
// to the vSPMP and stimecmp to vstimecmp. The vSPMP has no switch, so
// spmpswitch is illegal in VS-mode. Below M-mode the timer compares need
// menvcfg.STCE, and in VS-mode also henvcfg.STCE.
// The PMP and Sstc/hypervisor numbers are the RISC-V ones; the SPMP, switch
// and vSPMP numbers and the VS redirection of the SPMP are this design's
// choices, following the pattern of the RISC-V CSR space.
module tee_csr_file
  import ba51h_pkg::*;
#(
  parameter int unsigned PMP_ENTRIES   = 16,
  parameter int unsigned SPMP_ENTRIES  = 16,
  parameter int unsigned VSPMP_ENTRIES = 16
) (
  input  mode_t        mode,
  input  logic         csr_valid,
  input  logic         csr_we,
  input  logic [11:0]  csr_addr,
  input  logic [31:0]  csr_wdata,
  output logic [31:0]  csr_rdata,
  output logic         csr_hit,       // the number belongs to this block
  output logic         csr_illegal,   // access refused (mode, enable or range)
  input  logic         menvcfg_stce,
  input  logic         henvcfg_stce,
  input  logic         mcounteren_tm,
  input  logic         hcounteren_tm,
  input  logic         scounteren_tm,
  mpu_csr_if.host_side pmp_csr,
  mpu_csr_if.host_side spmp_csr,
  mpu_csr_if.host_side vspmp_csr,
  output logic         sstc_we,
  output logic [2:0]   sstc_sel,
  output logic [31:0]  sstc_wdata,
  output logic [2:0]   sstc_rd_sel,
  output logic         sstc_rd_virt,
  input  logic [31:0]  sstc_rdata,
  output logic         trig_we,
  output logic [1:0]   trig_sel,
  output logic [31:0]  trig_wdata,
  input  logic [31:0]  trig_rdata
);
  typedef enum logic [2:0] {T_NONE, T_PMP, T_SPMP, T_VSPMP, T_SSTC, T_TRIG} tgt_e;

  tgt_e       tgt;
  logic [1:0] kind;    // 0 cfg, 1 addr, 2 switch, 3 mseccfg
  logic [3:0] idx;
  logic [2:0] tsel;
  logic       allowed;
  logic       is_m, is_hs, is_vs;

  assign is_m  = (mode.prv == PRV_M);
  assign is_hs = !mode.v && (mode.prv == PRV_S);
  assign is_vs = mode.v && (mode.prv == PRV_S);

  always_comb begin
    tgt     = T_NONE;
    kind    = 2'd0;
    idx     = csr_addr[3:0];
    tsel    = 3'd0;
    allowed = 1'b0;
    csr_hit = 1'b1;
    unique casez (csr_addr)
      12'h3A?: begin tgt = T_PMP;  kind = 2'd0; allowed = is_m && (32'(idx) < (PMP_ENTRIES + 3) / 4); end
      12'h3B?: begin tgt = T_PMP;  kind = 2'd1; allowed = is_m && (32'(idx) < PMP_ENTRIES); end
      12'h1A?: begin
        tgt = is_vs ? T_VSPMP : T_SPMP; kind = 2'd0;
        allowed = (is_m || is_hs || is_vs) &&
                  (32'(idx) < ((is_vs ? VSPMP_ENTRIES : SPMP_ENTRIES) + 3) / 4);
      end
      12'h1B?: begin
        tgt = is_vs ? T_VSPMP : T_SPMP; kind = 2'd1;
        allowed = (is_m || is_hs || is_vs) && (32'(idx) < (is_vs ? VSPMP_ENTRIES : SPMP_ENTRIES));
      end
      12'h747: begin tgt = T_PMP; kind = 2'd3; allowed = is_m; end
      12'h757: begin tgt = T_NONE; allowed = is_m; end
      12'h170, 12'h171: begin
        tgt = T_SPMP; kind = 2'd2; allowed = (is_m || is_hs) && (32'(idx) < (SPMP_ENTRIES + 31) / 32);
      end
      12'h2A?: begin tgt = T_VSPMP; kind = 2'd0; allowed = (is_m || is_hs) && (32'(idx) < (VSPMP_ENTRIES + 3) / 4); end
      12'h2B?: begin tgt = T_VSPMP; kind = 2'd1; allowed = (is_m || is_hs) && (32'(idx) < VSPMP_ENTRIES); end
      12'h14D, 12'h15D: begin
        tgt  = T_SSTC;
        tsel = {1'b0, is_vs, csr_addr[4]};
        allowed = is_m || (is_hs && menvcfg_stce) || (is_vs && menvcfg_stce && henvcfg_stce);
      end
      12'h24D, 12'h25D: begin
        tgt = T_SSTC; tsel = {2'b01, csr_addr[4]}; allowed = is_m || (is_hs && menvcfg_stce);
      end
      12'h7A0, 12'h7A1, 12'h7A2, 12'h7A4: begin
        tgt = T_TRIG; tsel = {1'b0, csr_addr[2] ? 2'd3 : csr_addr[1:0]}; allowed = is_m;
      end
      12'h7A3: begin tgt = T_NONE; allowed = is_m; end
      12'hC01, 12'hC81: begin
        tgt  = T_SSTC; tsel = {2'b11, csr_addr[7]};
        allowed = !csr_we &&
                  (is_m || (mcounteren_tm && (!mode.v || hcounteren_tm) &&
                            (mode.prv != PRV_U || scounteren_tm)));
      end
      12'h605, 12'h615: begin
        tgt = T_SSTC; tsel = {2'b10, csr_addr[4]}; allowed = is_m || is_hs;
      end
      default: csr_hit = 1'b0;
    endcase
  end

  assign csr_illegal = csr_valid && csr_hit && !allowed;

  logic do_wr;
  assign do_wr = csr_valid && csr_we && allowed;

  always_comb begin
    pmp_csr.cfg_we    = do_wr && tgt == T_PMP   && kind == 2'd0;
    pmp_csr.addr_we   = do_wr && tgt == T_PMP   && kind == 2'd1;
    pmp_csr.sw_we     = 1'b0;
    pmp_csr.sec_we    = do_wr && tgt == T_PMP   && kind == 2'd3;
    spmp_csr.sec_we   = 1'b0;
    vspmp_csr.sec_we  = 1'b0;
    spmp_csr.cfg_we   = do_wr && tgt == T_SPMP  && kind == 2'd0;
    spmp_csr.addr_we  = do_wr && tgt == T_SPMP  && kind == 2'd1;
    spmp_csr.sw_we    = do_wr && tgt == T_SPMP  && kind == 2'd2;
    vspmp_csr.cfg_we  = do_wr && tgt == T_VSPMP && kind == 2'd0;
    vspmp_csr.addr_we = do_wr && tgt == T_VSPMP && kind == 2'd1;
    vspmp_csr.sw_we   = 1'b0;
    pmp_csr.idx   = idx;  spmp_csr.idx   = idx;  vspmp_csr.idx   = idx;
    pmp_csr.wdata = csr_wdata; spmp_csr.wdata = csr_wdata; vspmp_csr.wdata = csr_wdata;
    pmp_csr.rd_sel = kind; spmp_csr.rd_sel = kind; vspmp_csr.rd_sel = kind;
    pmp_csr.rd_idx = idx;  spmp_csr.rd_idx = idx;  vspmp_csr.rd_idx = idx;
    sstc_we     = do_wr && tgt == T_SSTC;
    sstc_sel    = tsel;
    sstc_wdata  = csr_wdata;
    sstc_rd_sel = tsel;
    sstc_rd_virt = mode.v;
    trig_we     = do_wr && tgt == T_TRIG;
    trig_sel    = tsel[1:0];
    trig_wdata  = csr_wdata;
    if (!allowed) csr_rdata = '0;
    else begin
      unique case (tgt)
        T_PMP:   csr_rdata = pmp_csr.rdata;
        T_SPMP:  csr_rdata = spmp_csr.rdata;
        T_VSPMP: csr_rdata = vspmp_csr.rdata;
        T_SSTC:  csr_rdata = sstc_rdata;
        T_TRIG:  csr_rdata = trig_rdata;
        default: csr_rdata = '0;
      endcase
    end
  end
endmodule
