// Machine-mode Physical Memory Protection (PMP) of the BA51-H.
//
// Holds N_ENTRIES entries (16 in the feature-rich configuration), each an
// 8-bit configuration (R, W, X, address mode A, lock L) and an address
// register. Every access port is checked combinationally in the same cycle:
// the lowest-numbered entry whose region contains the address decides. For
// S- and U-mode accesses (virtualized or not) the matching entry's R/W/X bit
// grants the access and no match denies it. M-mode accesses are allowed
// unless the matching entry is locked and lacks the permission. A locked
// entry ignores writes to its configuration and address, and also protects
// the address register below it when it is a TOR entry. All entries reset
// to OFF.
//
// With SMEPMP set, the firmware's enhanced PMP rules are available through
// mseccfg (reset 0, which leaves the plain PMP behaviour):
//   MML  (bit 0, sticky)  L now marks M-mode-only rules, L=0 rules serve S/U
//                         only, the otherwise reserved R=0/W=1 and L=1/RWX
//                         combinations become shared regions, M-mode may not
//                         execute from unmatched memory, and no new locked
//                         executable rule can be added;
//   MMWP (bit 1, sticky)  M-mode accesses that match no rule are refused;
//   RLB  (bit 2)          locked rules may be edited; it can only be set
//                         while no rule is locked.
//
// Registers are written through the mpu_csr_if bundle: cfg words pack four
// entry configurations (RV32 pmpcfg layout), addr registers hold bits 33:2.
// The entry count, the role of the PMP as the M-mode firmware's protection
// and its enhanced (ePMP) form come from the design; the rules are those of
// the RISC-V PMP and Smepmp specifications, and the reset state is the
// standard one.
module pmp
  import ba51h_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 16,
  parameter int unsigned N_PORTS   = 2,
  parameter bit          SMEPMP    = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  mpu_csr_if.table_side csr,
  input  mode_t       mode  [N_PORTS],
  input  acc_e        acc   [N_PORTS],
  input  logic [31:0] pa    [N_PORTS],
  output logic        allow [N_PORTS]
);
  localparam int unsigned N_CFGW = (N_ENTRIES + 3) / 4;

  entry_cfg_t  cfg_q  [N_ENTRIES];
  logic [31:0] addr_q [N_ENTRIES];
  logic        mml_q, mmwp_q, rlb_q;
  logic        any_locked;

  always_comb begin
    any_locked = 1'b0;
    for (int i = 0; i < N_ENTRIES; i++) any_locked |= cfg_q[i].l_s;
  end

  // Under MML without RLB, new locked executable rules are refused
  function automatic logic locked_exec(logic [7:0] b);
    return b[7] && ({b[0], b[1], b[2]} inside {3'b001, 3'b010, 3'b011, 3'b101});   // {R,W,X}
  endfunction

  function automatic logic addr_locked(int unsigned i, entry_cfg_t c [N_ENTRIES]);
    logic lk;
    lk = c[i].l_s;
    if (i + 1 < N_ENTRIES) lk = lk | (c[i+1].l_s && c[i+1].a == A_TOR);
    return lk;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ENTRIES; i++) begin
        cfg_q[i]  <= '0;
        addr_q[i] <= '0;
      end
      mml_q  <= 1'b0;
      mmwp_q <= 1'b0;
      rlb_q  <= 1'b0;
    end else begin
      if (csr.cfg_we && 32'(csr.idx) < N_CFGW) begin
        for (int b = 0; b < 4; b++) begin
          if (csr.idx * 4 + b < N_ENTRIES && (!cfg_q[csr.idx*4+b].l_s || rlb_q) &&
              !(mml_q && !rlb_q && locked_exec(csr.wdata[b*8 +: 8])))
            cfg_q[csr.idx*4+b] <= entry_cfg_t'(csr.wdata[b*8 +: 8] & 8'h9F);
        end
      end
      if (csr.addr_we && 32'(csr.idx) < N_ENTRIES && (!addr_locked(32'(csr.idx), cfg_q) || rlb_q))
        addr_q[csr.idx] <= csr.wdata;
      if (SMEPMP && csr.sec_we) begin
        mml_q  <= mml_q  | csr.wdata[0];
        mmwp_q <= mmwp_q | csr.wdata[1];
        if (rlb_q || !any_locked) rlb_q <= csr.wdata[2];
      end
    end
  end

  always_comb begin
    csr.rdata = '0;
    unique case (csr.rd_sel)
      2'd0: for (int b = 0; b < 4; b++)
              if (csr.rd_idx * 4 + b < N_ENTRIES) csr.rdata[b*8 +: 8] = cfg_q[csr.rd_idx*4+b];
      2'd1: if (32'(csr.rd_idx) < N_ENTRIES) csr.rdata = addr_q[csr.rd_idx];
      default: csr.rdata = {29'd0, rlb_q, mmwp_q, mml_q};
    endcase
  end

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    logic [N_ENTRIES-1:0] hit;
    for (genvar i = 0; i < N_ENTRIES; i++) begin : g_ent
      region_match u_match (
        .pa       (pa[p]),
        .a        (cfg_q[i].a),
        .addr_q   (addr_q[i]),
        .addr_prev((i == 0) ? 32'd0 : addr_q[(i == 0) ? 0 : i-1]),
        .match    (hit[i])
      );
    end

    always_comb begin
      logic       found;
      entry_cfg_t c;
      logic       perm;
      logic [5:0] mp;
      logic [2:0] want;
      found = 1'b0;
      c     = '0;
      for (int i = N_ENTRIES - 1; i >= 0; i--) begin
        if (hit[i]) begin
          found = 1'b1;
          c     = cfg_q[i];
        end
      end
      unique case (acc[p])
        ACC_R:   perm = c.r;
        ACC_W:   perm = c.w;
        default: perm = c.x;
      endcase
      want = acc_mask(acc[p]);
      mp   = split_perms(c);
      if (mml_q) begin
        if (!found)                    allow[p] = (mode[p].prv == PRV_M) && !mmwp_q && acc[p] != ACC_X;
        else if (mode[p].prv == PRV_M) allow[p] = |(mp[5:3] & want);
        else                           allow[p] = |(mp[2:0] & want);
      end else if (mode[p].prv == PRV_M) begin
        allow[p] = found ? (!c.l_s || perm) : !mmwp_q;
      end else begin
        allow[p] = found && perm;
      end
    end
  end

  // Register writes must address an existing word
  a_addr_idx: assert property (@(posedge clk) disable iff (!rst_n) !(csr.addr_we && 32'(csr.idx) >= N_ENTRIES))
    else $error("pmp: address register write out of range");
endmodule
