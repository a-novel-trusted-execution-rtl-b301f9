// S-mode Physical Memory Protection table (SPMP), used twice in the BA51-H:
// as the hypervisor-controlled unified SPMP (VIRTUAL = 0, the second stage)
// and as the guest-controlled vSPMP (VIRTUAL = 1, the first stage).
//
// Each of the N_ENTRIES entries has an 8-bit configuration (R, W, X, address
// mode A, and the mode bit S in bit 7) and an address register (bits 33:2).
// An entry takes part in matching only if its A field is not OFF and, when
// HAS_SWITCH is set, its bit in the switch register is 1. The switch is the
// context-switch aid: software retires one task's entries and activates
// another's with a single register write. The vSPMP has no switch.
//
// Every access port is checked combinationally. The access is first mapped
// to an effective supervisor or user access:
//   unified SPMP:  HS -> supervisor; HU, VS, VU -> user; M is not checked.
//   vSPMP:         VS -> supervisor; VU -> user; no check when V = 0.
// The lowest-numbered active matching entry decides: an S=1 entry grants its
// R/W/X to supervisor accesses and denies user accesses; an S=0 entry grants
// its R/W/X to user accesses and denies supervisor ones. Four combinations
// that such a rule cannot use instead encode regions shared by both levels
// (S R W X: 0010 supervisor RW / user R, 0011 RW / RW, 1010 X / X,
// 1011 RX / X, 1111 R / R; see split_perms in the package). With no match,
// supervisor accesses pass and user accesses are refused.
//
// The mode bit, the switch, the existence of a limited set of shared
// permission combinations and the mapping of VS/VU to user accesses in the
// unified SPMP follow the design. The bit position of S, the shared-region
// encodings (those of the RISC-V SPMP/ePMP tables), the absence of a
// SUM-style override, the switch resetting to all zeros and the vSPMP
// mapping are this design's choices.
module spmp
  import ba51h_pkg::*;
#(
  parameter int unsigned N_ENTRIES  = 16,
  parameter int unsigned N_PORTS    = 2,
  parameter bit          VIRTUAL    = 1'b0,
  parameter bit          HAS_SWITCH = 1'b1
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
  localparam int unsigned N_SWW  = (N_ENTRIES + 31) / 32;

  entry_cfg_t           cfg_q  [N_ENTRIES];
  logic [31:0]          addr_q [N_ENTRIES];
  logic [N_ENTRIES-1:0] sw_q;
  logic [N_ENTRIES-1:0] active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ENTRIES; i++) begin
        cfg_q[i]  <= '0;
        addr_q[i] <= '0;
      end
      sw_q <= '0;
    end else begin
      if (csr.cfg_we && 32'(csr.idx) < N_CFGW) begin
        for (int b = 0; b < 4; b++)
          if (csr.idx * 4 + b < N_ENTRIES)
            cfg_q[csr.idx*4+b] <= entry_cfg_t'(csr.wdata[b*8 +: 8] & 8'h9F);
      end
      if (csr.addr_we && 32'(csr.idx) < N_ENTRIES) addr_q[csr.idx] <= csr.wdata;
      if (HAS_SWITCH && csr.sw_we && 32'(csr.idx) < N_SWW) begin
        for (int b = 0; b < 32; b++)
          if (csr.idx * 32 + b < N_ENTRIES) sw_q[csr.idx*32+b] <= csr.wdata[b];
      end
    end
  end

  always_comb begin
    csr.rdata = '0;
    unique case (csr.rd_sel)
      2'd0: for (int b = 0; b < 4; b++)
              if (csr.rd_idx * 4 + b < N_ENTRIES) csr.rdata[b*8 +: 8] = cfg_q[csr.rd_idx*4+b];
      2'd1: if (32'(csr.rd_idx) < N_ENTRIES) csr.rdata = addr_q[csr.rd_idx];
      2'd2: if (HAS_SWITCH)
              for (int b = 0; b < 32; b++)
                if (csr.rd_idx * 32 + b < N_ENTRIES) csr.rdata[b] = sw_q[csr.rd_idx*32+b];
      default: csr.rdata = '0;
    endcase
  end

  for (genvar i = 0; i < N_ENTRIES; i++) begin : g_active
    assign active[i] = (cfg_q[i].a != A_OFF) && (!HAS_SWITCH || sw_q[i]);
  end

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    logic [N_ENTRIES-1:0] hit;
    logic                 checked, eff_s;

    for (genvar i = 0; i < N_ENTRIES; i++) begin : g_ent
      logic m;
      region_match u_match (
        .pa       (pa[p]),
        .a        (cfg_q[i].a),
        .addr_q   (addr_q[i]),
        .addr_prev((i == 0) ? 32'd0 : addr_q[(i == 0) ? 0 : i-1]),
        .match    (m)
      );
      assign hit[i] = m && active[i];
    end

    always_comb begin
      if (VIRTUAL) begin
        checked = mode[p].v;
        eff_s   = (mode[p].prv == PRV_S);
      end else begin
        checked = (mode[p].prv != PRV_M);
        eff_s   = !mode[p].v && (mode[p].prv == PRV_S);
      end
    end

    always_comb begin
      logic       found;
      entry_cfg_t c;
      logic [5:0] sp;
      found = 1'b0;
      c     = '0;
      for (int i = N_ENTRIES - 1; i >= 0; i--) begin
        if (hit[i]) begin
          found = 1'b1;
          c     = cfg_q[i];
        end
      end
      sp = split_perms(c);
      if (!checked)    allow[p] = 1'b1;
      else if (!found) allow[p] = eff_s;
      else if (eff_s)  allow[p] = |(sp[5:3] & acc_mask(acc[p]));
      else             allow[p] = |(sp[2:0] & acc_mask(acc[p]));
    end
  end
endmodule
