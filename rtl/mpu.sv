// Memory Protection Unit of the BA51-H: PMP plus unified dual-stage SPMP.
//
// Sits between the pipeline and the instruction and data buses. Each of the
// N_PORTS access ports (port 0 fetch, port 1 data by convention) is checked
// in the same cycle by three tables:
//   stage 1, vSPMP   - programmed by the guest in VS-mode, checks V=1 accesses
//   stage 2, SPMP    - programmed by the hypervisor in HS-mode; VS and VU
//                      accesses are checked as user accesses (unified model)
//   PMP              - programmed by M-mode firmware, checks every mode
// An access is allowed only if all three allow it. On a refusal the unit
// reports the access-fault cause (1 fetch, 5 load, 7 store) and the stage
// that refused, the first stage taking precedence, so the hypervisor can
// forward guest-caused faults to the guest.
//
// Table sizes: PMP and SPMP 16 entries each, as in the design's feature-rich
// configuration; the vSPMP size is not given and is set to 16 here. The
// fault-stage report and its precedence are this design's choice.
module mpu
  import ba51h_pkg::*;
#(
  parameter int unsigned PMP_ENTRIES   = 16,
  parameter int unsigned SPMP_ENTRIES  = 16,
  parameter int unsigned VSPMP_ENTRIES = 16,
  parameter int unsigned N_PORTS       = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  mpu_csr_if.table_side pmp_csr,
  mpu_csr_if.table_side spmp_csr,
  mpu_csr_if.table_side vspmp_csr,
  input  mode_t        mode  [N_PORTS],
  input  acc_e         acc   [N_PORTS],
  input  logic [31:0]  pa    [N_PORTS],
  output logic         allow [N_PORTS],
  output fault_stage_e fstage[N_PORTS],
  output logic [4:0]   cause [N_PORTS]
);
  logic ok_pmp [N_PORTS];
  logic ok_s2  [N_PORTS];
  logic ok_s1  [N_PORTS];

  pmp #(.N_ENTRIES(PMP_ENTRIES), .N_PORTS(N_PORTS)) u_pmp (
    .clk, .rst_n, .csr(pmp_csr), .mode, .acc, .pa, .allow(ok_pmp)
  );

  spmp #(.N_ENTRIES(SPMP_ENTRIES), .N_PORTS(N_PORTS), .VIRTUAL(1'b0), .HAS_SWITCH(1'b1)) u_spmp (
    .clk, .rst_n, .csr(spmp_csr), .mode, .acc, .pa, .allow(ok_s2)
  );

  spmp #(.N_ENTRIES(VSPMP_ENTRIES), .N_PORTS(N_PORTS), .VIRTUAL(1'b1), .HAS_SWITCH(1'b0)) u_vspmp (
    .clk, .rst_n, .csr(vspmp_csr), .mode, .acc, .pa, .allow(ok_s1)
  );

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    always_comb begin
      allow[p] = ok_s1[p] && ok_s2[p] && ok_pmp[p];
      cause[p] = acc_cause(acc[p]);
      if      (!ok_s1[p])  fstage[p] = FS_VSPMP;
      else if (!ok_s2[p])  fstage[p] = FS_SPMP;
      else if (!ok_pmp[p]) fstage[p] = FS_PMP;
      else                 fstage[p] = FS_NONE;
    end
  end
endmodule
