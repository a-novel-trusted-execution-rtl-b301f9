// Advanced Platform-Level Interrupt Controller of the BA51-H: a machine-level
// root domain and one supervisor-level child domain for the single hart.
//
// All N_SRC (8) wired interrupt sources enter the root domain. Sources the
// M-mode firmware delegates (sourcecfg.D) are owned by the supervisor
// domain, which the hypervisor then programs itself, so external interrupts
// reach HS-mode without passing through M-mode. The root domain drives MEIP,
// the child SEIP.
//
// One register bus, address bit 15 selecting the domain (0 machine,
// 1 supervisor); see aplic_domain for the registers and timing. The
// two-domain arrangement and the domain decode are this design's choices.
module aplic #(
  parameter int unsigned N_SRC = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sel,
  input  logic           we,
  input  logic [15:0]    addr,
  input  logic [31:0]    wdata,
  output logic [31:0]    rdata,
  input  logic [N_SRC:1] irq_src,
  output logic           meip,
  output logic           seip
);
  logic [31:0]    rdata_m, rdata_s;
  logic [N_SRC:1] deleg_m, deleg_s_unused;

  aplic_domain #(.N_SRC(N_SRC), .IS_ROOT(1'b1)) u_mdomain (
    .clk, .rst_n, .sel(sel && !addr[15]), .we, .addr(addr[14:0]), .wdata, .rdata(rdata_m),
    .src_i(irq_src), .src_avail('1), .deleg_o(deleg_m), .eip(meip)
  );

  aplic_domain #(.N_SRC(N_SRC), .IS_ROOT(1'b0)) u_sdomain (
    .clk, .rst_n, .sel(sel && addr[15]), .we, .addr(addr[14:0]), .wdata, .rdata(rdata_s),
    .src_i(irq_src), .src_avail(deleg_m), .deleg_o(deleg_s_unused), .eip(seip)
  );

  assign rdata = addr[15] ? rdata_s : rdata_m;
endmodule
