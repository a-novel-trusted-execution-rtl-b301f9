// Debug triggers: N_TRIG address-match triggers (RISC-V Sdtrig, type 6
// "mcontrol6") watching the instruction-fetch and data ports.
//
// Each trigger compares the address of every access on every port with its
// tdata2 value: equal (match 0), greater or equal (match 2) or less than
// (match 3). It fires when the comparison holds, the access type is enabled
// (execute, load, store) and the current mode is enabled (m, s, u for M,
// HS, HU; vs, vu for VS, VU). A firing trigger raises a breakpoint exception
// in place of the access, and sets its hit0 bit. Triggers reset disabled.
//
// Registers are reached one at a time, as in the debug specification:
// tselect (csr_sel 0) picks the trigger that tdata1 (1) and tdata2 (2) show;
// tinfo (3) reads the supported type mask. tdata1 reads as
//   [31:28] type = 6  [24] vs  [23] vu  [22] hit0  [10:7] match  [6] m
//   [4] s  [3] u  [2] execute  [1] store  [0] load
// with every other field zero: no debug mode, no chaining, no data or size
// matching, action 0 (breakpoint exception) only. A write of an unsupported
// match value stores 0 (equal). Writes land at the clock edge; reads and
// port checks are combinational.
//
// The trigger count (8) follows the design; the type and register layout
// are the RISC-V debug specification's, and the supported subset is this
// design's choice.
module trigger_unit
  import ba51h_pkg::*;
#(
  parameter int unsigned N_TRIG  = 8,
  parameter int unsigned N_PORTS = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        csr_we,
  input  logic [1:0]  csr_sel,    // 0 tselect, 1 tdata1, 2 tdata2, 3 tinfo
  input  logic [31:0] csr_wdata,
  output logic [31:0] csr_rdata,
  input  logic        req   [N_PORTS],
  input  mode_t       mode  [N_PORTS],
  input  acc_e        acc   [N_PORTS],
  input  logic [31:0] addr  [N_PORTS],
  output logic        hit   [N_PORTS]
);
  localparam int unsigned SW = (N_TRIG > 1) ? $clog2(N_TRIG) : 1;

  typedef struct packed {
    logic       vs, vu, hit0;
    logic [3:0] match;
    logic       m, s, u, execute, store, load;
  } trig_t;

  trig_t       trig_q  [N_TRIG];
  logic [31:0] tdata2_q[N_TRIG];
  logic [SW-1:0] tsel_q;
  logic [N_TRIG-1:0] fire;
  logic [N_TRIG-1:0] fire_p [N_PORTS];

  function automatic logic [31:0] tdata1_of(trig_t t);
    return {4'd6, 3'b000, t.vs, t.vu, t.hit0, 1'b0, 2'b00, 3'b000, 4'd0, 1'b0,
            t.match, t.m, 1'b0, t.s, t.u, t.execute, t.store, t.load};
  endfunction

  function automatic trig_t trig_of(logic [31:0] d);
    trig_t t;
    t.vs      = d[24];
    t.vu      = d[23];
    t.hit0    = d[22];
    t.match   = (d[10:7] inside {4'd0, 4'd2, 4'd3}) ? d[10:7] : 4'd0;
    t.m       = d[6];
    t.s       = d[4];
    t.u       = d[3];
    t.execute = d[2];
    t.store   = d[1];
    t.load    = d[0];
    return t;
  endfunction

  // ---- per-port address comparison ----
  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    for (genvar i = 0; i < N_TRIG; i++) begin : g_trig
      logic mode_en, acc_en, addr_hit;
      always_comb begin
        unique case ({mode[p].v, mode[p].prv})
          {1'b0, PRV_M}: mode_en = trig_q[i].m;
          {1'b0, PRV_S}: mode_en = trig_q[i].s;
          {1'b0, PRV_U}: mode_en = trig_q[i].u;
          {1'b1, PRV_S}: mode_en = trig_q[i].vs;
          {1'b1, PRV_U}: mode_en = trig_q[i].vu;
          default:       mode_en = 1'b0;
        endcase
        unique case (acc[p])
          ACC_X:   acc_en = trig_q[i].execute;
          ACC_R:   acc_en = trig_q[i].load;
          default: acc_en = trig_q[i].store;
        endcase
        unique case (trig_q[i].match)
          4'd2:    addr_hit = (addr[p] >= tdata2_q[i]);
          4'd3:    addr_hit = (addr[p] <  tdata2_q[i]);
          default: addr_hit = (addr[p] == tdata2_q[i]);
        endcase
      end
      assign fire_p[p][i] = req[p] && mode_en && acc_en && addr_hit;
    end
    assign hit[p] = |fire_p[p];
  end

  always_comb begin
    fire = '0;
    for (int p = 0; p < N_PORTS; p++) fire |= fire_p[p];
  end

  // ---- registers ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tsel_q <= '0;
      for (int i = 0; i < N_TRIG; i++) begin
        trig_q[i]   <= '0;
        tdata2_q[i] <= '0;
      end
    end else begin
      for (int i = 0; i < N_TRIG; i++)
        if (fire[i]) trig_q[i].hit0 <= 1'b1;
      if (csr_we) begin
        unique case (csr_sel)
          2'd0: if (csr_wdata < 32'(N_TRIG)) tsel_q <= SW'(csr_wdata);
          2'd1: trig_q[tsel_q]   <= trig_of(csr_wdata);
          2'd2: tdata2_q[tsel_q] <= csr_wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (csr_sel)
      2'd0:    csr_rdata = 32'(tsel_q);
      2'd1:    csr_rdata = tdata1_of(trig_q[tsel_q]);
      2'd2:    csr_rdata = tdata2_q[tsel_q];
      default: csr_rdata = 32'h0000_0040;   // tinfo: type 6 only
    endcase
  end
endmodule
