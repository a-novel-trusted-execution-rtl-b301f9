// Shared types and constants of the BA51-H virtualization and TEE hardware.
//
// The privilege state of the hart is the pair {V, PRV}: V is the RISC-V
// hypervisor extension's virtualization bit and PRV the nominal privilege
// (M=3, S=1, U=0). That gives the five modes the design distinguishes:
// M, HS (V=0,S), HU (V=0,U), VS (V=1,S) and VU (V=1,U).
//
// Protection-entry configuration bytes follow the RISC-V PMP layout
// (R bit 0, W bit 1, X bit 2, A bits 4:3). Bit 7 is the lock bit L in the PMP
// and the S (supervisor) mode bit in the SPMP; the placement of the S bit is
// this design's choice. Address registers hold physical address bits 33:2.
package ba51h_pkg;

  localparam int unsigned XLEN = 32;

  typedef enum logic [1:0] {
    PRV_U = 2'b00,
    PRV_S = 2'b01,
    PRV_M = 2'b11
  } prv_e;

  typedef struct packed {
    logic v;     // virtualization mode (VS/VU)
    prv_e prv;   // nominal privilege
  } mode_t;

  typedef enum logic [1:0] {
    ACC_R = 2'd0,   // load
    ACC_W = 2'd1,   // store / AMO
    ACC_X = 2'd2    // instruction fetch
  } acc_e;

  // Address matching mode of an entry (PMP encoding)
  typedef enum logic [1:0] {
    A_OFF   = 2'd0,
    A_TOR   = 2'd1,
    A_NA4   = 2'd2,
    A_NAPOT = 2'd3
  } amode_e;

  typedef struct packed {
    logic   l_s;   // PMP: lock bit L. SPMP: mode bit S (1 = supervisor rule)
    logic [1:0] rsvd;
    amode_e a;
    logic   x;
    logic   w;
    logic   r;
  } entry_cfg_t;

  // Exception cause codes (RISC-V privileged specification)
  localparam logic [4:0] CAUSE_INSTR_ACCESS = 5'd1;
  localparam logic [4:0] CAUSE_BREAKPOINT   = 5'd3;
  localparam logic [4:0] CAUSE_LOAD_ACCESS  = 5'd5;
  localparam logic [4:0] CAUSE_STORE_ACCESS = 5'd7;

  // Interrupt numbers in mip/mie
  localparam int unsigned IRQ_SSI  = 1;
  localparam int unsigned IRQ_VSSI = 2;
  localparam int unsigned IRQ_MSI  = 3;
  localparam int unsigned IRQ_STI  = 5;
  localparam int unsigned IRQ_VSTI = 6;
  localparam int unsigned IRQ_MTI  = 7;
  localparam int unsigned IRQ_SEI  = 9;
  localparam int unsigned IRQ_VSEI = 10;
  localparam int unsigned IRQ_MEI  = 11;

  // Which protection stage refused an access
  typedef enum logic [1:0] {
    FS_NONE  = 2'd0,
    FS_VSPMP = 2'd1,   // first stage, guest controlled
    FS_SPMP  = 2'd2,   // second stage, hypervisor controlled
    FS_PMP   = 2'd3    // machine-mode PMP
  } fault_stage_e;

  // Trap target level
  typedef enum logic [1:0] {
    TGT_M  = 2'd0,
    TGT_HS = 2'd1,
    TGT_VS = 2'd2
  } trap_tgt_e;

  function automatic acc_e cause_to_acc(logic [4:0] c);
    return (c == CAUSE_INSTR_ACCESS) ? ACC_X : (c == CAUSE_LOAD_ACCESS) ? ACC_R : ACC_W;
  endfunction

  // One-hot {R, W, X} mask of an access type
  function automatic logic [2:0] acc_mask(acc_e a);
    case (a)
      ACC_R:   return 3'b100;
      ACC_W:   return 3'b010;
      default: return 3'b001;
    endcase
  endfunction

  // Permissions {upper rwx, lower rwx} of a rule whose bit 7 says which of two
  // privilege levels it serves: the ePMP under MML (L: M-mode / S+U-mode) and
  // the SPMP (S: supervisor / user). Bit 7 set gives an upper-only rule, clear
  // a lower-only rule; W without R and bit 7 with RWX encode shared regions.
  function automatic logic [5:0] split_perms(entry_cfg_t c);
    unique case ({c.l_s, c.r, c.w, c.x})
      4'b0000: return {3'b000, 3'b000};
      4'b0001: return {3'b000, 3'b001};
      4'b0010: return {3'b110, 3'b100};   // shared data, lower read-only
      4'b0011: return {3'b110, 3'b110};   // shared data
      4'b0100: return {3'b000, 3'b100};
      4'b0101: return {3'b000, 3'b101};
      4'b0110: return {3'b000, 3'b110};
      4'b0111: return {3'b000, 3'b111};
      4'b1000: return {3'b000, 3'b000};
      4'b1001: return {3'b001, 3'b000};
      4'b1010: return {3'b001, 3'b001};   // shared code
      4'b1011: return {3'b101, 3'b001};   // shared code, upper may also read
      4'b1100: return {3'b100, 3'b000};
      4'b1101: return {3'b101, 3'b000};
      4'b1110: return {3'b110, 3'b000};
      default: return {3'b100, 3'b100};   // shared read-only
    endcase
  endfunction

  function automatic logic [4:0] acc_cause(acc_e a);
    case (a)
      ACC_X:   return CAUSE_INSTR_ACCESS;
      ACC_R:   return CAUSE_LOAD_ACCESS;
      default: return CAUSE_STORE_ACCESS;
    endcase
  endfunction

endpackage
