// Address match of one protection entry, shared by PMP, SPMP and vSPMP.
//
// Combinational. pa is the 32-bit physical address of the access; addr_q and
// addr_prev are the entry's and the previous entry's address registers
// (physical bits 33:2). Matching follows the RISC-V PMP address modes: TOR
// (addr_prev <= pa < addr_q), NA4 (one word) and NAPOT (naturally aligned
// power-of-two region encoded by trailing ones). An access is checked at its
// word address; accesses are assumed not to cross a region boundary.
module region_match
  import ba51h_pkg::*;
(
  input  logic [31:0] pa,
  input  amode_e      a,
  input  logic [31:0] addr_q,
  input  logic [31:0] addr_prev,
  output logic        match
);
  logic [31:0] wa;          // word address, physical bits 33:2
  logic [31:0] napot_mask;  // 1 for bits that select within the region
  assign wa         = {2'b00, pa[31:2]};
  assign napot_mask = addr_q ^ (addr_q + 32'd1);

  always_comb begin
    unique case (a)
      A_TOR:   match = (wa >= addr_prev) && (wa < addr_q);
      A_NA4:   match = (wa == addr_q);
      A_NAPOT: match = ((wa ^ addr_q) & ~napot_mask) == 32'd0;
      default: match = 1'b0;
    endcase
  end
endmodule
