// Register-write bundle of one protection table (PMP, SPMP or vSPMP).
//
// The CSR file drives one write per cycle: cfg_we writes configuration word
// idx (four 8-bit entry configurations per 32-bit word, RV32 packing),
// addr_we writes address register idx (physical address bits 33:2), and
// sw_we writes switch word idx (one enable bit per entry, SPMP only), and
// sec_we writes the machine security configuration (mseccfg, PMP only).
// The table answers combinationally with the current value of the word
// selected by rd_sel/rd_idx. Writes take effect at the next clock edge.
interface mpu_csr_if;
  logic        cfg_we;
  logic        addr_we;
  logic        sw_we;
  logic        sec_we;
  logic [3:0]  idx;
  logic [31:0] wdata;
  logic [1:0]  rd_sel;   // 0: cfg word, 1: addr register, 2: switch word, 3: mseccfg
  logic [3:0]  rd_idx;
  logic [31:0] rdata;

  modport table_side (input cfg_we, addr_we, sw_we, sec_we, idx, wdata, rd_sel, rd_idx, output rdata);
  modport host_side  (output cfg_we, addr_we, sw_we, sec_we, idx, wdata, rd_sel, rd_idx, input rdata);
endinterface
