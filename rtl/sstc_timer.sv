// Supervisor timer (Sstc) with the hypervisor's virtual supervisor timer.
//
// stimecmp raises the supervisor timer interrupt STIP while time >= stimecmp.
// vstimecmp raises the guest's VSTIP while time + htimedelta >= vstimecmp,
// so a guest sees its own shifted time base without a trap to the
// hypervisor. Each timer works only while the matching envcfg STCE enable is
// set (menvcfg for STIP, menvcfg and henvcfg for VSTIP).
//
// The read port also serves the Zicntr time counter (rd_sel 6/7): with
// rd_virt set, as for a read from V-mode, it returns the guest's shifted
// time + htimedelta, the same value its vstimecmp is compared with.
//
// Registers are written by the CSR file one 32-bit half per cycle
// (we/sel/wdata) and read back combinationally through rd_sel. Compare
// registers reset to all ones, htimedelta to zero. The design names the
// Sstc and Zicntr extensions; the register set is the RISC-V Sstc,
// hypervisor and Zicntr one, the reset values are this design's choice.
module sstc_timer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] time_i,
  input  logic        menvcfg_stce,
  input  logic        henvcfg_stce,
  input  logic        we,
  input  logic [2:0]  sel,      // 0/1 stimecmp lo/hi, 2/3 vstimecmp lo/hi, 4/5 htimedelta lo/hi
  input  logic [31:0] wdata,
  input  logic [2:0]  rd_sel,   // as sel, plus 6/7 time lo/hi
  input  logic        rd_virt,  // time reads return time + htimedelta
  output logic [31:0] rdata,
  output logic        stip,
  output logic        vstip
);
  logic [63:0] stimecmp_q, vstimecmp_q, htimedelta_q;
  logic [63:0] vtime;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stimecmp_q   <= '1;
      vstimecmp_q  <= '1;
      htimedelta_q <= '0;
    end else if (we) begin
      unique case (sel)
        3'd0: stimecmp_q[31:0]    <= wdata;
        3'd1: stimecmp_q[63:32]   <= wdata;
        3'd2: vstimecmp_q[31:0]   <= wdata;
        3'd3: vstimecmp_q[63:32]  <= wdata;
        3'd4: htimedelta_q[31:0]  <= wdata;
        3'd5: htimedelta_q[63:32] <= wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (rd_sel)
      3'd0: rdata = stimecmp_q[31:0];
      3'd1: rdata = stimecmp_q[63:32];
      3'd2: rdata = vstimecmp_q[31:0];
      3'd3: rdata = vstimecmp_q[63:32];
      3'd4: rdata = htimedelta_q[31:0];
      3'd5: rdata = htimedelta_q[63:32];
      3'd6: rdata = rd_virt ? vtime[31:0]  : time_i[31:0];
      default: rdata = rd_virt ? vtime[63:32] : time_i[63:32];
    endcase
  end

  assign vtime = time_i + htimedelta_q;
  assign stip  = menvcfg_stce && (time_i >= stimecmp_q);
  assign vstip = menvcfg_stce && henvcfg_stce && (vtime >= vstimecmp_q);
endmodule
