// Self-checking testbench of the CSR decode: privilege checks per mode, the
// redirection of VS-mode SPMP and stimecmp accesses to the guest copies, the
// STCE enables, the M-only mseccfg and trigger registers, the time counter
// and its enables, read-data routing, and numbers that do not belong here.
module tb_tee_csr_file;
  import ba51h_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  mode_t       mode;
  logic        csr_valid, csr_we, csr_hit, csr_illegal, menvcfg_stce, henvcfg_stce, sstc_we;
  logic        mcounteren_tm, hcounteren_tm, scounteren_tm, sstc_rd_virt, trig_we;
  logic [1:0]  trig_sel;
  logic [31:0] trig_wdata, trig_rdata;
  logic [11:0] csr_addr;
  logic [31:0] csr_wdata, csr_rdata, sstc_wdata, sstc_rdata;
  logic [2:0]  sstc_sel, sstc_rd_sel;
  mpu_csr_if pcsr ();
  mpu_csr_if scsr ();
  mpu_csr_if vcsr ();

  tee_csr_file dut (.mode, .csr_valid, .csr_we, .csr_addr, .csr_wdata, .csr_rdata, .csr_hit,
                    .csr_illegal, .menvcfg_stce, .henvcfg_stce, .mcounteren_tm, .hcounteren_tm,
                    .scounteren_tm, .pmp_csr(pcsr), .spmp_csr(scsr), .vspmp_csr(vcsr), .sstc_we,
                    .sstc_sel, .sstc_wdata, .sstc_rd_sel, .sstc_rd_virt, .sstc_rdata,
                    .trig_we, .trig_sel, .trig_wdata, .trig_rdata);

  localparam mode_t M  = '{v:1'b0, prv:PRV_M};
  localparam mode_t HS = '{v:1'b0, prv:PRV_S};
  localparam mode_t HU = '{v:1'b0, prv:PRV_U};
  localparam mode_t VS = '{v:1'b1, prv:PRV_S};
  localparam mode_t VU = '{v:1'b1, prv:PRV_U};

  // Table read data: a tag per table plus the selected word
  assign pcsr.rdata = {8'hA0, 6'd0, pcsr.rd_sel, 12'd0, pcsr.rd_idx};
  assign scsr.rdata = {8'hB0, 6'd0, scsr.rd_sel, 12'd0, scsr.rd_idx};
  assign vcsr.rdata = {8'hC0, 6'd0, vcsr.rd_sel, 12'd0, vcsr.rd_idx};
  assign sstc_rdata = {8'hD0, 20'd0, sstc_rd_virt, sstc_rd_sel};
  assign trig_rdata = {8'hE0, 22'd0, trig_sel};

  // What a write must strobe: 0 none, 1 pmp, 2 spmp, 3 vspmp, 4 sstc, 5 triggers
  task automatic t_wr(string what, mode_t m, logic [11:0] a, logic exp_ill, int exp_tgt,
                      int exp_kind, int exp_idx);
    logic [4:0] got;
    mode = m; csr_valid = 1; csr_we = 1; csr_addr = a; csr_wdata = 32'h1234_5678; #1;
    got = {trig_we, sstc_we, vcsr.cfg_we | vcsr.addr_we | vcsr.sw_we | vcsr.sec_we,
           scsr.cfg_we | scsr.addr_we | scsr.sw_we | scsr.sec_we,
           pcsr.cfg_we | pcsr.addr_we | pcsr.sw_we | pcsr.sec_we};
    checks++;
    if (csr_illegal !== exp_ill) begin
      failures++; $display("FAIL %s: illegal=%0b", what, csr_illegal);
    end
    checks++;
    if (got !== ((exp_tgt == 0) ? 5'b0 : 5'(1 << (exp_tgt - 1)))) begin
      failures++; $display("FAIL %s: strobes=%b", what, got);
    end
    if (exp_tgt inside {[1:3]}) begin
      mpu_kind_check(what, exp_tgt, exp_kind, exp_idx);
    end else if (exp_tgt == 4) begin
      checks++;
      if (sstc_sel !== 3'(exp_kind)) begin failures++; $display("FAIL %s: sstc sel=%0d", what, sstc_sel); end
    end else if (exp_tgt == 5) begin
      checks++;
      if (trig_sel !== 2'(exp_kind) || trig_wdata !== csr_wdata) begin
        failures++; $display("FAIL %s: trig sel=%0d", what, trig_sel);
      end
    end
    csr_valid = 0; csr_we = 0; #1;
  endtask

  task automatic mpu_kind_check(string what, int tgt, int kind, int idx);
    logic [3:0] we;
    logic [3:0] ix;
    we = (tgt == 1) ? {pcsr.sec_we, pcsr.sw_we, pcsr.addr_we, pcsr.cfg_we} :
         (tgt == 2) ? {scsr.sec_we, scsr.sw_we, scsr.addr_we, scsr.cfg_we} :
                      {vcsr.sec_we, vcsr.sw_we, vcsr.addr_we, vcsr.cfg_we};
    ix = (tgt == 1) ? pcsr.idx : (tgt == 2) ? scsr.idx : vcsr.idx;
    checks++;
    if (we !== 4'(1 << kind) || ix !== 4'(idx)) begin
      failures++; $display("FAIL %s: we=%b idx=%0d", what, we, ix);
    end
  endtask

  task automatic t_rd(string what, mode_t m, logic [11:0] a, logic [31:0] exp);
    mode = m; csr_valid = 1; csr_we = 0; csr_addr = a; #1;
    checks++;
    if (csr_rdata !== exp) begin failures++; $display("FAIL %s: rdata=%h", what, csr_rdata); end
    csr_valid = 0; #1;
  endtask

  initial begin
    mode = M; csr_valid = 0; csr_we = 0; csr_addr = 0; csr_wdata = 0;
    menvcfg_stce = 1; henvcfg_stce = 1;
    mcounteren_tm = 1; hcounteren_tm = 1; scounteren_tm = 1;
    t_wr("M pmpaddr0",        M,  12'h3B0, 0, 1, 1, 0);
    t_wr("M pmpcfg3",         M,  12'h3A3, 0, 1, 0, 3);
    t_wr("M pmpcfg4 absent",  M,  12'h3A4, 1, 0, 0, 0);
    t_wr("HS pmpaddr0",       HS, 12'h3B0, 1, 0, 0, 0);
    t_wr("HS spmpaddr3",      HS, 12'h1B3, 0, 2, 1, 3);
    t_wr("M spmpcfg1",        M,  12'h1A1, 0, 2, 0, 1);
    t_wr("VS spmpaddr3",      VS, 12'h1B3, 0, 3, 1, 3);
    t_wr("VS spmpcfg2",       VS, 12'h1A2, 0, 3, 0, 2);
    t_wr("HS spmpswitch",     HS, 12'h170, 0, 2, 2, 0);
    t_wr("VS spmpswitch",     VS, 12'h170, 1, 0, 0, 0);
    t_wr("HS vspmpaddr15",    HS, 12'h2BF, 0, 3, 1, 15);
    t_wr("VS vspmpaddr0",     VS, 12'h2B0, 1, 0, 0, 0);
    t_wr("HU spmpaddr0",      HU, 12'h1B0, 1, 0, 0, 0);
    t_wr("VU spmpaddr0",      VU, 12'h1B0, 1, 0, 0, 0);
    t_wr("HS stimecmp",       HS, 12'h14D, 0, 4, 0, 0);
    t_wr("HS stimecmph",      HS, 12'h15D, 0, 4, 1, 0);
    t_wr("VS stimecmp->vs",   VS, 12'h14D, 0, 4, 2, 0);
    t_wr("VS stimecmph->vs",  VS, 12'h15D, 0, 4, 3, 0);
    t_wr("HS vstimecmp",      HS, 12'h24D, 0, 4, 2, 0);
    t_wr("HS htimedelta",     HS, 12'h605, 0, 4, 4, 0);
    t_wr("HS htimedeltah",    HS, 12'h615, 0, 4, 5, 0);
    t_wr("VS htimedelta",     VS, 12'h605, 1, 0, 0, 0);
    henvcfg_stce = 0;
    t_wr("VS stimecmp no hSTCE", VS, 12'h14D, 1, 0, 0, 0);
    t_wr("HS stimecmp hSTCE off ok", HS, 12'h14D, 0, 4, 0, 0);
    menvcfg_stce = 0;
    t_wr("HS stimecmp no mSTCE", HS, 12'h14D, 1, 0, 0, 0);
    t_wr("M stimecmp always",  M, 12'h14D, 0, 4, 0, 0);
    menvcfg_stce = 1; henvcfg_stce = 1;
    t_wr("M mseccfg",         M,  12'h747, 0, 1, 3, 7);
    t_wr("HS mseccfg",        HS, 12'h747, 1, 0, 0, 0);
    t_wr("M mseccfgh",        M,  12'h757, 0, 0, 0, 0);
    t_wr("HS mseccfgh",       HS, 12'h757, 1, 0, 0, 0);
    t_wr("M tselect",         M,  12'h7A0, 0, 5, 0, 0);
    t_wr("M tdata2",          M,  12'h7A2, 0, 5, 2, 0);
    t_wr("M tinfo",           M,  12'h7A4, 0, 5, 3, 0);
    t_wr("M tdata3",          M,  12'h7A3, 0, 0, 0, 0);
    t_wr("HS tdata1",         HS, 12'h7A1, 1, 0, 0, 0);
    t_wr("VS tselect",        VS, 12'h7A0, 1, 0, 0, 0);
    t_wr("foreign CSR",       M,  12'h300, 0, 0, 0, 0);
    mode = M; csr_valid = 1; csr_addr = 12'h300; #1;
    checks++; if (csr_hit) begin failures++; $display("FAIL foreign hit"); end
    csr_valid = 0;

    t_rd("read pmpaddr5",   M,  12'h3B5, 32'hA001_0005);
    t_rd("read tdata1",     M,  12'h7A1, 32'hE000_0001);
    t_rd("read tinfo",      M,  12'h7A4, 32'hE000_0003);
    t_rd("read mseccfg",    M,  12'h747, 32'hA003_0007);
    t_rd("read mseccfgh",   M,  12'h757, 32'h0);
    t_rd("read spmpcfg2",   HS, 12'h1A2, 32'hB000_0002);
    t_rd("read switch",     HS, 12'h170, 32'hB002_0000);
    t_rd("switch hi absent", HS, 12'h171, 32'h0);
    t_rd("VS read spmpaddr",VS, 12'h1B7, 32'hC001_0007);
    t_rd("read vspmpcfg1",  HS, 12'h2A1, 32'hC000_0001);
    t_rd("VS read stimecmp",VS, 12'h14D, 32'hD000_000A);
    t_rd("M read time",     M,  12'hC01, 32'hD000_0006);
    t_rd("HS read timeh",   HS, 12'hC81, 32'hD000_0007);
    t_rd("VS read guest time", VS, 12'hC01, 32'hD000_000E);
    t_rd("VU read guest timeh", VU, 12'hC81, 32'hD000_000F);
    t_wr("M write time",    M,  12'hC01, 1, 0, 0, 0);
    scounteren_tm = 0;
    t_rd("HU time, no sTM", HU, 12'hC01, 32'h0);
    t_rd("VU time, no sTM", VU, 12'hC01, 32'h0);
    t_rd("VS time, sTM ok", VS, 12'hC01, 32'hD000_000E);
    hcounteren_tm = 0;
    t_rd("VS time, no hTM", VS, 12'hC01, 32'h0);
    t_rd("HS time, hTM ok", HS, 12'hC01, 32'hD000_0006);
    mcounteren_tm = 0;
    t_rd("HS time, no mTM", HS, 12'hC01, 32'h0);
    t_rd("M time always",   M,  12'hC01, 32'hD000_0006);
    mode = HS; csr_valid = 1; csr_addr = 12'hC01; #1;
    checks++; if (!csr_illegal) begin failures++; $display("FAIL HS time not illegal"); end
    csr_valid = 0;
    t_rd("illegal reads 0", HU, 12'h1B0, 32'h0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
