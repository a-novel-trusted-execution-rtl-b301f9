// Self-checking testbench of the M-mode PMP: region modes (NAPOT, TOR, NA4),
// lowest-entry priority, S/U/VS/VU versus M-mode rules, the lock bit, both
// check ports and the enhanced-PMP mseccfg bits (MML rule table, shared
// regions, sticky MML/MMWP, refused locked executable rules, RLB). Expected
// results are worked out by hand per vector.
module tb_pmp;
  import ba51h_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mpu_csr_if csr ();
  mode_t       mode  [2];
  acc_e        acc   [2];
  logic [31:0] pa    [2];
  logic        allow [2];

  pmp #(.N_ENTRIES(16), .N_PORTS(2)) dut (.clk, .rst_n, .csr(csr), .mode, .acc, .pa, .allow);

  localparam mode_t M  = '{v:1'b0, prv:PRV_M};
  localparam mode_t S  = '{v:1'b0, prv:PRV_S};
  localparam mode_t U  = '{v:1'b0, prv:PRV_U};
  localparam mode_t VS = '{v:1'b1, prv:PRV_S};
  localparam mode_t VU = '{v:1'b1, prv:PRV_U};

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic wr(logic is_addr, int idx, logic [31:0] d);
    csr.cfg_we  = !is_addr;
    csr.addr_we = is_addr;
    csr.idx     = 4'(idx);
    csr.wdata   = d;
    @(posedge clk); #1;
    csr.cfg_we  = 1'b0;
    csr.addr_we = 1'b0;
  endtask

  task automatic wr_sec(logic [31:0] d);
    csr.sec_we = 1'b1;
    csr.wdata  = d;
    @(posedge clk); #1;
    csr.sec_we = 1'b0;
  endtask

  task automatic chk_rd(string what, logic [1:0] sel, int idx, logic [31:0] exp);
    csr.rd_sel = sel;
    csr.rd_idx = 4'(idx);
    #1;
    checks++;
    if (csr.rdata !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, csr.rdata, exp);
    end
  endtask

  task automatic probe(string what, mode_t m, acc_e a, logic [31:0] ad, logic exp);
    mode[0] = m; acc[0] = a; pa[0] = ad; #1;
    check(what, allow[0], exp);
  endtask

  typedef struct { mode_t m; acc_e a; logic [31:0] ad; logic exp; } vec_t;
  vec_t v [$];

  initial begin
    csr.cfg_we = 0; csr.addr_we = 0; csr.sw_we = 0; csr.sec_we = 0; csr.idx = 0; csr.wdata = 0;
    csr.rd_sel = 0; csr.rd_idx = 0;
    for (int p = 0; p < 2; p++) begin mode[p] = M; acc[p] = ACC_R; pa[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // entry 0: NAPOT 0x1000-0x1FFF, R
    wr(1, 0, 32'h0000_05FF);
    // entry 2 OFF (TOR base 0x2000), entry 3 TOR up to 0x3000, RW
    wr(1, 2, 32'h0000_0800);
    wr(1, 3, 32'h0000_0C00);
    // entry 4: NA4 at 0x4000, X, locked
    wr(1, 4, 32'h0000_1000);
    // entry 5: NAPOT 0x8000-0xFFFF, RWX
    wr(1, 5, 32'h0000_2FFF);
    wr(0, 0, 32'h0B00_0019);          // e0 NAPOT R, e3 TOR RW
    wr(0, 1, 32'h0000_1F94);          // e4 NA4 X L, e5 NAPOT RWX

    v.push_back('{U,  ACC_R, 32'h0000_1004, 1'b1});
    v.push_back('{U,  ACC_W, 32'h0000_1004, 1'b0});
    v.push_back('{U,  ACC_R, 32'h0000_1FFC, 1'b1});
    v.push_back('{U,  ACC_R, 32'h0000_2000, 1'b1});
    v.push_back('{S,  ACC_W, 32'h0000_2FFC, 1'b1});
    v.push_back('{U,  ACC_R, 32'h0000_3000, 1'b0});
    v.push_back('{U,  ACC_X, 32'h0000_4000, 1'b1});
    v.push_back('{U,  ACC_X, 32'h0000_4004, 1'b0});
    v.push_back('{U,  ACC_R, 32'h0000_4000, 1'b0});
    v.push_back('{M,  ACC_R, 32'h0000_4000, 1'b0});
    v.push_back('{M,  ACC_X, 32'h0000_4000, 1'b1});
    v.push_back('{M,  ACC_W, 32'h0000_1000, 1'b1});
    v.push_back('{M,  ACC_R, 32'h0000_3000, 1'b1});
    v.push_back('{S,  ACC_W, 32'h0000_8004, 1'b1});
    v.push_back('{VS, ACC_W, 32'h0000_9000, 1'b1});
    v.push_back('{VU, ACC_X, 32'h0000_FFFC, 1'b1});
    v.push_back('{VU, ACC_R, 32'h0002_0000, 1'b0});
    v.push_back('{S,  ACC_R, 32'h0000_7FFC, 1'b0});

    for (int k = 0; k < v.size(); k++) begin
      int j;
      j = (k + 5) % v.size();
      mode[0] = v[k].m; acc[0] = v[k].a; pa[0] = v[k].ad;
      mode[1] = v[j].m; acc[1] = v[j].a; pa[1] = v[j].ad;
      #1;
      check($sformatf("port0 vec %0d", k), allow[0], v[k].exp);
      check($sformatf("port1 vec %0d", j), allow[1], v[j].exp);
    end

    // Locked entry 4 ignores writes to its address and configuration
    wr(1, 4, 32'h0000_1234);
    wr(0, 1, 32'h0000_0000);
    csr.rd_sel = 2'd1; csr.rd_idx = 4'd4; #1;
    check("locked addr kept", csr.rdata == 32'h0000_1000, 1'b1);
    csr.rd_sel = 2'd0; csr.rd_idx = 4'd1; #1;
    check("locked cfg kept", csr.rdata[7:0] == 8'h94, 1'b1);
    check("unlocked cfg cleared", csr.rdata[15:8] == 8'h00, 1'b1);
    // entry 3 (unlocked, below a non-TOR locked entry) stays writable
    wr(1, 3, 32'h0000_0D00);
    csr.rd_sel = 2'd1; csr.rd_idx = 4'd3; #1;
    check("unlocked addr written", csr.rdata == 32'h0000_0D00, 1'b1);
    mode[0] = U; acc[0] = ACC_R; pa[0] = 32'h0000_3000; #1;
    check("TOR grown", allow[0], 1'b1);

    // ---- enhanced PMP ----
    // e0 NAPOT 0x1000 R (LRWX 0100), e3 TOR RW, e4 NA4 0x4000 L+X (1001)
    wr_sec(32'h4);
    chk_rd("RLB refused while locked", 2'd3, 0, 32'h0);
    probe("M unmatched, plain", M, ACC_X, 32'h0002_0000, 1'b1);
    wr_sec(32'h1);
    chk_rd("MML set", 2'd3, 0, 32'h1);
    wr_sec(32'h0);
    chk_rd("MML sticky", 2'd3, 0, 32'h1);
    probe("MML 1001 M X",   M, ACC_X, 32'h0000_4000, 1'b1);
    probe("MML 1001 M R",   M, ACC_R, 32'h0000_4000, 1'b0);
    probe("MML 1001 U X",   U, ACC_X, 32'h0000_4000, 1'b0);
    probe("MML 0100 U R",   U, ACC_R, 32'h0000_1004, 1'b1);
    probe("MML 0100 M R",   M, ACC_R, 32'h0000_1004, 1'b0);
    probe("MML 0110 M W",   M, ACC_W, 32'h0000_2004, 1'b0);
    probe("MML 0110 S W",   S, ACC_W, 32'h0000_2004, 1'b1);
    probe("MML none M R",   M, ACC_R, 32'h0002_0000, 1'b1);
    probe("MML none M X",   M, ACC_X, 32'h0002_0000, 1'b0);
    probe("MML none U R",   U, ACC_R, 32'h0002_0000, 1'b0);
    // e5 NAPOT 0x8000-0xFFFF, W only: shared data (M RW, S/U R)
    wr(0, 1, 32'h0000_1A94);
    probe("shared M W",     M, ACC_W, 32'h0000_9000, 1'b1);
    probe("shared U R",     U, ACC_R, 32'h0000_9000, 1'b1);
    probe("shared U W",     U, ACC_W, 32'h0000_9000, 1'b0);
    // new locked executable rules are refused, other locked rules accepted
    wr(0, 1, 32'h0000_9C94);
    chk_rd("L+X rule refused", 2'd0, 1, 32'h0000_1A94);
    wr(0, 1, 32'h0000_9D94);
    chk_rd("L+RX rule refused", 2'd0, 1, 32'h0000_1A94);
    wr(0, 1, 32'h0000_9994);
    chk_rd("L+R rule accepted", 2'd0, 1, 32'h0000_9994);
    probe("MML 1100 M R",   M, ACC_R, 32'h0000_9000, 1'b1);
    probe("MML 1100 M W",   M, ACC_W, 32'h0000_9000, 1'b0);
    probe("MML 1100 S R",   S, ACC_R, 32'h0000_9000, 1'b0);
    wr_sec(32'h2);
    chk_rd("MMWP set", 2'd3, 0, 32'h3);
    probe("MMWP none M R",  M, ACC_R, 32'h0002_0000, 1'b0);

    // RLB after a fresh reset: locked rules stay editable while it is set
    rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    chk_rd("mseccfg reset", 2'd3, 0, 32'h0);
    wr_sec(32'h4);
    chk_rd("RLB set", 2'd3, 0, 32'h4);
    wr(1, 0, 32'h0000_0100);
    wr(0, 0, 32'h0000_0091);
    wr(1, 0, 32'h0000_0200);
    chk_rd("RLB edits locked addr", 2'd1, 0, 32'h0000_0200);
    wr_sec(32'h0);
    chk_rd("RLB cleared", 2'd3, 0, 32'h0);
    wr(1, 0, 32'h0000_0300);
    chk_rd("lock back in force", 2'd1, 0, 32'h0000_0200);
    wr_sec(32'h4);
    chk_rd("RLB refused again", 2'd3, 0, 32'h0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
