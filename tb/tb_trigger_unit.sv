// Self-checking testbench of the debug triggers: register access through
// tselect/tdata1/tdata2/tinfo, WARL handling of tselect and the match field,
// equal / greater-or-equal / less-than address matching, the per-mode and
// per-access-type enables, two ports at once, and the sticky hit0 bit.
// Expected values are worked out by hand per vector.
module tb_trigger_unit;
  import ba51h_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic        csr_we;
  logic [1:0]  csr_sel;
  logic [31:0] csr_wdata, csr_rdata;
  logic        req  [2];
  mode_t       mode [2];
  acc_e        acc  [2];
  logic [31:0] addr [2];
  logic        hit  [2];

  trigger_unit #(.N_TRIG(8), .N_PORTS(2)) dut (.clk, .rst_n, .csr_we, .csr_sel, .csr_wdata,
                                                .csr_rdata, .req, .mode, .acc, .addr, .hit);

  localparam mode_t M  = '{v:1'b0, prv:PRV_M};
  localparam mode_t HS = '{v:1'b0, prv:PRV_S};
  localparam mode_t HU = '{v:1'b0, prv:PRV_U};
  localparam mode_t VS = '{v:1'b1, prv:PRV_S};
  localparam mode_t VU = '{v:1'b1, prv:PRV_U};

  // tdata1 field helpers (type 6 layout)
  localparam logic [31:0] T_VS = 32'h0100_0000, T_VU = 32'h0080_0000, T_HIT = 32'h0040_0000;
  localparam logic [31:0] T_M = 32'h40, T_S = 32'h10, T_U = 32'h08;
  localparam logic [31:0] T_X = 32'h4, T_ST = 32'h2, T_LD = 32'h1;
  localparam logic [31:0] TYPE6 = 32'h6000_0000;
  function automatic logic [31:0] t_match(int m);
    return 32'(m) << 7;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wr(logic [1:0] sel, logic [31:0] d);
    csr_we = 1; csr_sel = sel; csr_wdata = d;
    @(posedge clk); #1;
    csr_we = 0;
  endtask

  task automatic rd(logic [1:0] sel, output logic [31:0] d);
    csr_sel = sel; #1;
    d = csr_rdata;
  endtask

  task automatic probe(string what, int p, mode_t m, acc_e a, logic [31:0] ad, logic exp);
    req[p] = 1; mode[p] = m; acc[p] = a; addr[p] = ad; #1;
    check($sformatf("%s: hit=%0b exp %0b", what, hit[p], exp), hit[p] == exp);
    req[p] = 0; #1;
  endtask

  logic [31:0] v;

  initial begin
    csr_we = 0; csr_sel = 0; csr_wdata = 0;
    for (int p = 0; p < 2; p++) begin req[p] = 0; mode[p] = M; acc[p] = ACC_R; addr[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    rd(2'd3, v); check("tinfo type 6", v == 32'h40);
    rd(2'd1, v); check("tdata1 reset", v == TYPE6);
    probe("reset: no hit", 0, M, ACC_X, 32'h0, 1'b0);

    // trigger 0: execute at 0x100 in VS and VU
    wr(2'd0, 0);
    wr(2'd2, 32'h0000_0100);
    wr(2'd1, T_VS | T_VU | T_X);
    rd(2'd1, v); check($sformatf("tdata1 t0 %h", v), v == (TYPE6 | T_VS | T_VU | T_X));
    probe("t0 VS fetch",      0, VS, ACC_X, 32'h0000_0100, 1'b1);
    probe("t0 VU fetch",      0, VU, ACC_X, 32'h0000_0100, 1'b1);
    probe("t0 HS fetch",      0, HS, ACC_X, 32'h0000_0100, 1'b0);
    probe("t0 VS load",       1, VS, ACC_R, 32'h0000_0100, 1'b0);
    probe("t0 VS other addr", 0, VS, ACC_X, 32'h0000_0104, 1'b0);

    // trigger 5: stores at or above 0x8000 from M and HU
    wr(2'd0, 5);
    rd(2'd0, v); check("tselect 5", v == 5);
    wr(2'd2, 32'h0000_8000);
    wr(2'd1, T_M | T_U | T_ST | t_match(2));
    probe("t5 M store above",  1, M,  ACC_W, 32'h0000_9000, 1'b1);
    probe("t5 HU store at",    1, HU, ACC_W, 32'h0000_8000, 1'b1);
    probe("t5 M store below",  1, M,  ACC_W, 32'h0000_7FFC, 1'b0);
    probe("t5 HS store above", 1, HS, ACC_W, 32'h0000_9000, 1'b0);
    probe("t5 M load above",   1, M,  ACC_R, 32'h0000_9000, 1'b0);

    // trigger 7: loads below 0x40 from HS; unsupported match 1 stores 0
    wr(2'd0, 7);
    wr(2'd2, 32'h0000_0040);
    wr(2'd1, T_S | T_LD | t_match(3));
    probe("t7 HS load below", 1, HS, ACC_R, 32'h0000_003C, 1'b1);
    probe("t7 HS load at",    1, HS, ACC_R, 32'h0000_0040, 1'b0);
    wr(2'd1, T_S | T_LD | t_match(1));
    rd(2'd1, v); check($sformatf("match WARL %h", v), v == (TYPE6 | T_S | T_LD));
    probe("t7 now equal", 1, HS, ACC_R, 32'h0000_0040, 1'b1);

    // tselect out of range keeps the old value
    wr(2'd0, 8);
    rd(2'd0, v); check("tselect WARL", v == 7);

    // both ports at once, and hit0 recorded at the clock edge
    req[0] = 1; mode[0] = VS; acc[0] = ACC_X; addr[0] = 32'h0000_0100;
    req[1] = 1; mode[1] = M;  acc[1] = ACC_W; addr[1] = 32'h0000_A000;
    #1;
    check("two ports hit", hit[0] && hit[1]);
    @(posedge clk); #1;
    req[0] = 0; req[1] = 0;
    wr(2'd0, 0);
    rd(2'd1, v); check("t0 hit0 set", (v & T_HIT) != 0);
    wr(2'd0, 5);
    rd(2'd1, v); check("t5 hit0 set", (v & T_HIT) != 0);
    wr(2'd0, 7);
    rd(2'd1, v); check("t7 hit0 clear", (v & T_HIT) == 0);
    wr(2'd0, 0);
    wr(2'd1, T_VS | T_VU | T_X);
    rd(2'd1, v); check("hit0 cleared by write", (v & T_HIT) == 0);
    rd(2'd2, v); check("tdata2 t0", v == 32'h0000_0100);

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
