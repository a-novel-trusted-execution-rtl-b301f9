// Self-checking testbench of the 64 KiB SRAM: byte-enable writes, one-cycle
// read latency on both ports, compared with a reference copy kept here.
module tb_sram;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int unsigned AW = 14;
  logic          i_req, d_req, d_we;
  logic [AW-1:0] i_addr, d_addr;
  logic [3:0]    d_be;
  logic [31:0]   d_wdata, i_rdata, d_rdata;
  logic [31:0]   ref_mem [logic [AW-1:0]];

  sram dut (.clk, .i_req, .i_addr, .i_rdata, .d_req, .d_we, .d_be, .d_addr, .d_wdata, .d_rdata);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [AW-1:0] a [64];
    i_req = 0; d_req = 0; d_we = 0; d_be = 0; i_addr = 0; d_addr = 0; d_wdata = 0;
    @(posedge clk); #1;
    // Full-word writes to 64 spread addresses, including both ends
    for (int k = 0; k < 64; k++) begin
      a[k] = (k == 0) ? '0 : (k == 63) ? '1 : AW'($urandom);
      d_req = 1; d_we = 1; d_be = 4'hF; d_addr = a[k]; d_wdata = $urandom;
      ref_mem[a[k]] = d_wdata;
      @(posedge clk); #1;
    end
    // Partial writes
    for (int k = 0; k < 32; k++) begin
      logic [31:0] w;
      d_be = 4'($urandom); d_addr = a[k]; d_wdata = $urandom;
      w = ref_mem[a[k]];
      for (int b = 0; b < 4; b++) if (d_be[b]) w[b*8 +: 8] = d_wdata[b*8 +: 8];
      ref_mem[a[k]] = w;
      @(posedge clk); #1;
    end
    d_we = 0;
    // Read back on both ports, data one clock after the request
    for (int k = 0; k < 64; k++) begin
      d_req = 1; d_addr = a[k];
      i_req = 1; i_addr = a[63 - k];
      @(posedge clk); #1;
      check($sformatf("d read %0d", k), d_rdata == ref_mem[a[k]]);
      check($sformatf("i read %0d", k), i_rdata == ref_mem[a[63 - k]]);
    end
    // Output holds without a request
    d_req = 0; i_req = 0; d_addr = a[0];
    @(posedge clk); #1;
    check("d holds", d_rdata == ref_mem[a[63]]);
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
