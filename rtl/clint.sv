// Core-Local Interruptor (CLINT): machine timer and machine software interrupt.
//
// mtime is a 64-bit counter that advances by one on every clock with tick
// high (tick comes from the platform's time base). mtip is high while
// mtime >= mtimecmp; msip is a software-written bit. The time value is also
// given to the Sstc supervisor timers.
//
// Register bus: one access per cycle, sel with we for a write, sel without
// we for a read; rdata is combinational. Offsets (the usual CLINT layout):
//   0x0000 msip (bit 0)   0x4000/0x4004 mtimecmp lo/hi   0xBFF8/0xBFFC mtime lo/hi
// mtimecmp resets to all ones so no timer interrupt is pending after reset.
// The design only names the CLINT; layout, reset values and the tick input
// are this design's choices.
module clint (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  logic        sel,
  input  logic        we,
  input  logic [15:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic [63:0] mtime,
  output logic        mtip,
  output logic        msip
);
  logic [63:0] mtimecmp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mtime      <= '0;
      mtimecmp_q <= '1;
      msip       <= 1'b0;
    end else begin
      if (tick) mtime <= mtime + 64'd1;
      if (sel && we) begin
        unique case (addr)
          16'h0000: msip              <= wdata[0];
          16'h4000: mtimecmp_q[31:0]  <= wdata;
          16'h4004: mtimecmp_q[63:32] <= wdata;
          16'hBFF8: mtime[31:0]       <= wdata;
          16'hBFFC: mtime[63:32]      <= wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (addr)
      16'h0000: rdata = {31'd0, msip};
      16'h4000: rdata = mtimecmp_q[31:0];
      16'h4004: rdata = mtimecmp_q[63:32];
      16'hBFF8: rdata = mtime[31:0];
      16'hBFFC: rdata = mtime[63:32];
      default:  rdata = '0;
    endcase
  end

  assign mtip = (mtime >= mtimecmp_q);
endmodule
