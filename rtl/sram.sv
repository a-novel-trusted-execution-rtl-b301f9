// On-chip SRAM of the BA51-H system, 64 KiB by default.
//
// Two synchronous ports on one word array: an instruction read port (i_*)
// and a data port (d_*) with per-byte write enables. Read data appear one
// clock after the request. A write and a read of the same word in one cycle
// return the old word on the instruction port. The contents are not reset.
// The 64 KiB size is the memory the design's area figures add to the core;
// the port arrangement follows the separate instruction and data buses of
// the core and is otherwise this design's choice.
module sram #(
  parameter int unsigned SIZE_BYTES = 65536,
  localparam int unsigned DEPTH = SIZE_BYTES / 4,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          i_req,
  input  logic [AW-1:0] i_addr,   // word address
  output logic [31:0]   i_rdata,
  input  logic          d_req,
  input  logic          d_we,
  input  logic [3:0]    d_be,
  input  logic [AW-1:0] d_addr,   // word address
  input  logic [31:0]   d_wdata,
  output logic [31:0]   d_rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (i_req) i_rdata <= mem[i_addr];
  end

  always_ff @(posedge clk) begin
    if (d_req) begin
      if (d_we) begin
        for (int b = 0; b < 4; b++)
          if (d_be[b]) mem[d_addr][b*8 +: 8] <= d_wdata[b*8 +: 8];
      end else begin
        d_rdata <= mem[d_addr];
      end
    end
  end
endmodule
