// block_cache: one copy of the block cache of the block-based trace cache.
//
// Holds optimized instruction blocks (up to six instructions each, already
// aligned to dispatch positions, with dependency and virtual-tag information)
// in a direct-mapped array indexed by the low bits of the block's start
// address; the full start address is kept as the tag. The dynamic instruction
// cache keeps four identical copies so that the four blocks of a trace can be
// read in the same cycle.
//
// Interface: one combinational read port (rd_pc -> rd_blk, rd_hit) and one
// write port (wr_en, wr_blk) filled by the optimizing back-end. A write is
// visible to reads from the next cycle on. Reset clears every valid bit.
// The direct-mapped organisation and the 256-entry size are choices of this
// design; the Turboscalar description does not size the block cache.
module block_cache
  import ts_pkg::*;
#(
  parameter int N = BC_N
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [PCW-1:0] rd_pc,
  output block_t         rd_blk,
  output logic           rd_hit,
  input  logic           wr_en,
  input  block_t         wr_blk
);
  localparam int IW = $clog2(N);

  block_t          mem [N];
  logic [N-1:0]    vld;

  wire [IW-1:0] ridx = rd_pc[IW-1:0];
  wire [IW-1:0] widx = wr_blk.pc[IW-1:0];

  always_comb begin
    rd_blk = mem[ridx];
    rd_hit = vld[ridx] && mem[ridx].pc == rd_pc;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld <= '0;
    else if (wr_en) vld[widx] <= 1'b1;

  always_ff @(posedge clk)
    if (wr_en) mem[widx] <= wr_blk;

endmodule
