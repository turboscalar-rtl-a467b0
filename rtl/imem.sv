// imem: the cold pipeline's instruction cache, modelled as a perfect
// (always-hit) memory of predecoded instructions.
//
// 8192 entries, the instruction count of a 32 KB cache of 4-byte
// instructions. One combinational read port for fetch and one write port to
// load a program. The size follows the 32 KB first-level instruction cache
// of the evaluated machine; holding the whole program (no misses, no refill
// from a second level) is a simplification of this design.
module imem
  import ts_pkg::*;
#(
  parameter int N = 8192
) (
  input  logic            clk,
  input  logic [PCW-1:0]  rd_pc,
  output instr_t          rd_ins,
  input  logic            wr_en,
  input  logic [PCW-1:0]  wr_pc,
  input  instr_t          wr_ins
);
  localparam int IW = $clog2(N);
  instr_t mem [N];

  assign rd_ins = mem[rd_pc[IW-1:0]];

  always_ff @(posedge clk)
    if (wr_en) mem[wr_pc[IW-1:0]] <= wr_ins;
endmodule
