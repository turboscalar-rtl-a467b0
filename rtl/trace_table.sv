// trace_table: the trace table (trace predictor) of the block-based trace cache.
//
// Each entry names a trace of up to four blocks by their start addresses,
// together with the address that follows the trace. The table is indexed by
// the low bits of the trace start address and tagged with the full address;
// a hit means the hot pipeline can fetch the trace. Entries are written by the
// optimizing back-end when it has assembled a trace from completed blocks, so
// the stored path is the one last seen at completion time (the branch
// prediction of the hot pipeline happens here, at completion, not at fetch).
// An entry can be invalidated when a branch inside its trace mispredicts, so
// the back-end rebuilds it along the correct path.
//
// Interface: combinational lookup (lk_pc -> lk_hit, lk_tr, lk_idx), one write
// port, one invalidate port; write wins over invalidate of the same entry.
// Direct mapping, 256 entries and invalidation on misprediction are choices of
// this design: the Turboscalar description builds traces with a tree-based
// multiple branch predictor that it does not detail.
module trace_table
  import ts_pkg::*;
#(
  parameter int N = TT_N
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PCW-1:0]    lk_pc,
  output logic              lk_hit,
  output trace_t            lk_tr,
  output logic [TTW-1:0]    lk_idx,
  input  logic              wr_en,
  input  trace_t            wr_tr,
  input  logic              inv_en,
  input  logic [TTW-1:0]    inv_idx
);
  localparam int IW = $clog2(N);

  trace_t       mem [N];
  logic [N-1:0] vld;

  always_comb begin
    lk_idx = TTW'(lk_pc[IW-1:0]);
    lk_tr  = mem[lk_pc[IW-1:0]];
    lk_hit = vld[lk_pc[IW-1:0]] && lk_tr.pc == lk_pc;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld <= '0;
    else begin
      if (inv_en) vld[inv_idx[IW-1:0]] <= 1'b0;
      if (wr_en)  vld[wr_tr.pc[IW-1:0]] <= 1'b1;
    end

  always_ff @(posedge clk)
    if (wr_en) mem[wr_tr.pc[IW-1:0]] <= wr_tr;

endmodule
