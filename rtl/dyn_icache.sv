// dyn_icache: the dynamic instruction cache that feeds the hot pipeline.
//
// It is a block-based trace cache: a trace table names up to four blocks per
// trace, and four identical copies of the block cache (#0..#3) deliver those
// four blocks in the same cycle, one copy per block position. Blocks carry
// everything the optimizing back-end worked out (decode, dependency check,
// virtual rename information, dispatch-slot alignment), so the hot pipeline
// only has to read source operands before dispatch.
//
// A lookup reads the trace entry for lk_pc and then the four block caches.
// The fetched trace is cut at the first block that is no longer present
// (it was evicted since the trace was built); its successor address is then
// the start of that block. lk_hit is set when at least the first block is
// present. Everything is combinational in the fetch cycle. The back-end
// writes a block into all four copies at once (bw_*), writes traces (tw_*)
// and may invalidate a trace (ti_*).
module dyn_icache
  import ts_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup
  input  logic [PCW-1:0]       lk_pc,
  output logic                 lk_hit,
  output block_t [NBLK-1:0]    lk_blk,
  output logic [2:0]           lk_nblk,
  output logic [PCW-1:0]       lk_next_pc,
  output logic [TTW-1:0]       lk_idx,
  // updates from the optimizing back-end
  input  logic                 bw_en,
  input  block_t               bw_blk,
  input  logic                 tw_en,
  input  trace_t               tw_tr,
  input  logic                 ti_en,
  input  logic [TTW-1:0]       ti_idx
);
  logic            tt_hit;
  trace_t          tr;
  logic [NBLK-1:0] bhit;

  trace_table u_tt (
    .clk, .rst_n, .lk_pc, .lk_hit(tt_hit), .lk_tr(tr), .lk_idx,
    .wr_en(tw_en), .wr_tr(tw_tr), .inv_en(ti_en), .inv_idx(ti_idx)
  );

  for (genvar k = 0; k < NBLK; k++) begin : g_bc
    block_cache u_bc (
      .clk, .rst_n, .rd_pc(tr.bpc[k]), .rd_blk(lk_blk[k]), .rd_hit(bhit[k]),
      .wr_en(bw_en), .wr_blk(bw_blk)
    );
  end

  always_comb begin
    logic stop;
    stop       = 1'b0;
    lk_nblk    = '0;
    lk_next_pc = tr.next_pc;
    for (int k = 0; k < NBLK; k++)
      if (!stop && 3'(k) < tr.nblk) begin
        if (bhit[k]) lk_nblk = 3'(k + 1);
        else begin
          stop       = 1'b1;
          lk_next_pc = tr.bpc[k];
        end
      end
    lk_hit = tt_hit && lk_nblk != '0;
  end

endmodule
