// tb_dyn_icache: self-checking test of the dynamic instruction cache
// (trace table + four block-cache copies).
//
// How it works: the test writes random blocks into the block caches and
// random traces (1..4 blocks, block addresses drawn from a small pool so
// some are present and some are not) into the trace table, invalidates some
// traces, and looks up random trace addresses. A model keeps both tables and
// computes the expected result: hit only if the trace is present and its
// first block is present; the delivered block count stops at the first
// missing block, and the successor address is then that block's address.
// On a hit every delivered block is compared with the model.
// Interface checked: lk_pc/lk_hit/lk_blk/lk_nblk/lk_next_pc/lk_idx,
// bw_en/bw_blk, tw_en/tw_tr, ti_en/ti_idx. Cutting a trace at a missing
// block is this design's choice.
// Prints TB_RESULT checks/failures; a watchdog ends a hung run.
module tb_dyn_icache;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [PCW-1:0] lk_pc, lk_next_pc;
  logic lk_hit, bw_en, tw_en, ti_en;
  block_t [NBLK-1:0] lk_blk;
  logic [2:0] lk_nblk;
  logic [TTW-1:0] lk_idx, ti_idx;
  block_t bw_blk;
  trace_t tw_tr;
  int checks = 0, failures = 0, hits = 0, partial = 0;
  block_t mb [BC_N]; logic vb [BC_N];
  trace_t mt [TT_N]; logic vt [TT_N];

  dyn_icache dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic logic [PCW-1:0] pool();
    return PCW'(16 * ($urandom % 24));
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin vb[i] = 0; vt[i] = 0; end
    {bw_en, tw_en, ti_en} = 0; bw_blk = '0; tw_tr = '0; ti_idx = 0; lk_pc = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 6000; it++) begin
      @(negedge clk);
      bw_en = ($urandom % 3) == 0;
      bw_blk = block_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      bw_blk.valid = 1; bw_blk.pc = pool(); bw_blk.len = 3'(1 + $urandom % 6);
      tw_en = ($urandom % 3) == 0;
      tw_tr.valid = 1; tw_tr.pc = pool() + PCW'(1); tw_tr.nblk = 3'(1 + $urandom % 4);
      for (int k = 0; k < NBLK; k++) tw_tr.bpc[k] = pool();
      tw_tr.next_pc = PCW'($urandom);
      ti_en = ($urandom % 8) == 0; ti_idx = TTW'(pool() + PCW'(1));
      lk_pc = pool() + PCW'(1);
      #1;
      begin
        automatic trace_t t = mt[lk_pc[7:0]];
        automatic logic th = vt[lk_pc[7:0]] && t.pc == lk_pc;
        automatic int n = 0;
        automatic logic stop = 0;
        automatic logic [PCW-1:0] nx = t.next_pc;
        for (int k = 0; k < NBLK; k++)
          if (!stop && k < int'(t.nblk)) begin
            if (vb[t.bpc[k][7:0]] && mb[t.bpc[k][7:0]].pc == t.bpc[k]) n = k + 1;
            else begin stop = 1; nx = t.bpc[k]; end
          end
        checks++;
        if (lk_hit !== (th && n > 0)) failures++;
        if (th && n > 0) begin
          hits++;
          if (n < int'(t.nblk)) partial++;
          checks += 2;
          if (lk_nblk !== 3'(n)) failures++;
          if (lk_next_pc !== nx) failures++;
          for (int k = 0; k < n; k++) begin
            checks++;
            if (lk_blk[k] !== mb[t.bpc[k][7:0]]) failures++;
          end
        end
      end
      @(posedge clk);
      if (bw_en) begin mb[bw_blk.pc[7:0]] = bw_blk; vb[bw_blk.pc[7:0]] = 1; end
      if (ti_en) vt[ti_idx] = 0;
      if (tw_en) begin mt[tw_tr.pc[7:0]] = tw_tr; vt[tw_tr.pc[7:0]] = 1; end
    end
    checks += 2;
    if (hits < 100) failures++;
    if (partial < 10) failures++;
    $display("hits=%0d partial=%0d", hits, partial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
