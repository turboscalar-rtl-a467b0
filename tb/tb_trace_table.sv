// tb_trace_table: self-checking test of the trace table (trace predictor).
//
// How it works: random traces are written, random entries are invalidated
// (sometimes in the same cycle as a write to the same index, where the write
// wins) and random addresses are looked up. A direct-mapped model gives the
// expected hit flag, index and, on a hit, the stored trace. Lookup is
// combinational; writes and invalidations act at the clock edge.
// Interface checked: lk_pc/lk_hit/lk_tr/lk_idx, wr_en/wr_tr, inv_en/inv_idx.
// Size and organisation are this design's choice.
// Prints TB_RESULT checks/failures; a watchdog ends a hung run.
module tb_trace_table;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [PCW-1:0] lk_pc;
  logic lk_hit, wr_en, inv_en;
  trace_t lk_tr, wr_tr;
  logic [TTW-1:0] lk_idx, inv_idx;
  int checks = 0, failures = 0, hits = 0;
  trace_t m [TT_N];
  logic v [TT_N];

  trace_table dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    for (int i = 0; i < TT_N; i++) v[i] = 0;
    wr_en = 0; inv_en = 0; wr_tr = '0; inv_idx = 0; lk_pc = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 6000; it++) begin
      @(negedge clk);
      wr_en = 1'($urandom); inv_en = ($urandom % 4) == 0;
      wr_tr = trace_t'({$urandom, $urandom, $urandom, $urandom});
      wr_tr.valid = 1; wr_tr.pc = PCW'($urandom % 700);
      inv_idx = ($urandom % 2) ? TTW'(wr_tr.pc) : TTW'($urandom);
      lk_pc = ($urandom % 2) ? wr_tr.pc : PCW'($urandom % 700);
      #1;
      begin
        automatic int ix = lk_pc[7:0];
        automatic logic eh = v[ix] && m[ix].pc == lk_pc;
        checks += 2;
        if (lk_hit !== eh) failures++;
        if (lk_idx !== TTW'(ix)) failures++;
        if (eh) begin hits++; checks++; if (lk_tr !== m[ix]) failures++; end
      end
      @(posedge clk);
      if (inv_en) v[inv_idx] = 0;
      if (wr_en) begin m[wr_tr.pc[7:0]] = wr_tr; v[wr_tr.pc[7:0]] = 1; end
    end
    checks++; if (hits < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
