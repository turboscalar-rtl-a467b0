// tb_block_cache: self-checking test of one block-cache copy.
//
// How it works: random blocks (random start address, length and slot
// contents) are written; a direct-mapped model keeps the block per index.
// Every cycle a random address is looked up (combinationally) and the hit
// flag and, on a hit, the whole block are compared with the model. Addresses
// share indices so replacement and tag mismatch are exercised; a reset in
// the middle checks that all entries become invalid.
// Interface checked: rd_pc/rd_blk/rd_hit, wr_en/wr_blk.
// The direct-mapped 256-entry organisation is this design's choice.
// Prints TB_RESULT checks/failures; a watchdog ends a hung run.
module tb_block_cache;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [PCW-1:0] rd_pc;
  block_t rd_blk, wr_blk;
  logic rd_hit, wr_en;
  int checks = 0, failures = 0, hits = 0;
  block_t m [BC_N];
  logic v [BC_N];

  block_cache dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic block_t rnd_blk();
    block_t b;
    b = block_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    b.valid = 1; b.pc = PCW'($urandom % 1024); b.len = 3'(1 + $urandom % 6);
    return b;
  endfunction

  initial begin
    for (int i = 0; i < BC_N; i++) v[i] = 0;
    wr_en = 0; wr_blk = '0; rd_pc = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 6000; it++) begin
      @(negedge clk);
      if (it == 3000) begin
        rst_n = 0; #1 rst_n = 1;
        for (int i = 0; i < BC_N; i++) v[i] = 0;
      end
      wr_en = 1'($urandom); wr_blk = rnd_blk();
      rd_pc = ($urandom % 2) ? wr_blk.pc : PCW'($urandom % 1024);
      #1;
      begin
        automatic int ix = rd_pc[7:0];
        automatic logic eh = v[ix] && m[ix].pc == rd_pc;
        checks++;
        if (rd_hit !== eh) failures++;
        if (eh) begin hits++; checks++; if (rd_blk !== m[ix]) failures++; end
      end
      @(posedge clk);
      if (wr_en) begin m[wr_blk.pc[7:0]] = wr_blk; v[wr_blk.pc[7:0]] = 1; end
    end
    checks++; if (hits < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
