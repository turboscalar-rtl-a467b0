// tb_tiny_decoder: self-checking test of the tiny decoder of the hot pipeline.
//
// How it works: the test builds random fetch groups the way the optimizing
// back-end would: 1..4 blocks, each of 1..6 random instructions placed on
// free dispatch positions that accept their class, with the in-block "prior
// writes" counts filled in. A reference then walks the whole group in
// program order and works out, for every instruction, the group-wide count
// of earlier writes to its rd, rs1 and rs2, its address, its reorder-buffer
// offset and its predicted successor (next instruction, next block, or the
// trace's successor). Every lane of the combinational outputs is compared,
// as well as the group instruction count and that unused lanes are invalid.
// Prints TB_RESULT checks/failures; a watchdog ends a hung run.
module tb_tiny_decoder;
  import ts_pkg::*;
  block_t [NBLK-1:0] blk;
  logic [2:0] nblk;
  logic [PCW-1:0] next_pc;
  ren_t [HOT_W-1:0] ren;
  dlane_t [HOT_W-1:0] lane;
  logic [4:0] nins;
  int checks = 0, failures = 0, xblk = 0;

  tiny_decoder dut (.*);
  initial begin #2000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("%s", what); end
  endtask

  initial begin
    for (int it = 0; it < 3000; it++) begin
      // reference program order: lane index of each instruction
      automatic int ord [$];
      automatic int lpos [HOT_W];
      blk = '0;
      nblk = 3'(1 + $urandom % 4);
      next_pc = PCW'($urandom);
      for (int k = 0; k < NBLK; k++) begin
        automatic int len = 1 + $urandom % 6;
        automatic logic [BLK_W-1:0] used = '0;
        blk[k].valid = 1; blk[k].pc = PCW'($urandom); blk[k].len = 3'(len);
        for (int i = 0; i < len; i++) begin
          automatic int p;
          automatic instr_t ins;
          do p = $urandom % BLK_W; while (used[p]);
          used[p] = 1;
          ins = instr_t'({$urandom, $urandom});
          ins.rd = REGW'($urandom % 6); ins.rs1 = REGW'($urandom % 6); ins.rs2 = REGW'($urandom % 6);
          // any class this position accepts
          do ins.cls = iclass_e'($urandom % 5); while (!pos_mask(p)[ins.cls]);
          ins.op = 3'($urandom % ((ins.cls == C_BR) ? 4 : 8));
          blk[k].slot[p].valid = 1; blk[k].slot[p].ins = ins; blk[k].slot[p].prog = 3'(i);
          lpos[k * BLK_W + i] = p;
        end
        // in-block prior writes
        for (int i = 0; i < len; i++) begin
          automatic int p = lpos[k * BLK_W + i];
          for (int j = 0; j < i; j++) begin
            automatic instr_t w = blk[k].slot[lpos[k * BLK_W + j]].ins;
            if (has_dest(w)) begin
              if (w.rd == blk[k].slot[p].ins.rd)  blk[k].slot[p].pd++;
              if (w.rd == blk[k].slot[p].ins.rs1) blk[k].slot[p].p1++;
              if (w.rd == blk[k].slot[p].ins.rs2) blk[k].slot[p].p2++;
            end
          end
        end
        if (k < int'(nblk)) for (int i = 0; i < len; i++) ord.push_back(k * BLK_W + lpos[k * BLK_W + i]);
      end
      #1;
      chk(nins === 5'(ord.size()), "nins");
      for (int n = 0; n < ord.size(); n++) begin
        automatic int l = ord[n], k = ord[n] / BLK_W;
        automatic instr_t ins = blk[k].slot[l % BLK_W].ins;
        automatic int c1 = 0, c2 = 0, cd = 0;
        automatic logic [PCW-1:0] pc = blk[k].pc + PCW'(blk[k].slot[l % BLK_W].prog);
        automatic logic [PCW-1:0] pp;
        for (int j = 0; j < n; j++) begin
          automatic instr_t w = blk[ord[j] / BLK_W].slot[ord[j] % BLK_W].ins;
          if (has_dest(w)) begin
            if (w.rd == ins.rd) cd++;
            if (w.rd == ins.rs1) c1++;
            if (w.rd == ins.rs2) c2++;
          end
          if (ord[j] / BLK_W != k && has_dest(w) && (w.rd == ins.rs1 || w.rd == ins.rs2)) xblk++;
        end
        if (32'(blk[k].slot[l % BLK_W].prog) == 32'(blk[k].len) - 1)
          pp = (k + 1 < int'(nblk)) ? blk[k + 1].pc : next_pc;
        else pp = pc + 1'b1;
        chk(ren[l].valid && lane[l].u.valid, "valid");
        chk(ren[l].wr === has_dest(ins) && ren[l].rd === ins.rd && ren[l].rs1 === ins.rs1 &&
            ren[l].rs2 === ins.rs2, "ren fields");
        chk(ren[l].u1 === uses_rs1(ins) && ren[l].u2 === uses_rs2(ins), "uses");
        chk(int'(ren[l].pd) == cd && int'(ren[l].p1) == c1 && int'(ren[l].p2) == c2,
            $sformatf("priors lane %0d got %0d/%0d/%0d exp %0d/%0d/%0d", l, ren[l].pd, ren[l].p1, ren[l].p2, cd, c1, c2));
        chk(lane[l].u.ins === ins && lane[l].u.pc === pc && lane[l].u.pred_pc === pp, "lane pc");
        chk(int'(lane[l].ofs) == n, "ofs");
      end
      for (int l = 0; l < HOT_W; l++) begin
        automatic logic in = 0;
        foreach (ord[j]) if (ord[j] == l) in = 1;
        if (!in) chk(!ren[l].valid && !lane[l].u.valid, "unused lane valid");
      end
    end
    chk(xblk > 1000, "cross-block dependencies exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
