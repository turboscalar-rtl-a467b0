// tb_backend: self-checking test of the optimizing back-end (block and
// trace builder).
//
// How it works: the test plays the completion side. It generates a stream
// of cold-pipeline instructions in program order (random classes and
// registers, branches with random outcomes, a jump to a new address after
// every break), shows the next one with in_offer, and hands it over
// (in_valid) only when in_ready is high and a random gate allows. Break
// pulses are random. The checks compare what is written out with what was
// handed over, rather than re-running the algorithm:
//  * every block holds exactly the instructions handed over since the
//    previous block, in order, each on a dispatch position that accepts its
//    class, with prog = its order, addresses consecutive from the block's
//    start, and the right in-block prior-write counts for rd, rs1, rs2;
//  * a block ends only at a branch, at six instructions, at a break, or when
//    the offered instruction has no free position or does not follow on;
//  * every trace lists the start addresses of the blocks written since the
//    previous trace, in order, has four blocks unless a break closed it, and
//    its successor is the successor of its last instruction.
// Prints TB_RESULT checks/failures; a watchdog ends a hung run.
module tb_backend;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_offer, in_valid, in_ready, brk, bw_en, tw_en;
  logic [PCW-1:0] in_pc, in_next_pc;
  instr_t in_ins;
  block_t bw_blk;
  trace_t tw_tr;
  int checks = 0, failures = 0, n_blk = 0, n_tr = 0, n_conf = 0, n_br = 0, n_six = 0, n_brk = 0;

  backend dut (.*);
  always #5 clk = ~clk;
  initial begin #50000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("t=%0t %s", $time, what); end
  endtask

  logic [PCW-1:0] s_pc, s_npc;
  int gen_k = 0;
  instr_t s_ins;
  task automatic new_ins(input logic [PCW-1:0] pc);
    s_pc = pc;
    s_ins = instr_t'({$urandom, $urandom});
    s_ins.rd = REGW'($urandom % 5); s_ins.rs1 = REGW'($urandom % 5); s_ins.rs2 = REGW'($urandom % 5);
    s_ins.cls = iclass_e'(($urandom % 6 == 0) ? C_BR : ($urandom % 5));
    // some stretches follow the slot layout, so full six-instruction blocks occur
    if (($time / 10000) % 3 == 0) begin
      do s_ins.cls = iclass_e'($urandom % 5); while (!pos_mask(gen_k % BLK_W)[s_ins.cls]);
      gen_k++;
    end
    if (s_ins.cls == C_BR) s_ins.op = 3'($urandom % 4);
    s_npc = (s_ins.cls == C_BR && $urandom % 2 == 0) ? PCW'($urandom % 4000) : pc + 1'b1;
  endtask

  // handed over, not yet in a written block
  logic [PCW-1:0] p_pc [$], p_npc [$];
  instr_t p_ins [$];
  logic [PCW-1:0] t_bpc [$], t_last_npc;
  logic brk_q = 0;

  initial begin
    in_offer = 0; in_valid = 0; brk = 0;
    new_ins(PCW'(100));
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      automatic logic acc;
      @(negedge clk);
      in_offer = ($urandom % 6 != 0);
      in_pc = s_pc; in_ins = s_ins; in_next_pc = s_npc;
      brk = ($urandom % 25 == 0);
      #1;
      in_valid = in_offer && in_ready && ($urandom % 4 != 0);
      acc = in_valid;
      #1;
      if (acc) begin p_pc.push_back(s_pc); p_ins.push_back(s_ins); p_npc.push_back(s_npc); end
      if (bw_en) begin
        automatic int len = int'(bw_blk.len);
        automatic logic [BLK_W-1:0] seen = '0;
        n_blk++;
        chk(bw_blk.valid && len >= 1 && len <= BLK_W && len == p_pc.size(),
            $sformatf("block length %0d handed %0d", len, p_pc.size()));
        chk(bw_blk.pc === p_pc[0], "block start");
        for (int p = 0; p < BLK_W; p++) if (bw_blk.slot[p].valid) begin
          automatic int i = int'(bw_blk.slot[p].prog);
          automatic int c1 = 0, c2 = 0, cd = 0;
          chk(i < len && !seen[i], "prog order unique");
          seen[i] = 1;
          if (i < p_ins.size()) begin
            chk(bw_blk.slot[p].ins === p_ins[i] && p_pc[i] === bw_blk.pc + PCW'(i), "slot contents");
            chk(pos_mask(p)[bw_blk.slot[p].ins.cls], "slot class");
            for (int j = 0; j < i; j++) if (has_dest(p_ins[j])) begin
              if (p_ins[j].rd == p_ins[i].rd) cd++;
              if (p_ins[j].rd == p_ins[i].rs1) c1++;
              if (p_ins[j].rd == p_ins[i].rs2) c2++;
            end
            chk(int'(bw_blk.slot[p].pd) == cd && int'(bw_blk.slot[p].p1) == c1 && int'(bw_blk.slot[p].p2) == c2, "priors");
          end
        end
        chk(seen == BLK_W'((1 << len) - 1), "all instructions placed");
        // why the block ended
        if (len == BLK_W) n_six++;
        if (p_ins[p_ins.size() - 1].cls == C_BR) n_br++;
        else if (len == BLK_W) ;
        else if (brk_q) n_brk++;
        else begin
          automatic bit fits = 0;
          for (int p = 0; p < BLK_W; p++) if (!bw_blk.slot[p].valid && pos_mask(p)[in_ins.cls]) fits = 1;
          chk(in_offer && (!fits || in_pc != bw_blk.pc + PCW'(len)), "block closed without reason");
          n_conf++;
        end
        t_bpc.push_back(bw_blk.pc); t_last_npc = p_npc[p_npc.size() - 1];
        p_pc.delete(); p_ins.delete(); p_npc.delete();
      end
      if (tw_en) begin
        n_tr++;
        chk(int'(tw_tr.nblk) == t_bpc.size() && (tw_tr.nblk == 3'(NBLK) || brk_q), "trace size");
        for (int k = 0; k < t_bpc.size() && k < NBLK; k++) chk(tw_tr.bpc[k] === t_bpc[k], "trace blocks");
        chk(tw_tr.pc === t_bpc[0] && tw_tr.next_pc === t_last_npc, "trace start/successor");
        t_bpc.delete();
      end
      if (acc) new_ins(s_npc);
      if (brk) new_ins(PCW'($urandom % 4000));
      @(posedge clk);
      brk_q = brk;
    end
    chk(n_br > 100 && n_six > 20 && n_brk > 100 && n_conf > 50 && n_tr > 200, "mechanisms exercised");
    $display("blocks=%0d traces=%0d ends: branch=%0d six=%0d break=%0d conflict=%0d", n_blk, n_tr, n_br, n_six, n_brk, n_conf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
