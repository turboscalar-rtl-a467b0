// tb_rob: self-checking test of the reorder buffer and in-order completion.
//
// How it works: the test allocates random groups (hot groups of 1..24, or a
// single cold-pipeline instruction) whenever there is room, finishes
// allocated instructions in random order on random writeback lanes (branches
// with random direction and now and then a misprediction), and drives the
// back-end ready flag randomly. A queue model holds every entry in program
// order and predicts, each cycle: how many instructions complete (done ones
// from the head, at most one cold one and only if the back-end is ready,
// stopping after a mispredicted branch or a HALT), the commit lanes and
// registers, the hot completion count, the flush with its redirect address,
// trace invalidation for a hot mispredict, predictor training for cold
// conditional branches, the back-end offer (oldest cold instruction in the
// completion window) and the break pulse. Free count, tail and head are
// checked too. The run ends with a HALT, after which nothing completes.
// Prints TB_RESULT checks/failures; a watchdog ends a hung run.
module tb_rob;
  import ts_pkg::*;
  localparam int CW = HOT_W;
  logic clk = 0, rst_n = 0;
  logic alloc_en, alloc_cold, flush, ti_en, bp_en, bp_taken, bk_offer, bk_valid, bk_ready, bk_break, halted;
  logic [4:0] alloc_n;
  dlane_t [NLANE-1:0] alloc_lane;
  logic [TTW-1:0] alloc_tt, ti_idx;
  logic [ROBW:0] free;
  logic [ROBW-1:0] tail, head;
  wb_t [WB_N-1:0] wb_in;
  logic [CW-1:0] cm_valid;
  logic [CW-1:0][REGW-1:0] cm_rd;
  logic [5:0] cm_n, cm_hot_n;
  logic [PCW-1:0] redirect_pc, bp_pc, bk_pc, bk_next_pc;
  instr_t bk_ins;
  int checks = 0, failures = 0, n_flush = 0, n_cm = 0, n_cold = 0, n_wide = 0;

  typedef struct {
    bit cold; logic [TTW-1:0] tt; logic [PCW-1:0] pc; instr_t ins;
    bit done, mis, tk; logic [PCW-1:0] npc;
  } ent_t;
  ent_t q [$];
  int mhead = 0;
  bit mhalt = 0;

  rob dut (.*);
  always #5 clk = ~clk;
  initial begin #50000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("t=%0t %s", $time, what); end
  endtask

  initial begin
    alloc_en = 0; alloc_n = 0; alloc_lane = '0; alloc_cold = 0; alloc_tt = 0; wb_in = '0; bk_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      automatic int n, ecm = 0, ehot = 0, off = -1;
      automatic bit had_cold = 0, stop = mhalt, eflush = 0, ehalt = 0, ebrk = 0, ebk = 0, ebp = 0;
      automatic logic [PCW-1:0] eredir = 0;
      automatic bit eti = 0;
      automatic logic [TTW-1:0] etti = 0;
      automatic logic [CW-1:0] ecv = '0;
      @(negedge clk);
      // allocation
      alloc_en = 0; alloc_lane = '0;
      n = ($urandom % 3 == 0) ? 1 : 1 + int'($urandom % 24);
      alloc_cold = (n == 1) && ($urandom % 2 == 0);
      alloc_tt = TTW'($urandom);
      if (cyc < 5900 && 256 - q.size() >= n && $urandom % 3 != 0) begin
        alloc_en = 1; alloc_n = 5'(n);
        for (int l = 0; l < n; l++) begin
          automatic int ln = alloc_cold ? COLD_LANE : l;
          alloc_lane[ln].u.valid = 1; alloc_lane[ln].ofs = 5'(l);
          alloc_lane[ln].u.pc = PCW'($urandom);
          alloc_lane[ln].u.ins = instr_t'({$urandom, $urandom});
          alloc_lane[ln].u.ins.cls = iclass_e'($urandom % 5);
          if (alloc_lane[ln].u.ins.cls == C_BR) alloc_lane[ln].u.ins.op = 3'($urandom % 4);
          if (cyc == 5850 && l == 0) begin alloc_lane[ln].u.ins.cls = C_BR; alloc_lane[ln].u.ins.op = BR_HALT; end
        end
      end
      // writebacks: finish random allocated entries
      wb_in = '0;
      for (int b = 0; b < WB_N; b++)
        if (q.size() > 0 && $urandom % 2 == 0) begin
          automatic int p = $urandom % q.size();
          if (!q[p].done) begin
            wb_in[b].valid = 1; wb_in[b].rob = ROBW'(mhead + p);
            for (int j = 0; j < b; j++) if (wb_in[j].valid && wb_in[j].rob == wb_in[b].rob) wb_in[b].valid = 0;
            if (q[p].ins.cls == C_BR) begin
              wb_in[b].is_br = 1; wb_in[b].taken = 1'($urandom);
              wb_in[b].mispred = ($urandom % 40 == 0); wb_in[b].next_pc = PCW'($urandom);
            end
          end
        end
      bk_ready = ($urandom % 4 != 0);
      // expected completion
      for (int k = 0; k < CW && k < q.size(); k++) if (q[k].cold) begin off = k; break; end
      for (int k = 0; k < CW; k++) begin
        if (!stop && k < q.size() && q[k].done && !(q[k].cold && (had_cold || !bk_ready))) begin
          ecm++;
          if (has_dest(q[k].ins)) ecv[k] = 1;
          if (q[k].cold) begin had_cold = 1; ebk = 1; ebp = is_cond_br(q[k].ins); end
          else begin ehot++; ebrk = 1; end
          if (q[k].ins.cls == C_BR && q[k].mis) begin eflush = 1; ebrk = 1; eredir = q[k].npc; stop = 1;
            eti = !q[k].cold; etti = q[k].tt; end
          if (q[k].ins.cls == C_BR && q[k].ins.op == BR_HALT) begin stop = 1; ehalt = 1; end
        end else stop = 1;
      end
      #1;
      chk(free === (ROBW+1)'(256 - q.size()) && head === ROBW'(mhead) && tail === ROBW'(mhead + q.size()), "free/head/tail");
      chk(cm_n === 6'(ecm) && cm_hot_n === 6'(ehot), $sformatf("cm_n got %0d exp %0d", cm_n, ecm));
      chk(cm_valid === ecv, "cm_valid");
      for (int k = 0; k < CW; k++) if (ecv[k]) chk(cm_rd[k] === q[k].ins.rd, "cm_rd");
      chk(ti_en === eti && (!eti || ti_idx === etti), "trace invalidate");
      chk(flush === eflush && (!eflush || redirect_pc === eredir), "flush");
      chk(bk_valid === ebk && bk_break === ebrk && bp_en === ebp, "backend/predictor");
      chk(bk_offer === (off >= 0), "bk_offer");
      if (off >= 0) chk(bk_pc === q[off].pc && bk_ins === q[off].ins && bk_next_pc === q[off].npc, "bk fields");
      n_cm += ecm; n_cold += ebk; n_flush += eflush; if (ecm > 6) n_wide++;
      @(posedge clk);
      // model update (completion before writeback; allocation last)
      repeat (ecm) begin void'(q.pop_front()); mhead = (mhead + 1) % 256; end
      if (ehalt) mhalt = 1;
      if (eflush) begin q.delete(); mhead = 0; end
      else begin
        for (int b = 0; b < WB_N; b++) if (wb_in[b].valid) begin
          automatic int p = (int'(wb_in[b].rob) - mhead + 256) % 256;
          q[p].done = 1;
          if (wb_in[b].is_br) begin q[p].mis = wb_in[b].mispred; q[p].tk = wb_in[b].taken; q[p].npc = wb_in[b].next_pc; end
        end
        if (alloc_en)
          for (int l = 0; l < n; l++) begin
            automatic dlane_t d = alloc_lane[alloc_cold ? COLD_LANE : l];
            automatic ent_t e;
            e.cold = alloc_cold; e.tt = alloc_tt; e.pc = d.u.pc; e.ins = d.u.ins;
            e.done = 0; e.mis = 0; e.tk = 0; e.npc = d.u.pc + 1'b1;
            q.push_back(e);
          end
      end
    end
    chk(mhalt && halted, "halt");
    chk(n_flush > 20 && n_cold > 200 && n_wide > 50, "mechanisms exercised");
    $display("completed=%0d cold=%0d flushes=%0d wide=%0d", n_cm, n_cold, n_flush, n_wide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
