// tb_cold_pipe: self-checking test of the cold pipeline (1 wide, 4 stages:
// fetch, decode, rename/read, dispatch).
//
// How it works: a random program (with conditional branches, jumps and a
// few loops) is written into the pipeline's instruction memory through the
// load port. The test then acts as fetch control (fetching along the
// predicted path whenever fetch_ready), as the register file (random
// ren_ok, destination tags and source operands that are either values or
// tags of unfinished results) and as the crossbar (random out_done). It
// trains the branch predictor randomly through bp_* and keeps a model of its
// counters. Checked:
//  * the predicted successor at fetch matches the model (not-taken +1,
//    jumps to their target, conditional branches by counter);
//  * instructions come out in fetch order, with their address, instruction,
//    predicted successor, destination flag and the tag/operands the register
//    file gave in the rename cycle; a source still waiting while the
//    instruction sits in the dispatch stage picks up a matching writeback;
//  * with no stalls an instruction fetched in cycle t is offered in t+3;
//  * rename requests carry the instruction's registers; a flush empties the
//    pipeline and fetch restarts wherever fetch control says; empty is
//    high exactly when no stage holds an instruction.
// Prints TB_RESULT checks/failures; a watchdog ends a hung run.
module tb_cold_pipe;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0;
  logic flush, fetch_en, fetch_ready, im_we, bp_en, bp_taken, ren_fire, ren_ok, out_valid, out_done, empty;
  logic [PCW-1:0] fetch_pc, fetch_next_pc, im_addr, bp_pc;
  instr_t im_wdata;
  ren_t ren;
  tag_t ren_dtag;
  opnd_t ren_s1, ren_s2;
  wb_t [WB_N-1:0] wb_in;
  dlane_t out_lane;
  int checks = 0, failures = 0, n_out = 0, n_snoop = 0, n_taken = 0, n_lat = 0, n_flush = 0;

  cold_pipe dut (.*);
  always #5 clk = ~clk;
  initial begin #50000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("t=%0t %s", $time, what); end
  endtask

  localparam int PN = 512;
  instr_t prog [PN];
  logic [1:0] ctr [1024];
  // fetched, in order: address, predicted successor, fetch cycle
  logic [PCW-1:0] f_pc [$], f_pred [$];
  int f_cyc [$];
  // renamed, in order: tag and operands given, rename cycle
  tag_t r_tag [$];
  opnd_t r_s1 [$], r_s2 [$];
  int r_cyc [$];
  // writebacks sent: tag -> cycle and data
  int lg_cyc [$];
  tag_t lg_tag [$];
  logic [XLEN-1:0] lg_dat [$];
  int cyc = 0;
  logic hs_out, hs_ren, hs_f;
  logic [10:0] tcnt = 0;

  function automatic opnd_t exp_op(opnd_t o, int c0, int c1);
    if (!o.rdy)
      foreach (lg_cyc[k])
        if (lg_tag[k] == o.tag && lg_cyc[k] > c0 && lg_cyc[k] < c1) begin
          o.rdy = 1; o.data = lg_dat[k]; n_snoop++;
          break;
        end
    return o;
  endfunction

  initial begin
    for (int i = 0; i < 1024; i++) ctr[i] = 2'd1;
    {flush, fetch_en, im_we, bp_en, bp_taken, ren_ok, out_done} = 0;
    fetch_pc = 0; im_addr = 0; im_wdata = '0; bp_pc = 0; ren_dtag = 0; ren_s1 = '0; ren_s2 = '0; wb_in = '0;
    for (int i = 0; i < PN; i++) begin
      prog[i] = instr_t'({$urandom, $urandom});
      prog[i].cls = iclass_e'(($urandom % 5 == 0) ? C_BR : $urandom % 4);
      if (prog[i].cls == C_BR) begin
        prog[i].op = 3'($urandom % 4);
        prog[i].imm = 16'(int'($urandom % 64) - 32);
      end
    end
    repeat (2) @(posedge clk); rst_n = 1;
    // load the program
    for (int i = 0; i < PN; i++) begin
      @(negedge clk); im_we = 1; im_addr = PCW'(i); im_wdata = prog[i];
    end
    @(negedge clk); im_we = 0;
    for (cyc = 0; cyc < 20000; cyc++) begin
      automatic bit stall_free = (cyc % 400) < 100;
      @(negedge clk);
      chk(empty === (f_pc.size() == 0), "empty");
      fetch_en = stall_free || ($urandom % 4 != 0);
      ren_ok = stall_free || ($urandom % 4 != 0);
      ren_dtag = tag_t'(tcnt);
      ren_s1 = ($urandom % 2) ? '{rdy: 1'b1, tag: tag_t'($urandom), data: $urandom}
                              : '{rdy: 1'b0, tag: tag_t'(1024 + $urandom % 150), data: '0};
      ren_s2 = '{rdy: 1'b1, tag: '0, data: $urandom};
      out_done = stall_free || ($urandom % 3 == 0);
      bp_en = ($urandom % 2); bp_pc = PCW'($urandom % PN); bp_taken = ($urandom % 4 != 0);
      wb_in = '0;
      for (int b = 0; b < 3; b++) begin
        wb_in[b].valid = 1; wb_in[b].has_dest = 1;
        wb_in[b].tag = tag_t'(1024 + $urandom % 150); wb_in[b].data = $urandom;
        for (int j = 0; j < b; j++) if (wb_in[j].tag == wb_in[b].tag) wb_in[b].tag = tag_t'(2047 - b);
      end
      flush = ($urandom % 300 == 0);
      #1;
      // fetch stage prediction
      if (fetch_en && fetch_ready && !flush) begin
        automatic instr_t i = prog[fetch_pc[8:0]];
        automatic logic [PCW-1:0] e = fetch_pc + 1'b1;
        if (i.cls == C_BR && (!is_cond_br(i) || ctr[fetch_pc[9:0]][1])) e = br_target(i, fetch_pc);
        chk(fetch_next_pc === e, "prediction");
        if (e != fetch_pc + 1'b1) n_taken++;
      end
      // dispatch stage
      if (out_valid) begin
        chk(f_pc.size() > 0 && r_tag.size() > 0, "output without fetch");
        if (f_pc.size() > 0 && r_tag.size() > 0) begin
          automatic instr_t i = prog[f_pc[0][8:0]];
          automatic opnd_t e1 = exp_op(r_s1[0], r_cyc[0], cyc);
          chk(out_lane.u.valid && out_lane.u.pc === f_pc[0] && out_lane.u.ins === i &&
              out_lane.u.pred_pc === f_pred[0] && out_lane.u.has_dest === has_dest(i), $sformatf("instruction pc %0d/%0d pred %0d/%0d ins %h/%h", out_lane.u.pc, f_pc[0], out_lane.u.pred_pc, f_pred[0], out_lane.u.ins, i));
          chk(out_lane.u.dtag === r_tag[0], "dest tag");
          chk(out_lane.u.s1.rdy === e1.rdy && out_lane.u.s1.tag === e1.tag && (!e1.rdy || out_lane.u.s1.data === e1.data), "src1");
          chk(out_lane.u.s2 === r_s2[0], "src2");
          if (stall_free && cyc - f_cyc[0] == 3) n_lat++;
          if (stall_free && f_cyc[0] >= cyc - 100 && (cyc % 400) > 5) chk(cyc - f_cyc[0] == 3, $sformatf("latency %0d", cyc - f_cyc[0]));
        end
      end
      hs_out = out_valid && out_done; hs_ren = ren_fire; hs_f = fetch_en && fetch_ready;
      @(posedge clk);
      #1;
      // model updates (after the edge, so no input changes with it)
      for (int b = 0; b < 3; b++) begin
        lg_cyc.push_back(cyc); lg_tag.push_back(wb_in[b].tag); lg_dat.push_back(wb_in[b].data);
      end
      while (lg_cyc.size() > 0 && (r_cyc.size() == 0 || lg_cyc[0] < r_cyc[0])) begin
        void'(lg_cyc.pop_front()); void'(lg_tag.pop_front()); void'(lg_dat.pop_front());
      end
      if (flush) begin
        n_flush++;
        f_pc.delete(); f_pred.delete(); f_cyc.delete(); r_tag.delete(); r_s1.delete(); r_s2.delete(); r_cyc.delete();
        fetch_pc = PCW'($urandom % PN);
      end else begin
        if (hs_out && f_pc.size() > 0) begin
          n_out++;
          void'(f_pc.pop_front()); void'(f_pred.pop_front()); void'(f_cyc.pop_front());
          void'(r_tag.pop_front()); void'(r_s1.pop_front()); void'(r_s2.pop_front()); void'(r_cyc.pop_front());
        end
        if (hs_ren) begin
          r_tag.push_back(ren_dtag); r_s1.push_back(ren_s1); r_s2.push_back(ren_s2); r_cyc.push_back(cyc);
          tcnt++;
        end
        if (hs_f) begin
          f_pc.push_back(fetch_pc); f_pred.push_back(fetch_next_pc); f_cyc.push_back(cyc);
          fetch_pc = fetch_next_pc % PCW'(PN);
        end
      end
      if (bp_en) begin
        if (bp_taken && ctr[bp_pc[9:0]] != 3) ctr[bp_pc[9:0]]++;
        else if (!bp_taken && ctr[bp_pc[9:0]] != 0) ctr[bp_pc[9:0]]--;
      end
    end
    chk(n_out > 3000 && n_snoop > 100 && n_taken > 300 && n_lat > 500 && n_flush > 20, "mechanisms exercised");
    $display("out=%0d snoop=%0d taken=%0d lat3=%0d flush=%0d", n_out, n_snoop, n_taken, n_lat, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
