// backend: the optimizing back-end - turns completed cold-pipeline
// instructions into blocks and traces for the dynamic instruction cache.
//
// Completed instructions arrive in program order, one per cycle. The
// back-end
//  * collects them into blocks of straight-line code: a block ends at a
//    branch, at six instructions, when the next instruction's class has no
//    free dispatch position left in the block, or when the next instruction
//    does not follow on in address;
//  * aligns each instruction to a dispatch position reserved for its class
//    (ts_pkg::pos_mask: 3 simple-integer, 3 load/store, 1 complex-integer,
//    1 floating-point and 1 branch slot over six positions), keeping its
//    program-order position alongside;
//  * does the dependency check and early renaming: for every source and the
//    destination it records how many earlier instructions of the block write
//    the same register, from which the silo register file forms the rename
//    tags (virtual tags) at fetch;
//  * builds traces of up to four consecutive blocks and records the address
//    that followed the last one (the branch outcomes seen at completion are
//    the trace's prediction).
// Finished blocks are written to all block-cache copies (bw_*), finished
// traces to the trace table (tw_*). A break (the completed stream left the
// cold pipeline, or a flush) closes the open block and the open trace in the
// following cycle. The instruction next in line is shown on in_pc / in_ins
// with in_offer before it completes; when it cannot join the open block the
// back-end closes that block first and keeps in_ready low for that cycle,
// then takes it (in_valid) in a later cycle.
// Block and trace construction follow the block-based trace cache the design
// builds on; the trace-selection predictor (a tree-structured multiple-branch
// predictor) is replaced by "the path last seen", a choice of this design.
module backend
  import ts_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_offer,
  input  logic              in_valid,
  input  logic [PCW-1:0]    in_pc,
  input  instr_t            in_ins,
  input  logic [PCW-1:0]    in_next_pc,
  output logic              in_ready,
  input  logic              brk,
  output logic              bw_en,
  output block_t            bw_blk,
  output logic              tw_en,
  output trace_t            tw_tr
);
  block_t                cur, cur_d;
  logic [NBLK-1:0][PCW-1:0] tbpc, tbpc_d;
  logic [2:0]            tn, tn_d;
  logic [PCW-1:0]        tsucc, tsucc_d;   // successor of the last closed block
  logic                  brk_pend;
  int                    free_pos;
  logic                  must_close;

  // the first free dispatch position that takes the offered instruction's
  // class, and whether the open block must be closed before it can go in;
  // neither depends on in_valid, so in_ready can steer completion
  always_comb begin
    free_pos = -1;
    for (int p = BLK_W - 1; p >= 0; p--)
      if (!(cur.valid && cur.slot[p].valid) && pos_mask(p)[in_ins.cls]) free_pos = p;
    must_close = cur.valid && (free_pos < 0 || in_pc != cur.pc + PCW'(cur.len));
    in_ready   = !brk_pend && !must_close;
  end

  always_comb begin
    automatic int  pos = -1;
    automatic logic close_first;
    automatic logic [PRW-1:0] c1 = '0, c2 = '0, cd = '0;
    automatic logic close_blk = 1'b0;
    automatic logic [PCW-1:0] succ = '0;
    cur_d    = cur;
    tbpc_d   = tbpc;
    tn_d     = tn;
    tsucc_d  = tsucc;
    bw_en    = 1'b0;
    bw_blk   = cur;
    tw_en    = 1'b0;
    tw_tr    = '0;

    pos         = free_pos;
    close_first = must_close;

    if (brk_pend) begin
      if (cur.valid) begin
        close_blk = 1'b1;
        succ      = cur.pc + PCW'(cur.len);
      end
    end else if (in_offer && close_first) begin
      close_blk = 1'b1;
      succ      = in_pc;
    end else if (in_valid) begin
      begin
        for (int p = 0; p < BLK_W; p++)
          if (cur.valid && cur.slot[p].valid && has_dest(cur.slot[p].ins)) begin
            if (cur.slot[p].ins.rd == in_ins.rs1) c1 = c1 + 1'b1;
            if (cur.slot[p].ins.rd == in_ins.rs2) c2 = c2 + 1'b1;
            if (cur.slot[p].ins.rd == in_ins.rd)  cd = cd + 1'b1;
          end
        if (!cur.valid) begin
          cur_d       = '0;
          cur_d.valid = 1'b1;
          cur_d.pc    = in_pc;
        end
        if (pos >= 0) cur_d.slot[pos] = '{valid: 1'b1, ins: in_ins, prog: cur_d.len,
                            p1: c1, p2: c2, pd: cd};
        cur_d.len = cur_d.len + 3'd1;
        if (in_ins.cls == C_BR || cur_d.len == 3'(BLK_W)) begin
          close_blk = 1'b1;
          succ      = in_next_pc;
        end
      end
    end

    if (close_blk) begin
      bw_en   = 1'b1;
      bw_blk  = cur_d;
      cur_d   = '0;
      tbpc_d[tn] = bw_blk.pc;
      tn_d    = tn + 3'd1;
      tsucc_d = succ;
    end

    // a trace is written when it has four blocks, or at a break
    if (tn_d == 3'(NBLK) || (brk_pend && tn_d != '0)) begin
      tw_en         = 1'b1;
      tw_tr.valid   = 1'b1;
      tw_tr.pc      = tbpc_d[0];
      tw_tr.nblk    = tn_d;
      tw_tr.bpc     = tbpc_d;
      tw_tr.next_pc = tsucc_d;
      tn_d          = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cur      <= '0;
      tbpc     <= '0;
      tn       <= '0;
      tsucc    <= '0;
      brk_pend <= 1'b0;
    end else begin
      cur      <= cur_d;
      tbpc     <= tbpc_d;
      tn       <= tn_d;
      tsucc    <= tsucc_d;
      brk_pend <= brk;
    end
endmodule
