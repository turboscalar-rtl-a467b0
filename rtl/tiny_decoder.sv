// tiny_decoder: the small decode step of the hot pipeline.
//
// The four blocks of a fetched trace arrive already decoded, aligned to their
// dispatch positions and with in-block dependency information: for each
// source and destination, the number of earlier writes to the same register
// inside the block. This unit expands that into what the register file and
// the dispatch crossbar need for the whole 24-instruction group:
//  * group-wide "prior writes" counts, by adding the writes of the earlier
//    blocks of the trace to the in-block counts (the silo register file turns
//    them into rename tags);
//  * each instruction's address (block start + program position) and its
//    reorder-buffer offset (instructions of earlier blocks + program position);
//  * the predicted successor of each block's last instruction, which is the
//    next block of the trace or, for the last block, the trace's successor.
// Purely combinational. Counting writes across blocks at this point is a
// choice of this design: the description only says the blocks hold the
// dependency results and that a tiny decoder expands compressed predecode bits.
module tiny_decoder
  import ts_pkg::*;
(
  input  block_t [NBLK-1:0]    blk,
  input  logic [2:0]           nblk,
  input  logic [PCW-1:0]       next_pc,
  output ren_t [HOT_W-1:0]     ren,
  output dlane_t [HOT_W-1:0]   lane,
  output logic [4:0]           nins
);
  always_comb begin
    logic [4:0] base;
    base = '0;
    for (int k = 0; k < NBLK; k++) begin
      for (int p = 0; p < BLK_W; p++) begin
        automatic int     l  = k * BLK_W + p;
        automatic bslot_t s  = blk[k].slot[p];
        automatic logic   v  = (3'(k) < nblk) && s.valid;
        automatic logic [GPRW-1:0] c1 = '0, c2 = '0, cd = '0;
        // writes by the earlier blocks of the group
        for (int j = 0; j < k; j++)
          for (int q = 0; q < BLK_W; q++)
            if ((3'(j) < nblk) && blk[j].slot[q].valid && has_dest(blk[j].slot[q].ins)) begin
              if (blk[j].slot[q].ins.rd == s.ins.rs1) c1 = c1 + 1'b1;
              if (blk[j].slot[q].ins.rd == s.ins.rs2) c2 = c2 + 1'b1;
              if (blk[j].slot[q].ins.rd == s.ins.rd)  cd = cd + 1'b1;
            end
        ren[l].valid = v;
        ren[l].wr    = v && has_dest(s.ins);
        ren[l].rd    = s.ins.rd;
        ren[l].pd    = cd + GPRW'(s.pd);
        ren[l].u1    = uses_rs1(s.ins);
        ren[l].u2    = uses_rs2(s.ins);
        ren[l].rs1   = s.ins.rs1;
        ren[l].rs2   = s.ins.rs2;
        ren[l].p1    = c1 + GPRW'(s.p1);
        ren[l].p2    = c2 + GPRW'(s.p2);

        lane[l]            = '0;
        lane[l].u.valid    = v;
        lane[l].u.ins      = s.ins;
        lane[l].u.pc       = blk[k].pc + PCW'(s.prog);
        lane[l].u.has_dest = has_dest(s.ins);
        if (3'(s.prog) == blk[k].len - 3'd1)
          lane[l].u.pred_pc = (3'(k + 1) < nblk) ? blk[(k + 1) % NBLK].pc : next_pc;
        else
          lane[l].u.pred_pc = lane[l].u.pc + 1'b1;
        lane[l].ofs = base + 5'(s.prog);
      end
      if (3'(k) < nblk) base = base + 5'(blk[k].len);
    end
    nins = base;
  end
endmodule
