// rob: reorder buffer and in-order completion.
//
// Every dispatched instruction, from either pipeline, takes an entry in
// program order; results arriving on the writeback lanes mark entries done,
// and branch results record their resolved successor and whether it was
// mispredicted. Up to CW done instructions complete per cycle from the head.
//
// Completion drives three consumers:
//  * the silo register file, which makes the completed versions the
//    committed ones (cm_valid / cm_rd, one lane per completing instruction
//    that writes a register);
//  * the optimizing back-end, which receives each completed cold-pipeline
//    instruction (one per cycle, when bk_ready) to build blocks and traces,
//    and a bk_break pulse whenever the completed stream leaves the cold
//    pipeline (a hot instruction completes, or a misprediction flushes);
//    bk_offer says the oldest cold instruction in the completion window is
//    shown on bk_pc / bk_ins / bk_next_pc (done or not yet);
//  * the cold pipeline's branch predictor (bp_*), trained by completed cold
//    branches.
// A mispredicted branch completes and then raises flush for one cycle with
// the correct successor on redirect_pc: every younger instruction in the
// machine is dropped (recovery at completion). If the branch came from the
// hot pipeline its trace is invalidated (ti_*). A HALT instruction stops
// completion and raises halted.
// The description assumes an unbounded reorder buffer; its 256 entries,
// 24-wide completion and recovery at completion are choices of this design.
module rob
  import ts_pkg::*;
#(
  parameter int CW = HOT_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // allocation
  input  logic                   alloc_en,
  input  logic [4:0]             alloc_n,
  input  dlane_t [NLANE-1:0]     alloc_lane,
  input  logic                   alloc_cold,
  input  logic [TTW-1:0]         alloc_tt,
  output logic [ROBW:0]          free,
  output logic [ROBW-1:0]        tail,
  output logic [ROBW-1:0]        head,
  // results
  input  wb_t [WB_N-1:0]         wb_in,
  // completion
  output logic [CW-1:0]          cm_valid,
  output logic [CW-1:0][REGW-1:0] cm_rd,
  output logic [5:0]             cm_n,
  output logic [5:0]             cm_hot_n,
  output logic                   flush,
  output logic [PCW-1:0]         redirect_pc,
  output logic                   ti_en,
  output logic [TTW-1:0]         ti_idx,
  output logic                   bp_en,
  output logic [PCW-1:0]         bp_pc,
  output logic                   bp_taken,
  output logic                   bk_offer,
  output logic                   bk_valid,
  output logic [PCW-1:0]         bk_pc,
  output instr_t                 bk_ins,
  output logic [PCW-1:0]         bk_next_pc,
  input  logic                   bk_ready,
  output logic                   bk_break,
  output logic                   halted
);
  typedef struct packed {
    logic             cold;
    logic [TTW-1:0]   tt;
    logic [PCW-1:0]   pc;
    instr_t           ins;
    logic             mispred;
    logic             taken;
    logic [PCW-1:0]   next_pc;
  } rob_e;

  rob_e            ent [ROB_N];
  logic [ROB_N-1:0] done;
  logic [ROBW:0]   count;
  logic            halted_q;
  logic [ROBW-1:0] head_d;
  logic            stop;

  assign free   = (ROBW+1)'(ROB_N) - count;
  assign halted = halted_q;

  // the oldest cold-pipeline instruction among the next CW entries is the
  // one offered to the back-end (its ready decides whether it completes)
  always_comb begin
    automatic logic found = 1'b0;
    bk_offer   = 1'b0;
    bk_pc      = '0;
    bk_ins     = '0;
    bk_next_pc = '0;
    for (int k = 0; k < CW; k++) begin
      automatic logic [ROBW-1:0] i = head + ROBW'(k);
      if (!found && (ROBW+1)'(k) < count && ent[i].cold) begin
        found      = 1'b1;
        bk_offer   = 1'b1;
        bk_pc      = ent[i].pc;
        bk_ins     = ent[i].ins;
        bk_next_pc = ent[i].next_pc;
      end
    end
  end

  always_comb begin
    automatic logic had_cold = 1'b0;
    stop        = halted_q;
    cm_valid    = '0;
    cm_rd       = '0;
    cm_n        = '0;
    cm_hot_n    = '0;
    flush       = 1'b0;
    redirect_pc = '0;
    ti_en       = 1'b0;
    ti_idx      = '0;
    bp_en       = 1'b0;
    bp_pc       = '0;
    bp_taken    = 1'b0;
    bk_valid    = 1'b0;
    bk_break    = 1'b0;
    for (int k = 0; k < CW; k++) begin
      automatic logic [ROBW-1:0] i = head + ROBW'(k);
      automatic rob_e e = ent[i];
      if (!stop && (ROBW+1)'(k) < count && done[i] && !(e.cold && (had_cold || !bk_ready))) begin
        cm_n = cm_n + 6'd1;
        if (has_dest(e.ins)) begin
          cm_valid[k] = 1'b1;
          cm_rd[k]    = e.ins.rd;
        end
        if (e.cold) begin
          had_cold   = 1'b1;
          bk_valid   = 1'b1;
          if (is_cond_br(e.ins)) begin
            bp_en    = 1'b1;
            bp_pc    = e.pc;
            bp_taken = e.taken;
          end
        end else begin
          cm_hot_n = cm_hot_n + 6'd1;
          bk_break = 1'b1;
        end
        if (e.ins.cls == C_BR && e.mispred) begin
          flush       = 1'b1;
          bk_break    = 1'b1;
          redirect_pc = e.next_pc;
          ti_en       = !e.cold;
          ti_idx      = e.tt;
          stop        = 1'b1;
        end
        if (e.ins.cls == C_BR && e.ins.op == BR_HALT) stop = 1'b1;
      end else stop = 1'b1;
    end
    head_d = head + ROBW'(cm_n);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      head     <= '0;
      tail     <= '0;
      count    <= '0;
      halted_q <= 1'b0;
      done     <= '0;
    end else begin
      for (int k = 0; k < CW; k++)
        if (k < int'(cm_n)) begin
          automatic logic [ROBW-1:0] i = head + ROBW'(k);
          if (ent[i].ins.cls == C_BR && ent[i].ins.op == BR_HALT) halted_q <= 1'b1;
        end
      if (flush) begin
        head  <= '0;
        tail  <= '0;
        count <= '0;
        done  <= '0;
      end else begin
        for (int b = 0; b < WB_N; b++)
          if (wb_in[b].valid) done[wb_in[b].rob] <= 1'b1;
        if (alloc_en)
          for (int l = 0; l < NLANE; l++)
            if (alloc_lane[l].u.valid) done[tail + ROBW'(alloc_lane[l].ofs)] <= 1'b0;
        head  <= head_d;
        tail  <= alloc_en ? tail + ROBW'(alloc_n) : tail;
        count <= count + (alloc_en ? (ROBW+1)'(alloc_n) : '0) - (ROBW+1)'(cm_n);
      end
    end

  always_ff @(posedge clk) begin
    for (int b = 0; b < WB_N; b++)
      if (wb_in[b].valid && wb_in[b].is_br) begin
        ent[wb_in[b].rob].mispred <= wb_in[b].mispred;
        ent[wb_in[b].rob].taken   <= wb_in[b].taken;
        ent[wb_in[b].rob].next_pc <= wb_in[b].next_pc;
      end
    if (alloc_en)
      for (int l = 0; l < NLANE; l++)
        if (alloc_lane[l].u.valid) begin
          automatic logic [ROBW-1:0] i = tail + ROBW'(alloc_lane[l].ofs);
          ent[i].cold    <= alloc_cold;
          ent[i].tt      <= alloc_tt;
          ent[i].pc      <= alloc_lane[l].u.pc;
          ent[i].ins     <= alloc_lane[l].u.ins;
          ent[i].mispred <= 1'b0;
          ent[i].taken   <= 1'b0;
          ent[i].next_pc <= alloc_lane[l].u.pc + 1'b1;
        end
  end

  always_ff @(posedge clk)
    if (rst_n && alloc_en)
      assert (free >= (ROBW+1)'(alloc_n)) else $error("rob: allocation overflows");
endmodule
