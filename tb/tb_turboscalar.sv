// tb_turboscalar: end-to-end test of the whole core at its default sizes.
//
// Loads a small program of two loops - an array sum with loads, stores,
// multiply, FP-unit add and a data-dependent branch that alternates every
// iteration, then a straight-line loop with more FP-unit and complex
// instructions per trace than can be dispatched in one cycle - runs it to HALT and compares every architected register and the
// stored array with an instruction-level reference model in this testbench.
// It also counts how often each mechanism of the design happened: cold and
// hot fetch, hand-offs in both directions, misprediction flushes, groups
// dispatched over several cycles, blocks and traces built, instructions
// completed from the hot pipeline; a mechanism that never happened is a
// failure. The iteration count can be raised with +iters=N.
module tb_turboscalar;
  import ts_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic im_we = 1'b0, dm_we = 1'b0;
  logic [PCW-1:0] im_addr = '0, dm_addr = '0;
  instr_t im_wdata = '0;
  logic [XLEN-1:0] dm_wdata = '0, dm_rdata, dbg_data;
  logic [REGW-1:0] dbg_reg = '0;
  logic halted, hot_mode;
  logic [5:0] ev_commit, ev_commit_hot;
  logic ev_flush, ev_to_hot, ev_to_cold, ev_hot_fetch, ev_cold_fetch, ev_disp_stall,
        ev_silo_stall, ev_block_built, ev_trace_built;

  turboscalar dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;

  // ---------------------------------------------------------------- program
  instr_t prog [64];
  int     plen = 0;
  int     iters = 40;

  function automatic instr_t mk(iclass_e c, logic [2:0] op, int rd, int rs1, int rs2, int imm);
    instr_t i;
    i.cls = c; i.op = op; i.rd = REGW'(rd); i.rs1 = REGW'(rs1); i.rs2 = REGW'(rs2);
    i.imm = 16'(imm);
    return i;
  endfunction

  task automatic emit(instr_t i);
    prog[plen] = i;
    plen++;
  endtask

  // ---------------------------------------------------------------- reference model
  logic [XLEN-1:0] rreg [NREG];
  logic [XLEN-1:0] rmem [1024];
  int              rcount;

  task automatic ref_run();
    automatic int pc = 0;
    automatic int n = 0;
    for (int r = 0; r < NREG; r++) rreg[r] = '0;
    while (n < 1000000) begin
      automatic instr_t i = prog[pc];
      automatic logic [XLEN-1:0] a = rreg[i.rs1], b = rreg[i.rs2];
      automatic logic [XLEN-1:0] ea = a + XLEN'(signed'(i.imm));
      n++;
      if (i.cls == C_BR && i.op == BR_HALT) break;
      case (i.cls)
        C_SI: case (i.op)
          SI_ADD: rreg[i.rd] = a + b;
          SI_SUB: rreg[i.rd] = a - b;
          SI_AND: rreg[i.rd] = a & b;
          SI_OR:  rreg[i.rd] = a | b;
          SI_XOR: rreg[i.rd] = a ^ b;
          SI_ADDI: rreg[i.rd] = ea;
          SI_SLLI: rreg[i.rd] = a << i.imm[4:0];
          default: rreg[i.rd] = XLEN'(signed'(i.imm));
        endcase
        C_CX: rreg[i.rd] = (i.op == CX_SLT) ? XLEN'($signed(a) < $signed(b)) : a * b;
        C_FP: rreg[i.rd] = a + b;
        C_LS: if (i.op == LS_LD) rreg[i.rd] = rmem[ea[9:0]];
              else rmem[ea[9:0]] = b;
        default: ;
      endcase
      if (i.cls == C_BR) begin
        automatic logic t = (i.op == BR_BEQ) ? (a == b) : (i.op == BR_BNE) ? (a != b) :
                            (i.op == BR_BLT) ? ($signed(a) < $signed(b)) : 1'b1;
        pc = t ? pc + int'(i.imm) : pc + 1;
      end else pc = pc + 1;
    end
    rcount = n;
  endtask

  // ---------------------------------------------------------------- event counters
  int n_commit = 0, n_hot = 0, n_flush = 0, n_to_hot = 0, n_to_cold = 0, n_hf = 0, n_cf = 0,
      n_dstall = 0, n_sstall = 0, n_blk = 0, n_tr = 0, max_commit = 0;
  always @(posedge clk) if (rst_n && run && !halted) begin
    cycles++;
    n_commit += int'(ev_commit);
    n_hot    += int'(ev_commit_hot);
    if (int'(ev_commit) > max_commit) max_commit = int'(ev_commit);
    n_flush  += int'(ev_flush);
    n_to_hot += int'(ev_to_hot);
    n_to_cold += int'(ev_to_cold);
    n_hf     += int'(ev_hot_fetch);
    n_cf     += int'(ev_cold_fetch);
    n_dstall += int'(ev_disp_stall);
    n_sstall += int'(ev_silo_stall);
    n_blk    += int'(ev_block_built);
    n_tr     += int'(ev_trace_built);
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic happened(string what, int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    void'($value$plusargs("iters=%d", iters));
    // r0 stays 0 throughout
    emit(mk(C_SI, SI_LI,   1, 0, 0, 0));      // 0  i = 0
    emit(mk(C_SI, SI_LI,   2, 0, 0, iters));  // 1  n
    emit(mk(C_SI, SI_LI,   3, 0, 0, 0));      // 2  sum
    emit(mk(C_SI, SI_LI,   4, 0, 0, 100));    // 3  array base
    emit(mk(C_SI, SI_LI,  10, 0, 0, 0));      // 4  odd count
    emit(mk(C_SI, SI_ADD,  5, 4, 1, 0));      // 5  loop: addr
    emit(mk(C_LS, LS_LD,   6, 5, 0, 0));      // 6  x = a[i]
    emit(mk(C_SI, SI_ADD,  3, 3, 6, 0));      // 7  sum += x
    emit(mk(C_CX, CX_MUL,  7, 6, 6, 0));      // 8  x*x
    emit(mk(C_FP, FP_ADD,  8, 8, 7, 0));      // 9  acc += x*x  (FP unit)
    emit(mk(C_SI, SI_LI,   9, 0, 0, 1));      // 10
    emit(mk(C_SI, SI_AND,  9, 1, 9, 0));      // 11 i & 1
    emit(mk(C_BR, BR_BEQ,  0, 9, 0, 2));      // 12 even -> 14
    emit(mk(C_SI, SI_ADDI, 10, 10, 0, 1));    // 13 odd++
    emit(mk(C_LS, LS_ST,   0, 1, 3, 200));    // 14 b[i] = sum
    emit(mk(C_FP, FP_ADD, 15, 15, 6, 0));     // 15 FP unit again
    emit(mk(C_SI, SI_ADDI, 1, 1, 0, 1));      // 16 i++
    emit(mk(C_CX, CX_SLT, 11, 1, 2, 0));      // 17 i < n
    emit(mk(C_BR, BR_BNE,  0, 11, 0, -13));   // 18 -> 5
    // second loop: straight-line body, several FP-unit and complex ops per
    // trace (more than the per-cycle dispatch limits), long hot runs
    emit(mk(C_SI, SI_LI,  30, 0, 0, 0));      // 19
    emit(mk(C_FP, FP_ADD, 16, 16, 30, 0));    // 20 loop2:
    emit(mk(C_CX, CX_MUL, 17, 30, 30, 0));    // 21
    emit(mk(C_SI, SI_ADD, 18, 18, 17, 0));    // 22
    emit(mk(C_SI, SI_ADDI, 19, 19, 0, 3));    // 23
    emit(mk(C_FP, FP_ADD, 20, 20, 19, 0));    // 24
    emit(mk(C_CX, CX_SLT, 21, 19, 2, 0));     // 25
    emit(mk(C_SI, SI_ADD, 22, 22, 21, 0));    // 26
    emit(mk(C_SI, SI_ADDI, 23, 23, 0, 1));    // 27
    emit(mk(C_FP, FP_ADD, 24, 24, 23, 0));    // 28
    emit(mk(C_CX, CX_MUL, 25, 23, 23, 0));    // 29
    emit(mk(C_SI, SI_XOR, 26, 26, 25, 0));    // 30
    emit(mk(C_SI, SI_ADDI, 27, 27, 0, 2));    // 31
    emit(mk(C_FP, FP_ADD, 28, 28, 27, 0));    // 32
    emit(mk(C_SI, SI_SUB, 29, 29, 27, 0));    // 33
    emit(mk(C_SI, SI_ADDI, 30, 30, 0, 1));    // 34
    emit(mk(C_CX, CX_SLT, 31, 30, 2, 0));     // 35
    emit(mk(C_BR, BR_BNE,  0, 31, 0, -16));   // 36 -> 20
    emit(mk(C_SI, SI_XOR, 12, 3, 8, 0));      // 37
    emit(mk(C_SI, SI_SUB, 13, 12, 10, 0));    // 38
    emit(mk(C_SI, SI_SLLI, 14, 13, 0, 3));    // 39
    emit(mk(C_BR, BR_HALT, 0, 0, 0, 0));      // 40

    for (int k = 0; k < 1024; k++) rmem[k] = '0;
    for (int k = 0; k < iters; k++) rmem[100 + k] = XLEN'(3 * k + 1);
    ref_run();

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int k = 0; k < plen; k++) begin
      im_we = 1'b1; im_addr = PCW'(k); im_wdata = prog[k];
      @(posedge clk);
    end
    im_we = 1'b0;
    for (int k = 0; k < 1024; k++) begin
      dm_we = 1'b1; dm_addr = PCW'(k);
      dm_wdata = (k >= 100 && k < 100 + iters) ? XLEN'(3 * (k - 100) + 1) : '0;
      @(posedge clk);
    end
    dm_we = 1'b0;
    run = 1'b1;
    wait (halted);
    @(posedge clk);
    #1;
    for (int r = 0; r < NREG; r++) begin
      dbg_reg = REGW'(r);
      #1;
      check($sformatf("r%0d", r), dbg_data, rreg[r]);
    end
    for (int k = 200; k < 200 + iters; k++) begin
      dm_addr = PCW'(k);
      #1;
      check($sformatf("mem[%0d]", k), dm_rdata, rmem[k]);
    end
    // every instruction of the program run completes exactly once (HALT included)
    check("instructions completed", n_commit, rcount);
    $display("cycles %0d, instructions %0d, IPC x100 = %0d, from hot pipeline %0d",
             cycles, n_commit, (100 * n_commit) / (cycles > 0 ? cycles : 1), n_hot);
    happened("cold-pipeline fetches", n_cf);
    happened("hot-pipeline trace fetches", n_hf);
    happened("hand-offs cold -> hot", n_to_hot);
    happened("hand-offs hot -> cold", n_to_cold);
    happened("misprediction flushes", n_flush);
    happened("multi-cycle dispatch stalls", n_dstall);
    happened("blocks built", n_blk);
    happened("traces built", n_tr);
    happened("instructions completed from hot", n_hot);
    // more than one block's worth completing in a cycle needs the wide hot path
    checks++;
    if (max_commit <= BLK_W || max_commit > HOT_W) begin
      failures++;
      $display("FAIL peak completion per cycle %0d", max_commit);
    end
    $display("  silo-full stalls (not required)   %0d", n_sstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
