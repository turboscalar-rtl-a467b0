// tb_quack_rf: self-checking test of the silo ("Quack") register file.
//
// How it works: a reference model keeps, per architected register, a list of
// versions (newest first) with value and ready flag, the count of
// speculative versions and the next version number. Each cycle the test
// drives a random rename group (0..24 lanes, registers drawn from a small
// set so groups write the same register several times), computes each
// lane's "prior writes" counts the way the back-end does, writes back some
// outstanding versions with random data, commits ready versions in program
// order and now and then flushes. It checks, for every lane, the destination
// tag, both source operands (ready flag, tag, data, including same-cycle
// writeback bypass and in-group forwarding tags), the ren_ok room flag and
// the committed value of a random register on the debug port.
// Reads are combinational; updates act at the clock edge.
// Prints TB_RESULT checks/failures; a watchdog ends a hung run.
module tb_quack_rf;
  import ts_pkg::*;
  localparam int W = HOT_W, CW = HOT_W;
  logic clk = 0, rst_n = 0;
  ren_t [W-1:0] ren;
  logic ren_fire, ren_ok, flush;
  tag_t [W-1:0] dtag;
  opnd_t [W-1:0] s1, s2;
  wb_t [WB_N-1:0] wb;
  logic [CW-1:0] cm_valid;
  logic [CW-1:0][REGW-1:0] cm_rd;
  logic [REGW-1:0] dbg_reg;
  logic [XLEN-1:0] dbg_data;
  int checks = 0, failures = 0, n_fwd = 0, n_byp = 0, n_full = 0, n_flush = 0;

  // model
  logic [VW-1:0]   mver [NREG][$];
  logic [XLEN-1:0] mdat [NREG][$];
  logic            mrdy [NREG][$];
  int              mspec [NREG];
  logic [VW-1:0]   mcnt [NREG];
  int              fifo_r [$];
  logic [VW-1:0]   fifo_v [$];

  quack_rf dut (.*);
  always #5 clk = ~clk;
  initial begin #20000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("t=%0t %s", $time, what); end
  endtask

  function automatic int find(int r, logic [VW-1:0] v);
    for (int e = 0; e <= mspec[r] && e < mver[r].size(); e++) if (mver[r][e] == v) return e;
    return -1;
  endfunction

  function automatic opnd_t exp_src(logic u, logic [REGW-1:0] r, logic [GPRW-1:0] p);
    opnd_t o;
    if (!u) return '{rdy: 1'b1, tag: '0, data: '0};
    if (p != 0) return '{rdy: 1'b0, tag: {r, mcnt[r] + VW'(p) - VW'(1)}, data: '0};
    o = '{rdy: mrdy[r][0], tag: {r, mver[r][0]}, data: mdat[r][0]};
    for (int b = 0; b < WB_N; b++)
      if (!o.rdy && wb[b].valid && wb[b].has_dest && wb[b].tag == o.tag) begin
        o.rdy = 1; o.data = wb[b].data; n_byp++;
      end
    return o;
  endfunction

  initial begin
    for (int r = 0; r < NREG; r++) begin
      mver[r].push_back('0); mdat[r].push_back('0); mrdy[r].push_back(1'b1);
      mspec[r] = 0; mcnt[r] = VW'(1);
    end
    ren = '0; ren_fire = 0; flush = 0; wb = '0; cm_valid = '0; cm_rd = '0; dbg_reg = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 8000; it++) begin
      automatic int nl, ncm;
      automatic int nalloc [NREG];
      automatic logic ok;
      @(negedge clk);
      // rename group
      nl = ($urandom % 4 == 0) ? int'($urandom % 25) : int'($urandom % 6);
      ren = '0;
      for (int l = 0; l < nl; l++) begin
        ren[l].valid = 1;
        ren[l].wr  = ($urandom % 4) != 0;
        ren[l].rd  = REGW'($urandom % 6);
        ren[l].u1  = ($urandom % 5) != 0; ren[l].rs1 = REGW'($urandom % 6);
        ren[l].u2  = ($urandom % 3) != 0; ren[l].rs2 = REGW'($urandom % 6);
        for (int j = 0; j < l; j++) if (ren[j].wr) begin
          if (ren[j].rd == ren[l].rd)  ren[l].pd++;
          if (ren[j].rd == ren[l].rs1) ren[l].p1++;
          if (ren[j].rd == ren[l].rs2) ren[l].p2++;
        end
      end
      // writebacks of outstanding versions
      wb = '0;
      for (int b = 0; b < WB_N; b++)
        if (fifo_r.size() > 0 && ($urandom % 4) == 0) begin
          automatic int q = $urandom % fifo_r.size();
          wb[b].valid = 1; wb[b].has_dest = 1;
          wb[b].tag = {REGW'(fifo_r[q]), fifo_v[q]}; wb[b].data = $urandom;
          for (int j = 0; j < b; j++) if (wb[j].valid && wb[j].tag == wb[b].tag) wb[b].valid = 0;
        end
      // commits: oldest ready versions (ready before this cycle)
      cm_valid = '0; ncm = 0;
      while (ncm < CW && ncm < fifo_r.size() && ($urandom % 8) != 0) begin
        automatic int e = find(fifo_r[ncm], fifo_v[ncm]);
        if (e < 0 || !mrdy[fifo_r[ncm]][e]) break;
        cm_valid[ncm] = 1; cm_rd[ncm] = REGW'(fifo_r[ncm]); ncm++;
      end
      flush = ($urandom % 40) == 0;
      dbg_reg = REGW'($urandom % 8);
      // room check
      for (int r = 0; r < NREG; r++) nalloc[r] = 0;
      for (int l = 0; l < nl; l++) if (ren[l].wr) nalloc[ren[l].rd]++;
      ok = 1;
      for (int r = 0; r < NREG; r++) if (mspec[r] + nalloc[r] > SILO_D - 1) ok = 0;
      if (!ok) n_full++;
      ren_fire = ok && ($urandom % 4 != 0);
      #1;
      chk(ren_ok === ok, "ren_ok");
      chk(dbg_data === mdat[dbg_reg][mspec[dbg_reg]], $sformatf("dbg r%0d got %h exp %h spec=%0d size=%0d", dbg_reg, dbg_data, mdat[dbg_reg][mspec[dbg_reg]], mspec[dbg_reg], mver[dbg_reg].size()));
      for (int l = 0; l < nl; l++) begin
        automatic opnd_t e1 = exp_src(ren[l].u1, ren[l].rs1, ren[l].p1);
        automatic opnd_t e2 = exp_src(ren[l].u2, ren[l].rs2, ren[l].p2);
        if (ren[l].u1 && ren[l].p1 != 0) n_fwd++;
        if (ren[l].wr) chk(dtag[l] === {ren[l].rd, mcnt[ren[l].rd] + VW'(ren[l].pd)}, "dtag");
        chk(s1[l].rdy === e1.rdy && s1[l].tag === e1.tag && (!e1.rdy || s1[l].data === e1.data), $sformatf("s1 l=%0d got %0b %h %h exp %0b %h %h u=%0b p=%0d", l, s1[l].rdy, s1[l].tag, s1[l].data, e1.rdy, e1.tag, e1.data, ren[l].u1, ren[l].p1));
        chk(s2[l].rdy === e2.rdy && s2[l].tag === e2.tag && (!e2.rdy || s2[l].data === e2.data), "s2");
      end
      @(posedge clk);
      // model update: writeback
      for (int b = 0; b < WB_N; b++) if (wb[b].valid) begin
        automatic int r = int'(wb[b].tag[TAGW-1:VW]);
        automatic int e = find(r, wb[b].tag[VW-1:0]);
        if (e >= 0) begin mdat[r][e] = wb[b].data; mrdy[r][e] = 1; end
      end
      // commit
      for (int c = 0; c < ncm; c++) begin
        mspec[fifo_r[0]]--; void'(fifo_r.pop_front()); void'(fifo_v.pop_front());
      end
      if (flush) begin
        n_flush++;
        for (int r = 0; r < NREG; r++) begin
          repeat (mspec[r]) begin
            void'(mver[r].pop_front()); void'(mdat[r].pop_front()); void'(mrdy[r].pop_front());
          end
          mspec[r] = 0;
          mcnt[r] = mver[r][0] + VW'(1);
        end
        fifo_r.delete(); fifo_v.delete();
      end else if (ren_fire) begin
        for (int l = 0; l < nl; l++) if (ren[l].wr) begin
          automatic int r = ren[l].rd;
          mver[r].push_front(mcnt[r] + VW'(ren[l].pd)); mdat[r].push_front('0); mrdy[r].push_front(0);
          fifo_r.push_back(r); fifo_v.push_back(mcnt[r] + VW'(ren[l].pd));
        end
        for (int r = 0; r < NREG; r++) begin mcnt[r] += VW'(nalloc[r]); mspec[r] += nalloc[r]; end
      end
      for (int r = 0; r < NREG; r++)
        while (mver[r].size() > mspec[r] + 1) begin
          void'(mver[r].pop_back()); void'(mdat[r].pop_back()); void'(mrdy[r].pop_back());
        end
    end
    chk(n_fwd > 100 && n_byp > 50 && n_full > 5 && n_flush > 50, "mechanisms exercised");
    $display("fwd=%0d bypass=%0d full=%0d flush=%0d", n_fwd, n_byp, n_full, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
