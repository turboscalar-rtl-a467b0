// quack_rf: the silo ("Quack") register file, a renaming register file with no
// rename map table.
//
// There is one silo per architected register. A silo is a small stack of
// versions of that register whose top always holds the most recent version,
// so a source operand is read from a fixed place whatever the number of
// physical registers. The stack is kept as a ring with a top pointer:
// allocating k new versions writes them above the top and moves the pointer
// up by k; nothing is copied. A physical register is named
// by {architected register, version number}; the version number is the
// silo's allocation counter plus the instruction's "prior writes" count, which
// the optimizing back-end works out ahead of time (virtual rename tags), so
// the front end does no renaming of its own. Results are written back by tag:
// each silo compares the version numbers of its entries (writeback decoder).
//
// Each silo holds one committed version plus up to SILO_D-1 speculative ones.
// Commit turns the oldest speculative version into the committed one (and
// frees the previous committed one); flush drops every speculative version,
// so the committed value is on top again.
//
// Interface (all lanes in one cycle): W rename/read lanes (ren_t) with
// allocation when ren_fire is high; ren_ok says every silo has room. Per lane
// outputs: destination tag and both source operands (ready/tag/data), with
// this cycle's writebacks bypassed in. WB_N writeback lanes, CW commit lanes,
// flush, and a debug port that reads the committed value of a register.
// Timing: reads are combinational; allocation, writeback, commit and flush
// take effect at the clock edge.
//
// Design choices not fixed by the Turboscalar description: silo depth 32 (a
// 24-wide group may write one register 24 times), 6-bit version numbers, recovery by dropping all
// speculative versions and renumbering from the committed one; the ring with a
// top pointer (instead of physically shifting entries) is also this design's.
module quack_rf
  import ts_pkg::*;
#(
  parameter int W  = HOT_W,       // rename/read lanes
  parameter int CW = HOT_W        // commit lanes
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // rename / read
  input  ren_t [W-1:0]         ren,
  input  logic                 ren_fire,
  output logic                 ren_ok,
  output tag_t [W-1:0]         dtag,
  output opnd_t [W-1:0]        s1,
  output opnd_t [W-1:0]        s2,
  // writeback
  input  wb_t [WB_N-1:0]       wb,
  // commit
  input  logic [CW-1:0]        cm_valid,
  input  logic [CW-1:0][REGW-1:0] cm_rd,
  input  logic                 flush,
  // debug read of architected state
  input  logic [REGW-1:0]      dbg_reg,
  output logic [XLEN-1:0]      dbg_data
);

  localparam int PW = $clog2(SILO_D);

  // each silo is a ring of SILO_D entries; top[r] points at the most recent
  // version, the committed version sits nspec[r] entries below it
  logic [XLEN-1:0] dat [NREG][SILO_D];
  logic [VW-1:0]   ver [NREG][SILO_D];
  logic            rdy [NREG][SILO_D];
  logic [PW-1:0]   top [NREG];
  logic [5:0]      nspec [NREG];          // speculative versions in a silo
  logic [VW-1:0]   cnt [NREG];            // next version number to hand out

  // allocations and commits per silo this cycle
  logic [5:0] nalloc [NREG];
  logic [5:0] ncommit [NREG];
  // the top entry of every silo
  opnd_t      topv [NREG];

  always_comb begin
    for (int r = 0; r < NREG; r++) begin
      nalloc[r]  = '0;
      ncommit[r] = '0;
      for (int l = 0; l < W; l++)
        if (ren[l].valid && ren[l].wr && ren[l].rd == REGW'(r)) nalloc[r] = nalloc[r] + 6'd1;
      for (int c = 0; c < CW; c++)
        if (cm_valid[c] && cm_rd[c] == REGW'(r)) ncommit[r] = ncommit[r] + 6'd1;
      topv[r] = snoop('{rdy: rdy[r][top[r]], tag: {REGW'(r), ver[r][top[r]]}, data: dat[r][top[r]]}, wb);
    end
  end

  always_comb begin
    ren_ok = 1'b1;
    for (int r = 0; r < NREG; r++)
      if (32'(nspec[r]) + 32'(nalloc[r]) > SILO_D - 1) ren_ok = 1'b0;
  end

  always_comb begin
    for (int l = 0; l < W; l++) begin
      dtag[l] = {ren[l].rd, cnt[ren[l].rd] + VW'(ren[l].pd)};
      if (!ren[l].u1) s1[l] = '{rdy: 1'b1, tag: '0, data: '0};
      else if (ren[l].p1 == '0) s1[l] = topv[ren[l].rs1];
      else s1[l] = '{rdy: 1'b0, tag: {ren[l].rs1, cnt[ren[l].rs1] + VW'(ren[l].p1) - VW'(1)},
                     data: '0};
      if (!ren[l].u2) s2[l] = '{rdy: 1'b1, tag: '0, data: '0};
      else if (ren[l].p2 == '0) s2[l] = topv[ren[l].rs2];
      else s2[l] = '{rdy: 1'b0, tag: {ren[l].rs2, cnt[ren[l].rs2] + VW'(ren[l].p2) - VW'(1)},
                     data: '0};
    end
  end

  assign dbg_data = dat[dbg_reg][top[dbg_reg] - PW'(nspec[dbg_reg])];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) begin
        for (int e = 0; e < SILO_D; e++) begin
          dat[r][e] <= '0;
          ver[r][e] <= '0;
          rdy[r][e] <= 1'b1;
        end
        top[r]   <= '0;
        nspec[r] <= '0;
        cnt[r]   <= VW'(1);
      end
    end else begin
      for (int r = 0; r < NREG; r++) begin
        logic [PW-1:0] keep;                 // speculative versions that survive
        keep = PW'(nspec[r] - ncommit[r]);
        // writeback decoder: a live entry whose version matches takes the result
        for (int e = 0; e < SILO_D; e++) begin
          logic [PW-1:0] depth;
          depth = top[r] - PW'(e);
          for (int b = 0; b < WB_N; b++)
            if (wb[b].valid && wb[b].has_dest && wb[b].tag == {REGW'(r), ver[r][e]} &&
                32'(depth) <= 32'(nspec[r])) begin
              dat[r][e] <= wb[b].data;
              rdy[r][e] <= 1'b1;
            end
        end
        if (flush) begin
          // drop every speculative version; numbering restarts just above the
          // surviving committed one, so live versions always span fewer than
          // 2**VW consecutive numbers
          top[r]   <= top[r] - keep;
          nspec[r] <= '0;
          cnt[r]   <= ver[r][top[r] - keep] + VW'(1);
        end else begin
          if (ren_fire)
            for (int j = 1; j <= W; j++)
              if (j <= 32'(nalloc[r])) begin
                dat[r][top[r] + PW'(j)] <= '0;
                rdy[r][top[r] + PW'(j)] <= 1'b0;
                ver[r][top[r] + PW'(j)] <= cnt[r] + VW'(j - 1);
              end
          top[r]   <= ren_fire ? top[r] + PW'(nalloc[r]) : top[r];
          nspec[r] <= nspec[r] + (ren_fire ? nalloc[r] : 6'd0) - ncommit[r];
          cnt[r]   <= cnt[r] + (ren_fire ? VW'(nalloc[r]) : VW'(0));
        end
      end
    end
  end

  // a commit always finds a speculative version to retire
  always_ff @(posedge clk)
    if (rst_n && !flush)
      for (int r = 0; r < NREG; r++)
        assert (32'(ncommit[r]) <= 32'(nspec[r]))
          else $error("quack_rf: commit of r%0d with no speculative version", r);

endmodule
