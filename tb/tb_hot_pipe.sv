// tb_hot_pipe: self-checking test of the hot pipeline front end (fetch into
// the first instruction buffer, tiny decode plus register-file read into the
// second buffer, hand-over to the dispatch crossbar).
//
// How it works: the test plays the dynamic instruction cache (random fetch
// groups of 1..4 random blocks with a trace-table index), the silo register
// file (random ren_ok, per-lane destination tags and source operands, some
// of them tags of unfinished results) and the crossbar (random out_done),
// and broadcasts random results on the writeback bus. A separate tiny
// decoder instance, tested on its own, gives the expected lanes of each
// group. Checked: the rename/read request of the group in the first buffer
// is what the decoder makes of it; groups come out in fetch order with the
// decoder's lanes, count and trace index, and with the tags and operands
// given in their read cycle, a waiting operand taking the first matching
// writeback while the group waits in the second buffer; with no stalls a
// group fetched in cycle t is offered in t+2; a flush empties both buffers;
// empty is high exactly when no group is inside.
// Prints TB_RESULT checks/failures; a watchdog ends a hung run.
module tb_hot_pipe;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0;
  logic flush, fetch_en, fetch_ready, ren_fire, ren_ok, out_valid, out_done, empty;
  block_t [NBLK-1:0] fetch_blk;
  logic [2:0] fetch_nblk;
  logic [PCW-1:0] fetch_next_pc;
  logic [TTW-1:0] fetch_tt, out_tt;
  ren_t [HOT_W-1:0] ren;
  tag_t [HOT_W-1:0] ren_dtag;
  opnd_t [HOT_W-1:0] ren_s1, ren_s2;
  wb_t [WB_N-1:0] wb_in;
  dlane_t [HOT_W-1:0] out_lane;
  logic [4:0] out_n;
  int checks = 0, failures = 0, n_out = 0, n_snoop = 0, n_lat = 0, n_flush = 0, cyc = 0;

  hot_pipe dut (.*);
  always #5 clk = ~clk;
  initial begin #50000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("t=%0t %s", $time, what); end
  endtask

  // reference decode of the group now in the first buffer
  block_t [NBLK-1:0] q_blk [$];
  logic [2:0] q_nblk [$];
  logic [PCW-1:0] q_next [$];
  logic [TTW-1:0] q_tt [$];
  int q_fcyc [$];
  ren_t [HOT_W-1:0] x_ren;
  dlane_t [HOT_W-1:0] x_lane;
  logic [4:0] x_n;
  tiny_decoder u_ref (.blk(q_blk.size() > 0 ? q_blk[0] : '0), .nblk(q_blk.size() > 0 ? q_nblk[0] : 3'd0),
                      .next_pc(q_next.size() > 0 ? q_next[0] : '0), .ren(x_ren), .lane(x_lane), .nins(x_n));
  // renamed groups: expected lanes, operands and read cycle
  dlane_t [HOT_W-1:0] r_lane [$];
  logic [4:0] r_n [$];
  logic [TTW-1:0] r_tt [$];
  int r_cyc [$], r_fcyc [$];
  int lg_cyc [$];
  tag_t lg_tag [$];
  logic [XLEN-1:0] lg_dat [$];
  logic hs_out, hs_ren, hs_f;

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
    {flush, fetch_en, ren_ok, out_done} = 0;
    fetch_blk = '0; fetch_nblk = 0; fetch_next_pc = 0; fetch_tt = 0;
    ren_dtag = '0; ren_s1 = '0; ren_s2 = '0; wb_in = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (cyc = 0; cyc < 8000; cyc++) begin
      automatic bit stall_free = (cyc % 400) < 100;
      @(negedge clk);
      chk(empty === (q_blk.size() == 0 && r_n.size() == 0), "empty");
      fetch_en = stall_free || ($urandom % 3 != 0);
      for (int k = 0; k < NBLK; k++) begin
        fetch_blk[k] = block_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
        fetch_blk[k].len = 3'(1 + $urandom % 6);
      end
      fetch_nblk = 3'(1 + $urandom % 4); fetch_next_pc = PCW'($urandom); fetch_tt = TTW'($urandom);
      ren_ok = stall_free || ($urandom % 4 != 0);
      for (int l = 0; l < HOT_W; l++) begin
        ren_dtag[l] = tag_t'($urandom);
        ren_s1[l] = ($urandom % 2) ? '{rdy: 1'b1, tag: tag_t'($urandom), data: $urandom}
                                   : '{rdy: 1'b0, tag: tag_t'(1024 + $urandom % 150), data: '0};
        ren_s2[l] = ($urandom % 2) ? '{rdy: 1'b1, tag: tag_t'($urandom), data: $urandom}
                                   : '{rdy: 1'b0, tag: tag_t'(1024 + $urandom % 150), data: '0};
      end
      out_done = stall_free || ($urandom % 3 == 0);
      wb_in = '0;
      for (int b = 0; b < 6; b++) begin
        wb_in[b].valid = 1; wb_in[b].has_dest = 1;
        wb_in[b].tag = tag_t'(1024 + $urandom % 150); wb_in[b].data = $urandom;
        for (int j = 0; j < b; j++) if (wb_in[j].tag == wb_in[b].tag) wb_in[b].tag = tag_t'(2047 - b);
      end
      flush = ($urandom % 200 == 0);
      #1;
      if (ren_fire) begin
        chk(q_blk.size() > 0, "rename without a group");
        chk(ren === x_ren, "rename request");
      end
      if (out_valid) begin
        chk(r_n.size() > 0, "output without a group");
        if (r_n.size() > 0) begin
          chk(out_n === r_n[0] && out_tt === r_tt[0], "count / trace index");
          for (int l = 0; l < HOT_W; l++) begin
            automatic dlane_t e = r_lane[0][l];
            e.u.s1 = exp_op(e.u.s1, r_cyc[0], cyc);
            e.u.s2 = exp_op(e.u.s2, r_cyc[0], cyc);
            chk(out_lane[l] === e, $sformatf("lane %0d", l));
          end
          if (stall_free && cyc - r_fcyc[0] == 2) n_lat++;
          if (stall_free && (cyc % 400) > 5) chk(cyc - r_fcyc[0] == 2, "latency");
        end
      end
      hs_out = out_valid && out_done; hs_ren = ren_fire; hs_f = fetch_en && fetch_ready;
      @(posedge clk);
      #1;
      for (int b = 0; b < 6; b++) begin
        lg_cyc.push_back(cyc); lg_tag.push_back(wb_in[b].tag); lg_dat.push_back(wb_in[b].data);
      end
      while (lg_cyc.size() > 0 && (r_cyc.size() == 0 || lg_cyc[0] < r_cyc[0])) begin
        void'(lg_cyc.pop_front()); void'(lg_tag.pop_front()); void'(lg_dat.pop_front());
      end
      if (flush) begin
        n_flush++;
        q_blk.delete(); q_nblk.delete(); q_next.delete(); q_tt.delete(); q_fcyc.delete();
        r_lane.delete(); r_n.delete(); r_tt.delete(); r_cyc.delete(); r_fcyc.delete();
      end else begin
        if (hs_out) begin
          n_out++;
          void'(r_lane.pop_front()); void'(r_n.pop_front()); void'(r_tt.pop_front());
          void'(r_cyc.pop_front()); void'(r_fcyc.pop_front());
        end
        if (hs_ren) begin
          automatic dlane_t [HOT_W-1:0] e = x_lane;
          for (int l = 0; l < HOT_W; l++) begin
            e[l].u.dtag = ren_dtag[l]; e[l].u.s1 = ren_s1[l]; e[l].u.s2 = ren_s2[l];
          end
          r_lane.push_back(e); r_n.push_back(x_n); r_tt.push_back(q_tt[0]);
          r_cyc.push_back(cyc); r_fcyc.push_back(q_fcyc[0]);
          void'(q_blk.pop_front()); void'(q_nblk.pop_front()); void'(q_next.pop_front());
          void'(q_tt.pop_front()); void'(q_fcyc.pop_front());
        end
        if (hs_f) begin
          q_blk.push_back(fetch_blk); q_nblk.push_back(fetch_nblk); q_next.push_back(fetch_next_pc);
          q_tt.push_back(fetch_tt); q_fcyc.push_back(cyc);
        end
      end
    end
    chk(n_out > 2000 && n_snoop > 200 && n_lat > 500 && n_flush > 10, "mechanisms exercised");
    $display("groups=%0d snoop=%0d lat2=%0d flush=%0d", n_out, n_snoop, n_lat, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
