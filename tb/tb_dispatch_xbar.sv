// tb_dispatch_xbar: self-checking test of the sparse dispatch crossbar.
//
// How it works: the test offers random fetch groups, either a hot group (up
// to 24 lanes, each instruction on a position that accepts its class) or a
// single cold-lane instruction, and holds each group until in_done. Cluster
// ready flags and the free reorder-buffer count are random. Each lane gets a
// unique address so outputs can be traced back to lanes. Checked each cycle:
// an output port carries only its own class; no class gets more than its
// per-cycle limit (12/10/2/1/4); nothing goes to a cluster that is not
// ready; nothing is dispatched before the reorder buffer has room for the
// whole group; the group is allocated exactly once, at the current tail, in
// its first dispatch cycle; each output's reorder-buffer index is base plus
// the lane's offset; each lane is sent exactly once; in_done rises in the
// cycle its last lane goes. With every cluster ready and room available a
// group must finish in the minimum number of cycles its class mix needs.
// Prints TB_RESULT checks/failures; a watchdog ends a hung run.
module tb_dispatch_xbar;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  logic in_valid, in_done, rob_alloc;
  dlane_t [NLANE-1:0] in_lane;
  logic [4:0] in_n, rob_alloc_n;
  logic [ROBW:0] rob_free;
  logic [ROBW-1:0] rob_tail, rob_base;
  logic [NCLS-1:0] cl_ready;
  uop_t [DTOT-1:0] out;
  int checks = 0, failures = 0, n_multi = 0, n_groups = 0;
  localparam int LIM [NCLS] = '{DISP_SI, DISP_LS, DISP_CX, DISP_FP, DISP_BR};
  localparam int BASE [NCLS] = '{0, DISP_SI, DISP_SI + DISP_LS, DISP_SI + DISP_LS + DISP_CX,
                                 DISP_SI + DISP_LS + DISP_CX + DISP_FP};

  dispatch_xbar dut (.*);
  always #5 clk = ~clk;
  initial begin #20000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("t=%0t %s", $time, what); end
  endtask

  initial begin
    in_valid = 0; in_lane = '0; in_n = 0; rob_free = 0; rob_tail = 0; cl_ready = '1;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int g = 0; g < 1500; g++) begin
      automatic logic [NLANE-1:0] sent = '0, want = '0;
      automatic int cnt [NCLS] = '{0, 0, 0, 0, 0};
      automatic int cyc = 0, minc = 0, nalloc = 0;
      automatic logic easy = ($urandom % 2) == 0;
      automatic logic [ROBW-1:0] base = '0;
      @(negedge clk);
      in_lane = '0; in_n = 0;
      if ($urandom % 4 == 0) begin
        in_lane[COLD_LANE].u.valid = 1;
        in_lane[COLD_LANE].u.ins.cls = iclass_e'($urandom % 5);
        in_lane[COLD_LANE].u.pc = PCW'(COLD_LANE);
        in_n = 1;
      end else begin
        for (int l = 0; l < HOT_W; l++)
          if ($urandom % 4 != 0) begin
            automatic iclass_e c;
            do c = iclass_e'($urandom % 5); while (!pos_mask(l % BLK_W)[c]);
            in_lane[l].u.valid = 1; in_lane[l].u.ins.cls = c; in_lane[l].u.pc = PCW'(l);
            in_lane[l].ofs = in_n; in_n++;
          end
      end
      for (int l = 0; l < NLANE; l++) if (in_lane[l].u.valid) begin
        want[l] = 1; cnt[in_lane[l].u.ins.cls]++;
      end
      for (int c = 0; c < NCLS; c++) if ((cnt[c] + LIM[c] - 1) / LIM[c] > minc) minc = (cnt[c] + LIM[c] - 1) / LIM[c];
      if (minc > 1) n_multi++;
      rob_tail = ROBW'($urandom);
      in_valid = 1;
      do begin
        automatic int n [NCLS] = '{0, 0, 0, 0, 0};
        automatic logic [NLANE-1:0] now = '0;
        if (easy) begin cl_ready = '1; rob_free = 256; end
        else begin
          cl_ready = NCLS'($urandom) | NCLS'($urandom);
          rob_free = (nalloc > 0 || $urandom % 3 == 0) ? (ROBW+1)'($urandom % 30) : (ROBW+1)'(256);
        end
        #1;
        if (rob_alloc) begin
          chk(nalloc == 0, "allocated twice");
          chk(rob_alloc_n === in_n && rob_free >= (ROBW+1)'(in_n), "alloc size / room");
          base = rob_tail; nalloc++;
        end
        for (int o = 0; o < DTOT; o++) if (out[o].valid) begin
          automatic int l = int'(out[o].pc), c = int'(out[o].ins.cls);
          chk(o >= BASE[c] && o < BASE[c] + LIM[c], "wrong class port");
          chk(cl_ready[c], "sent to busy cluster");
          chk(nalloc == 1, "sent before allocation");
          chk(want[l] && !sent[l] && !now[l], "lane sent twice / not valid");
          chk(out[o].rob === base + ROBW'(in_lane[l].ofs), "rob index");
          now[l] = 1; n[c]++;
        end
        for (int c = 0; c < NCLS; c++) chk(n[c] <= LIM[c], "class limit");
        sent |= now;
        chk(in_done === (sent == want), "in_done");
        cyc++;
        @(posedge clk);
        @(negedge clk);
      end while (sent != want && cyc < 200);
      chk(sent == want, "group finished");
      if (easy) chk(cyc == minc, $sformatf("cycles %0d min %0d", cyc, minc));
      in_valid = 0; n_groups++;
      if ($urandom % 3 == 0) begin #1; @(posedge clk); end
    end
    chk(n_multi > 100, "multi-cycle groups seen");
    $display("groups=%0d multi-cycle=%0d", n_groups, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
