// tb_rs_cluster: self-checking test of a reservation-station cluster.
//
// How it works: two instances are tested. The first has the default sizes
// (128 entries, 12 dispatch ports, 12 issue lanes) and receives random
// simple, complex, FP and branch operations whose sources are either ready
// values or tags of earlier, still unfinished operations; its own results are
// fed back as the writeback bus, so wakeup and single-cycle forwarding are
// exercised, including a result that appears in the very cycle a consumer is
// written into the station. A model computes every operation's value when it
// is dispatched; each result must come out exactly once with that value, at most 12 per
// cycle, and the ready flag must match the model's free-entry count. A flush
// in the middle must drop every waiting operation.
// The second instance is a load/store cluster (10 dispatch ports, 1 issue
// lane) connected to a model memory; operations may only go when their
// reorder-buffer index equals the head, which the test advances as results
// come out, so memory is accessed strictly in program order.
// Prints TB_RESULT checks/failures; a watchdog ends a hung run.
module tb_rs_cluster;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  int checks = 0, failures = 0;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("t=%0t %s", $time, what); end
  endtask

  always #5 clk = ~clk;
  initial begin #50000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  // ------------------------------------------------ instance 1: default
  uop_t [DISP_SI-1:0] in;
  logic ready;
  wb_t [WB_N-1:0] wb_in;
  wb_t [ISS_SI-1:0] wb_out;
  logic [PCW-1:0] mem_addr; logic mem_we; logic [XLEN-1:0] mem_wdata;
  rs_cluster dut (.clk, .rst_n, .flush, .in, .ready, .wb_in, .rob_head(8'd0),
                  .mem_addr, .mem_we, .mem_wdata, .mem_rdata(32'd0), .wb_out);
  always_comb begin
    wb_in = '0;
    for (int k = 0; k < ISS_SI; k++) wb_in[k] = wb_out[k];
    wb_in[WB_N-1] = '{valid: gfire, has_dest: 1'b1, tag: GHOST, data: gval, default: '0};
  end

  localparam int NI = 4096;
  logic [XLEN-1:0] val [NI];
  wb_t             expw [NI];
  bit              done [NI], live [NI], just [NI];
  localparam tag_t GHOST = tag_t'(2047);   // a result the test releases late
  logic [XLEN-1:0] gval;
  logic            gfire = 0;
  int ndisp = 0, occ = 0, n_wait = 0, n_late = 0, n_br = 0, n_full = 0;

  // ------------------------------------------------ instance 2: load/store
  uop_t [DISP_LS-1:0] lin;
  logic lready;
  wb_t [ISS_LS-1:0] lwb;
  logic [PCW-1:0] laddr; logic lwe; logic [XLEN-1:0] lwdata, lrdata;
  logic [ROBW-1:0] lhead;
  logic [XLEN-1:0] lmem [256];
  rs_cluster #(.N(RS_N), .DISP(DISP_LS), .ISS(ISS_LS), .CLS(C_LS)) dut_ls (
    .clk, .rst_n, .flush(1'b0), .in(lin), .ready(lready), .wb_in('0), .rob_head(lhead),
    .mem_addr(laddr), .mem_we(lwe), .mem_wdata(lwdata), .mem_rdata(lrdata), .wb_out(lwb));
  assign lrdata = lmem[laddr[7:0]];
  always_ff @(posedge clk) if (lwe) lmem[laddr[7:0]] <= lwdata;

  function automatic opnd_t src(input int i, output logic [XLEN-1:0] v, input bit ghost);
    opnd_t o;
    int j;
    v = $urandom;
    o = '{rdy: 1'b1, tag: '0, data: v};
    if (i > 0 && $urandom % 2 == 0) begin
      j = i - 1 - int'($urandom % ((i < 40) ? i : 40));
      if (live[j] && expw[j].has_dest) begin
        v = val[j];
        if (!done[j] || (just[j] && $urandom % 2 == 0)) begin
          o = '{rdy: 1'b0, tag: expw[j].tag, data: '0};
          if (done[j]) n_late++; else n_wait++;
        end else o.data = v;
      end
    end
    if (ghost) begin
      v = gval; o = '{rdy: 1'b0, tag: GHOST, data: '0};
    end
    return o;
  endfunction

  initial begin : main
    logic [XLEN-1:0] a, b;
    gval = $urandom;
    in = '0; lin = '0; lhead = 0;
    for (int i = 0; i < NI; i++) begin done[i] = 0; live[i] = 0; just[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 3000 && ndisp < NI - DISP_SI; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < ndisp; i++) just[i] = 0;
      // results of this cycle
      begin
        automatic int nres = 0;
        for (int k = 0; k < ISS_SI; k++) if (wb_out[k].valid) begin
          automatic int i = int'(wb_out[k].rob) + 256 * int'(wb_out[k].data === 32'hx);
          // identify by tag: tags are unique among live operations
          i = -1;
          for (int q = 0; q < ndisp; q++) if (live[q] && !done[q] && expw[q].tag == wb_out[k].tag) i = q;
          nres++;
          chk(i >= 0, "result of unknown operation");
          if (i >= 0) begin
            chk(wb_out[k].has_dest === expw[i].has_dest, "has_dest");
            if (expw[i].has_dest) chk(wb_out[k].data === val[i], $sformatf("value op %0d", i));
            if (expw[i].is_br) begin
              n_br++;
              chk(wb_out[k].is_br && wb_out[k].taken === expw[i].taken &&
                  wb_out[k].next_pc === expw[i].next_pc && wb_out[k].mispred === expw[i].mispred, "branch");
            end
            done[i] = 1; just[i] = 1; occ--;
          end
        end
        chk(nres <= ISS_SI, "issue width");
      end
      chk(ready === (RS_N - occ >= DISP_SI), $sformatf("ready occ=%0d", occ));
      gfire = (cyc == 420);
      if (!ready) n_full++;
      // flush once in the middle: everything waiting is dropped
      if (cyc == 1500) begin
        flush = 1; in = '0;
        @(posedge clk); #1 flush = 0;
        for (int i = 0; i < ndisp; i++) live[i] = 0;
        occ = 0;
        @(negedge clk);
        for (int k = 0; k < ISS_SI; k++) chk(!wb_out[k].valid, "result after flush");
        continue;
      end
      // new operations
      in = '0;
      if (ready) begin
        automatic int n = (cyc % 200 < 100) ? DISP_SI : int'($urandom % 4);
        for (int k = 0; k < n; k++) begin
          automatic int i = ndisp;
          automatic uop_t u = '0;
          u.valid = 1;
          u.ins = instr_t'({$urandom, $urandom});
          u.ins.cls = C_SI;
          u.has_dest = has_dest(u.ins);
          u.dtag = tag_t'(i % 2000);
          u.rob = ROBW'(i);
          u.pc = PCW'($urandom); u.pred_pc = ($urandom % 2) ? u.pc + PCW'(1) : br_target(u.ins, u.pc);
          u.s1 = src(i, a, cyc >= 200 && cyc < 400 && $urandom % 2 == 0); u.s2 = src(i, b, 1'b0);
          val[i] = alu(u.ins, a, b);
          expw[i] = '0; expw[i].has_dest = u.has_dest; expw[i].tag = u.dtag;
          if (u.ins.cls == C_BR) begin
            expw[i].is_br = 1; expw[i].taken = br_taken(u.ins, a, b);
            expw[i].next_pc = expw[i].taken ? br_target(u.ins, u.pc) : u.pc + 1'b1;
            expw[i].mispred = expw[i].next_pc != u.pred_pc;
          end
          live[i] = 1; in[k] = u; ndisp++; occ++;
        end
      end
    end
    @(posedge clk); #1 in = '0;
    repeat (200) @(negedge clk) begin
      for (int k = 0; k < ISS_SI; k++) if (wb_out[k].valid)
        for (int q = 0; q < ndisp; q++) if (live[q] && !done[q] && expw[q].tag == wb_out[k].tag) begin
          done[q] = 1; if (expw[q].has_dest) chk(wb_out[k].data === val[q], "late value");
        end
    end
    begin
      automatic int lost = 0;
      for (int i = 0; i < ndisp; i++) if (live[i] && !done[i]) lost++;
      chk(lost == 0, $sformatf("%0d operations never issued", lost));
    end
    chk(n_wait > 500 && n_late > 20 && n_full > 10, "mechanisms exercised");
    $display("ops=%0d wait=%0d late=%0d br=%0d full=%0d", ndisp, n_wait, n_late, n_br, n_full);

    // ---------------------------------------------- load/store instance
    begin
      automatic logic [XLEN-1:0] m [256];
      automatic int nls = 0, ndone = 0;
      automatic logic isld [512];
      automatic logic [XLEN-1:0] ldv [512];
      for (int i = 0; i < 256; i++) begin m[i] = $urandom; lmem[i] = m[i]; end
      // program: 400 random loads/stores, dispatched up to 10 per cycle
      while (ndone < 400) begin
        @(negedge clk);
        if (lwb[0].valid) begin
          automatic int i = int'(lwb[0].rob) + 256 * (ndone / 256) ;
          chk(int'(lwb[0].rob) == ndone % 256, "memory order");
          if (isld[ndone]) chk(lwb[0].data === ldv[ndone], "load value");
          ndone++; lhead = ROBW'(ndone);
        end
        lin = '0;
        if (lready && nls < 400) begin
          automatic int n = 1 + $urandom % DISP_LS;
          for (int k = 0; k < n && nls < 400; k++) begin
            automatic uop_t u = '0;
            automatic int ad = $urandom % 32;
            u.valid = 1; u.ins.cls = C_LS; u.ins.op = 3'($urandom % 2);
            u.ins.imm = 16'($urandom % 8); u.rob = ROBW'(nls);
            u.s1 = '{rdy: 1'b1, tag: '0, data: XLEN'(ad)};
            u.s2 = '{rdy: 1'b1, tag: '0, data: $urandom};
            u.has_dest = has_dest(u.ins); u.dtag = tag_t'(nls);
            isld[nls] = (u.ins.op == LS_LD);
            if (isld[nls]) ldv[nls] = m[ad + int'(u.ins.imm)];
            else m[ad + int'(u.ins.imm)] = u.s2.data;
            lin[k] = u; nls++;
          end
        end
      end
      lin = '0;
      @(negedge clk);
      for (int i = 0; i < 256; i++) chk(lmem[i] === m[i], "memory contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
