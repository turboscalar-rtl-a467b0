// tb_fetch_ctrl: self-checking test of the hot/cold fetch controller.
//
// How it works: all inputs (trace hit, pipeline ready/empty flags, next
// addresses, flush, halt) are driven randomly. A reference model of the
// four-state controller (cold, draining cold, hot, draining hot) predicts
// every output each cycle. Independent rules are also checked: the two
// pipelines never fetch in the same cycle, the hot pipeline only fetches in
// hot mode on a trace hit, the hand-over to hot happens only once the cold
// pipeline is empty and the hand-over to cold only once the hot pipeline is
// empty (the fetch interlock), and a flush restarts cold at the redirect.
// Outputs are combinational from state and inputs; state moves on the clock.
// Prints TB_RESULT checks/failures; a watchdog ends a hung run.
module tb_fetch_ctrl;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0;
  logic run, halted, flush, lk_hit, cold_ready, cold_empty, hot_ready, hot_empty;
  logic [PCW-1:0] redirect_pc, lk_pc, lk_next_pc, cold_next_pc;
  logic cold_en, hot_en, hot_mode, to_hot, to_cold;
  int checks = 0, failures = 0, n_hot = 0, n_cold = 0;
  int st = 0;              // 0 cold, 1 drain cold, 2 hot, 3 drain hot
  logic [PCW-1:0] fpc = 0;

  fetch_ctrl dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("t=%0t %s", $time, what); end
  endtask

  initial begin
    {run, halted, flush, lk_hit, cold_ready, cold_empty, hot_ready, hot_empty} = 0;
    redirect_pc = 0; lk_next_pc = 0; cold_next_pc = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      automatic int nst;
      automatic logic [PCW-1:0] nfpc;
      automatic logic ec, eh, th, tc;
      @(negedge clk);
      run = ($urandom % 16) != 0; halted = ($urandom % 64) == 0; flush = ($urandom % 32) == 0;
      lk_hit = ($urandom % 3) != 0; cold_ready = 1'($urandom); cold_empty = 1'($urandom);
      hot_ready = 1'($urandom); hot_empty = 1'($urandom);
      redirect_pc = PCW'($urandom); lk_next_pc = PCW'($urandom); cold_next_pc = PCW'($urandom);
      #1;
      nst = st; nfpc = fpc; ec = 0; eh = 0; th = 0; tc = 0;
      if (flush) begin nst = 0; nfpc = redirect_pc; end
      else if (run && !halted)
        case (st)
          0: if (lk_hit) nst = 1; else if (cold_ready) begin ec = 1; nfpc = cold_next_pc; end
          1: if (cold_empty) begin nst = 2; th = 1; end
          2: if (!lk_hit) nst = 3; else if (hot_ready) begin eh = 1; nfpc = lk_next_pc; end
          default: if (hot_empty) begin nst = 0; tc = 1; end
        endcase
      chk(lk_pc === fpc, "lk_pc");
      chk(hot_mode === (st == 2), "hot_mode");
      chk(cold_en === ec, "cold_en");
      chk(hot_en === eh, "hot_en");
      chk(to_hot === th, "to_hot");
      chk(to_cold === tc, "to_cold");
      chk(!(cold_en && hot_en), "both fetch");
      chk(!hot_en || (hot_mode && lk_hit), "hot fetch outside hot mode");
      chk(!to_hot || cold_empty, "interlock cold->hot");
      chk(!to_cold || hot_empty, "interlock hot->cold");
      n_hot += th; n_cold += tc;
      @(posedge clk);
      st = nst; fpc = nfpc;
    end
    chk(n_hot > 10 && n_cold > 10, "hand-overs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
