// tb_branch_pred: self-checking test of the bimodal branch predictor.
//
// How it works: random training updates and lookups are applied; a model
// keeps one 2-bit saturating counter per index (reset value 1, weakly not
// taken) and every lookup's predicted direction is compared with the model's
// counter MSB. Lookups are combinational; updates take effect at the clock.
// Interface checked: lk_pc/lk_taken, up_en/up_pc/up_taken.
// The predictor kind and size are this design's choice; the test follows it.
// Prints TB_RESULT checks/failures; a watchdog ends a hung run.
module tb_branch_pred;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [PCW-1:0] lk_pc, up_pc;
  logic lk_taken, up_en, up_taken;
  int checks = 0, failures = 0;
  logic [1:0] m [1024];

  branch_pred dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    for (int i = 0; i < 1024; i++) m[i] = 2'd1;
    up_en = 0; up_pc = 0; up_taken = 0; lk_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      up_en = 1'($urandom); up_pc = PCW'($urandom % 64); up_taken = 1'($urandom);
      lk_pc = PCW'($urandom % 64);
      #1;
      checks++;
      if (lk_taken !== m[lk_pc[9:0]][1]) begin
        failures++;
        if (failures < 5) $display("mismatch pc=%0d got %0b", lk_pc, lk_taken);
      end
      @(posedge clk);
      if (up_en) begin
        if (up_taken && m[up_pc[9:0]] != 3) m[up_pc[9:0]]++;
        else if (!up_taken && m[up_pc[9:0]] != 0) m[up_pc[9:0]]--;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
