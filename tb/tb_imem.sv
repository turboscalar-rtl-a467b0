// tb_imem: self-checking test of the instruction memory (L1 I-cache model).
//
// How it works: random instructions are written through the load port at
// random addresses; a model array holds the expected contents. Reads are
// combinational, so each cycle a random address is read and compared with the
// model, including a read of an address written in the previous cycle.
// Interface checked: rd_pc/rd_ins, wr_en/wr_pc/wr_ins. The perfect-memory
// behaviour (no misses) is this design's choice.
// Prints TB_RESULT checks/failures; a watchdog ends a hung run.
module tb_imem;
  import ts_pkg::*;
  logic clk = 0;
  logic [PCW-1:0] rd_pc, wr_pc;
  instr_t rd_ins, wr_ins;
  logic wr_en;
  int checks = 0, failures = 0;
  instr_t m [8192];
  logic   w [8192];

  imem dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    for (int i = 0; i < 8192; i++) w[i] = 0;
    wr_en = 0; wr_pc = 0; wr_ins = '0; rd_pc = 0;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      wr_en = 1'($urandom); wr_pc = PCW'($urandom % 512);
      wr_ins = instr_t'({$urandom, $urandom});
      rd_pc = (it % 3 == 0) ? wr_pc : PCW'($urandom % 512);
      #1;
      if (w[rd_pc[12:0]]) begin
        checks++;
        if (rd_ins !== m[rd_pc[12:0]]) failures++;
      end
      @(posedge clk);
      if (wr_en) begin m[wr_pc[12:0]] = wr_ins; w[wr_pc[12:0]] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
