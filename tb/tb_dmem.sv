// tb_dmem: self-checking test of the data memory (L1 D-cache model).
//
// How it works: random writes through the core port and the environment
// port, random reads on both; a model array gives the expected word. Reads
// are combinational, writes land at the clock edge; when both ports write the
// same word in one cycle the core port wins (it is written last).
// Interface checked: addr/we/wdata/rdata and ext_we/ext_addr/ext_wdata/ext_rdata.
// The perfect single-cycle memory is this design's choice.
// Prints TB_RESULT checks/failures; a watchdog ends a hung run.
module tb_dmem;
  import ts_pkg::*;
  logic clk = 0;
  logic [PCW-1:0] addr, ext_addr;
  logic we, ext_we;
  logic [XLEN-1:0] wdata, rdata, ext_wdata, ext_rdata;
  int checks = 0, failures = 0;
  logic [XLEN-1:0] m [8192];
  logic w [8192];

  dmem dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    for (int i = 0; i < 8192; i++) w[i] = 0;
    {we, ext_we} = 0; addr = 0; ext_addr = 0; wdata = 0; ext_wdata = 0;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      we = 1'($urandom); ext_we = 1'($urandom);
      addr = PCW'($urandom % 256); ext_addr = PCW'($urandom % 256);
      wdata = $urandom; ext_wdata = $urandom;
      #1;
      if (w[addr[12:0]])     begin checks++; if (rdata !== m[addr[12:0]]) failures++; end
      if (w[ext_addr[12:0]]) begin checks++; if (ext_rdata !== m[ext_addr[12:0]]) failures++; end
      @(posedge clk);
      if (ext_we) begin m[ext_addr[12:0]] = ext_wdata; w[ext_addr[12:0]] = 1; end
      if (we)     begin m[addr[12:0]] = wdata; w[addr[12:0]] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
