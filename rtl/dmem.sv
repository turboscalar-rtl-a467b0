// dmem: data memory, a perfect (always-hit) word-addressed memory.
//
// 8192 32-bit words, the size of the 32 KB first-level data cache of the
// evaluated machine. The load/store cluster reads combinationally and writes
// at the clock edge; a second read port and a second write port let the
// environment initialise and inspect memory. The cache hierarchy itself is
// not modelled: this is a simplification of this design.
module dmem
  import ts_pkg::*;
#(
  parameter int N = 8192
) (
  input  logic             clk,
  input  logic [PCW-1:0]   addr,
  input  logic             we,
  input  logic [XLEN-1:0]  wdata,
  output logic [XLEN-1:0]  rdata,
  input  logic             ext_we,
  input  logic [PCW-1:0]   ext_addr,
  input  logic [XLEN-1:0]  ext_wdata,
  output logic [XLEN-1:0]  ext_rdata
);
  localparam int IW = $clog2(N);
  logic [XLEN-1:0] mem [N];

  assign rdata     = mem[addr[IW-1:0]];
  assign ext_rdata = mem[ext_addr[IW-1:0]];

  always_ff @(posedge clk) begin
    if (ext_we) mem[ext_addr[IW-1:0]] <= ext_wdata;
    if (we)     mem[addr[IW-1:0]]     <= wdata;
  end
endmodule
