// branch_pred: fetch-time branch predictor of the cold pipeline.
//
// A table of 2-bit saturating counters indexed by the low bits of the branch
// address (bimodal). The cold pipeline asks at fetch whether a conditional
// branch is taken (counter >= 2); direct branch targets come from the
// predecoded instruction, unconditional branches are always taken. Counters
// are trained with completed cold-pipeline branches, one per cycle.
// Counters reset to weakly not-taken (1). Lookup is combinational, update
// takes effect at the clock edge.
// The description only says the cold pipeline predicts branches early in its
// pipeline; the bimodal scheme and its 1024 entries are choices of this design.
module branch_pred
  import ts_pkg::*;
#(
  parameter int N = 1024
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PCW-1:0]  lk_pc,
  output logic            lk_taken,
  input  logic            up_en,
  input  logic [PCW-1:0]  up_pc,
  input  logic            up_taken
);
  localparam int IW = $clog2(N);
  logic [1:0] ctr [N];

  assign lk_taken = ctr[lk_pc[IW-1:0]][1];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < N; i++) ctr[i] <= 2'd1;
    end else if (up_en) begin
      automatic logic [1:0] c = ctr[up_pc[IW-1:0]];
      if (up_taken && c != 2'd3)       ctr[up_pc[IW-1:0]] <= c + 2'd1;
      else if (!up_taken && c != 2'd0) ctr[up_pc[IW-1:0]] <= c - 2'd1;
    end
endmodule
