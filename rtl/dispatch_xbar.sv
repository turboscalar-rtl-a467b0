// dispatch_xbar: the sparse dispatch crossbar between the front end and the
// reservation-station clusters, together with reorder-buffer allocation.
//
// A group of up to 24 hot-pipeline instructions (four blocks of six dispatch
// positions) or one cold-pipeline instruction is presented at once. Each
// dispatch position of a block is reserved for at most two instruction
// classes (see ts_pkg::pos_mask), so the crossbar of a class only connects
// the positions that may hold that class, plus the single cold lane.
// Per cycle at most 12 simple-integer, 10 load/store, 2 complex-integer,
// 1 floating-point and 4 branch instructions are dispatched; the class
// crossbars are therefore 12:12, 12:10, 4:2, 4:1 and 4:4 over the hot lanes
// (plus the cold lane). A group with more instructions of a class than its
// limit, or meeting a full reservation station, takes several cycles: lanes
// already sent are remembered and the front end is stalled (in_done low).
//
// Reorder-buffer entries for the whole group are allocated in the group's
// first cycle (all or nothing); lane i gets entry tail + ofs[i], its
// program-order offset. Outputs per class are packed into one array: SI at
// 0..11, LS at 12..21, CX at 22..23, FP at 24, BR at 25..28.
// Timing: combinational from inputs to outputs; the done mask and allocation
// state are registered. flush abandons the group.
module dispatch_xbar
  import ts_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   flush,
  input  logic                   in_valid,
  input  dlane_t [NLANE-1:0]     in_lane,
  input  logic [4:0]             in_n,
  output logic                   in_done,
  // reorder buffer
  input  logic [ROBW:0]          rob_free,
  input  logic [ROBW-1:0]        rob_tail,
  output logic                   rob_alloc,
  output logic [4:0]             rob_alloc_n,
  output logic [ROBW-1:0]        rob_base,
  // reservation stations
  input  logic [NCLS-1:0]        cl_ready,
  output uop_t [DTOT-1:0]        out
);
  function automatic int cls_base(input int c);
    case (c)
      0: cls_base = 0;
      1: cls_base = DISP_SI;
      2: cls_base = DISP_SI + DISP_LS;
      3: cls_base = DISP_SI + DISP_LS + DISP_CX;
      default: cls_base = DISP_SI + DISP_LS + DISP_CX + DISP_FP;
    endcase
  endfunction

  // a lane may reach a class crossbar only where its dispatch position allows
  function automatic logic wired(input int l, input int c);
    if (l == COLD_LANE) wired = 1'b1;
    else                wired = pos_mask(l % BLK_W)[c];
  endfunction

  logic [NLANE-1:0] sent_q, sent_d;
  logic             alloc_q;
  logic [ROBW-1:0]  base_q;
  logic             go;

  always_comb begin
    go          = in_valid && (alloc_q || rob_free >= (ROBW+1)'(in_n));
    rob_alloc   = in_valid && !alloc_q && go && !flush;
    rob_alloc_n = in_n;
    rob_base    = alloc_q ? base_q : rob_tail;
    sent_d      = sent_q;
    out         = '0;
    for (int c = 0; c < NCLS; c++) begin
      automatic int n = 0;
      for (int l = 0; l < NLANE; l++)
        if (wired(l, c))
          if (go && cl_ready[c] && in_lane[l].u.valid && !sent_q[l] &&
              int'(in_lane[l].u.ins.cls) == c && n < disp_of(c)) begin
            out[cls_base(c) + n]     = in_lane[l].u;
            out[cls_base(c) + n].rob = rob_base + ROBW'(in_lane[l].ofs);
            sent_d[l] = 1'b1;
            n++;
          end
    end
    in_done = go;
    for (int l = 0; l < NLANE; l++)
      if (in_lane[l].u.valid && !sent_d[l]) in_done = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sent_q  <= '0;
      alloc_q <= 1'b0;
      base_q  <= '0;
    end else if (flush || in_done || !in_valid) begin
      sent_q  <= '0;
      alloc_q <= 1'b0;
    end else if (go) begin
      sent_q  <= sent_d;
      alloc_q <= 1'b1;
      base_q  <= rob_base;
    end

  // a hot instruction must sit in a position that is reserved for its class
  always_ff @(posedge clk)
    if (rst_n && in_valid)
      for (int l = 0; l < HOT_W; l++)
        assert (!in_lane[l].u.valid || pos_mask(l % BLK_W)[in_lane[l].u.ins.cls])
          else $error("dispatch_xbar: lane %0d holds a class its position does not take", l);
endmodule
