// hot_pipe: the hot pipeline - a short (3-stage) and wide (24-instruction)
// front end fed by the dynamic instruction cache.
//
//   1  fetch: the fetch controller hands over one trace of up to four blocks
//      read from the four block-cache copies; they are latched in the first
//      instruction buffer. There is no branch prediction here: the path was
//      chosen when the trace was built.
//   2  tiny decode and operand read: the tiny decoder expands the blocks'
//      predecoded dependency information to the whole group and the silo
//      register file returns, for all 24 instructions at once, the rename tag
//      of each destination and the value (or tag) of each source. The result
//      is latched in the second instruction buffer.
//   3  dispatch through the sparse crossbar (which may take more than one
//      cycle for a group, holding this stage).
//
// Stage 2 waits for a free second buffer and for room in the silos. The
// second buffer keeps capturing results from the writeback lanes while it
// waits. empty (no instruction in either buffer) serves the hot/cold fetch
// interlock. flush empties both buffers. Instructions keep the dispatch
// positions the back-end aligned them to: lane = 6 * block + position.
module hot_pipe
  import ts_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  flush,
  // fetch
  input  logic                  fetch_en,
  input  block_t [NBLK-1:0]     fetch_blk,
  input  logic [2:0]            fetch_nblk,
  input  logic [PCW-1:0]        fetch_next_pc,
  input  logic [TTW-1:0]        fetch_tt,
  output logic                  fetch_ready,
  // register file
  output ren_t [HOT_W-1:0]      ren,
  output logic                  ren_fire,
  input  logic                  ren_ok,
  input  tag_t [HOT_W-1:0]      ren_dtag,
  input  opnd_t [HOT_W-1:0]     ren_s1,
  input  opnd_t [HOT_W-1:0]     ren_s2,
  input  wb_t [WB_N-1:0]        wb_in,
  // dispatch
  output logic                  out_valid,
  output dlane_t [HOT_W-1:0]    out_lane,
  output logic [4:0]            out_n,
  output logic [TTW-1:0]        out_tt,
  input  logic                  out_done,
  output logic                  empty
);
  logic               ib1_v, ib2_v;
  block_t [NBLK-1:0]  ib1_blk;
  logic [2:0]         ib1_nblk;
  logic [PCW-1:0]     ib1_next;
  logic [TTW-1:0]     ib1_tt;
  dlane_t [HOT_W-1:0] td_lane, ib2_lane;
  logic [4:0]         td_n, ib2_n;
  logic [TTW-1:0]     ib2_tt;
  logic               ib2_free, ib1_free;

  tiny_decoder u_td (.blk(ib1_blk), .nblk(ib1_nblk), .next_pc(ib1_next),
                     .ren, .lane(td_lane), .nins(td_n));

  always_comb begin
    ib2_free    = !ib2_v || out_done;
    ren_fire    = ib1_v && ib2_free && ren_ok;
    ib1_free    = !ib1_v || ren_fire;
    fetch_ready = ib1_free;
    empty       = !ib1_v && !ib2_v;
    out_valid   = ib2_v;
    out_lane    = ib2_lane;
    out_n       = ib2_n;
    out_tt      = ib2_tt;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ib1_v <= 1'b0;
      ib2_v <= 1'b0;
    end else if (flush) begin
      ib1_v <= 1'b0;
      ib2_v <= 1'b0;
    end else begin
      if (ib1_free) ib1_v <= fetch_en;
      if (ib2_free) ib2_v <= ren_fire;
    end

  always_ff @(posedge clk) begin
    if (ib1_free) begin
      ib1_blk  <= fetch_blk;
      ib1_nblk <= fetch_nblk;
      ib1_next <= fetch_next_pc;
      ib1_tt   <= fetch_tt;
    end
    if (ib2_free) begin
      ib2_n  <= td_n;
      ib2_tt <= ib1_tt;
      for (int l = 0; l < HOT_W; l++) begin
        ib2_lane[l]        <= td_lane[l];
        ib2_lane[l].u.dtag <= ren_dtag[l];
        ib2_lane[l].u.s1   <= ren_s1[l];
        ib2_lane[l].u.s2   <= ren_s2[l];
      end
    end else
      for (int l = 0; l < HOT_W; l++) begin
        ib2_lane[l].u.s1 <= snoop(ib2_lane[l].u.s1, wb_in);
        ib2_lane[l].u.s2 <= snoop(ib2_lane[l].u.s2, wb_in);
      end
  end
endmodule
