// turboscalar: a processor core with a hot/cold pair of front ends.
//
// A narrow, deep cold pipeline (1 wide, 4 stages) fetches from a
// conventional instruction cache and predicts branches at fetch. As its
// instructions complete, the optimizing back-end packs them into blocks of
// up to six instructions - decoded, dependency-checked, pre-renamed and
// aligned to class-reserved dispatch positions - and strings four blocks
// into a trace. Blocks and traces go into the dynamic instruction cache.
// Whenever the fetch address hits a trace, the short, wide hot pipeline
// (24 wide, 3 stages) takes over: it fetches four blocks per cycle, reads
// all source operands from the silo register file in one cycle and sends
// the group through a sparse dispatch crossbar. Both pipelines feed the
// same out-of-order execution core: five clusters (simple integer,
// load/store, complex integer, floating point, branch) of 128-entry
// reservation stations, single-cycle result forwarding, and a reorder
// buffer that completes in order and recovers from mispredictions.
//
// Ports: program load (im_*), data memory access for the environment
// (dm_*), architected register read (dbg_*), run/halted, and event outputs
// for measurements (completed instructions, how many came from the hot
// pipeline, flushes, hand-offs between the pipelines, multi-cycle dispatch,
// blocks and traces built). Fetch starts at address 0 when run is high.
module turboscalar
  import ts_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  // program load
  input  logic              im_we,
  input  logic [PCW-1:0]    im_addr,
  input  instr_t            im_wdata,
  // data memory, environment side
  input  logic              dm_we,
  input  logic [PCW-1:0]    dm_addr,
  input  logic [XLEN-1:0]   dm_wdata,
  output logic [XLEN-1:0]   dm_rdata,
  // architected registers
  input  logic [REGW-1:0]   dbg_reg,
  output logic [XLEN-1:0]   dbg_data,
  output logic              halted,
  // events
  output logic [5:0]        ev_commit,
  output logic [5:0]        ev_commit_hot,
  output logic              ev_flush,
  output logic              ev_to_hot,
  output logic              ev_to_cold,
  output logic              ev_hot_fetch,
  output logic              ev_cold_fetch,
  output logic              ev_disp_stall,
  output logic              ev_silo_stall,
  output logic              ev_block_built,
  output logic              ev_trace_built,
  output logic              hot_mode
);
  // ------------------------------------------------------------ wires
  wb_t [WB_N-1:0]       wb;
  logic                 flush;
  logic [PCW-1:0]       redirect_pc;
  logic                 ti_en;
  logic [TTW-1:0]       ti_idx;

  logic [PCW-1:0]       lk_pc, lk_next_pc;
  logic                 lk_hit;
  block_t [NBLK-1:0]    lk_blk;
  logic [2:0]           lk_nblk;
  logic [TTW-1:0]       lk_idx;

  logic                 cold_en, cold_ready, cold_empty;
  logic [PCW-1:0]       cold_next_pc;
  logic                 hot_en, hot_ready, hot_empty;

  logic                 bw_en, tw_en;
  block_t               bw_blk;
  trace_t               tw_tr;

  ren_t                 c_ren;
  logic                 c_fire;
  ren_t [HOT_W-1:0]     h_ren, q_ren;
  logic                 h_fire, ren_ok;
  tag_t [HOT_W-1:0]     q_dtag;
  opnd_t [HOT_W-1:0]    q_s1, q_s2;

  logic                 c_out_v, h_out_v;
  dlane_t               c_lane;
  dlane_t [HOT_W-1:0]   h_lane;
  logic [4:0]           h_n;
  logic [TTW-1:0]       h_tt;
  logic                 x_done;
  dlane_t [NLANE-1:0]   x_lane;

  logic [ROBW:0]        rob_free;
  logic [ROBW-1:0]      rob_tail, rob_head, rob_base;
  logic                 rob_alloc;
  logic [4:0]           rob_alloc_n;
  logic [NCLS-1:0]      cl_ready;
  uop_t [DTOT-1:0]      xo;

  logic [HOT_W-1:0]     cm_valid;
  logic [HOT_W-1:0][REGW-1:0] cm_rd;
  logic                 bp_en, bp_taken;
  logic [PCW-1:0]       bp_pc;
  logic                 bk_offer, bk_valid, bk_ready, bk_break;
  logic [PCW-1:0]       bk_pc, bk_next_pc;
  instr_t               bk_ins;

  logic [PCW-1:0]       ls_addr;
  logic                 ls_we;
  logic [XLEN-1:0]      ls_wdata, ls_rdata;
  logic [PCW-1:0]       na_addr [4];
  logic                 na_we [4];
  logic [XLEN-1:0]      na_wdata [4];

  // ------------------------------------------------------------ front end
  fetch_ctrl u_fc (
    .clk, .rst_n, .run, .halted, .flush, .redirect_pc,
    .lk_pc, .lk_hit, .lk_next_pc,
    .cold_en, .cold_ready, .cold_next_pc(cold_next_pc), .cold_empty,
    .hot_en, .hot_ready, .hot_empty,
    .hot_mode, .to_hot(ev_to_hot), .to_cold(ev_to_cold)
  );

  dyn_icache u_dic (
    .clk, .rst_n, .lk_pc, .lk_hit, .lk_blk, .lk_nblk, .lk_next_pc, .lk_idx,
    .bw_en, .bw_blk, .tw_en, .tw_tr, .ti_en, .ti_idx
  );

  cold_pipe u_cold (
    .clk, .rst_n, .flush,
    .fetch_en(cold_en), .fetch_pc(lk_pc), .fetch_ready(cold_ready),
    .fetch_next_pc(cold_next_pc),
    .im_we, .im_addr, .im_wdata,
    .bp_en, .bp_pc, .bp_taken,
    .ren(c_ren), .ren_fire(c_fire), .ren_ok, .ren_dtag(q_dtag[0]),
    .ren_s1(q_s1[0]), .ren_s2(q_s2[0]), .wb_in(wb),
    .out_valid(c_out_v), .out_lane(c_lane), .out_done(x_done && c_out_v),
    .empty(cold_empty)
  );

  hot_pipe u_hot (
    .clk, .rst_n, .flush,
    .fetch_en(hot_en), .fetch_blk(lk_blk), .fetch_nblk(lk_nblk),
    .fetch_next_pc(lk_next_pc), .fetch_tt(lk_idx), .fetch_ready(hot_ready),
    .ren(h_ren), .ren_fire(h_fire), .ren_ok, .ren_dtag(q_dtag),
    .ren_s1(q_s1), .ren_s2(q_s2), .wb_in(wb),
    .out_valid(h_out_v), .out_lane(h_lane), .out_n(h_n), .out_tt(h_tt),
    .out_done(x_done && !c_out_v), .empty(hot_empty)
  );

  // the fetch interlock keeps the two pipelines from renaming together;
  // the cold pipeline uses lane 0 of the register file
  always_comb begin
    q_ren = h_ren;
    if (c_ren.valid) begin
      q_ren    = '0;
      q_ren[0] = c_ren;
    end
  end

  quack_rf u_rf (
    .clk, .rst_n, .ren(q_ren), .ren_fire(c_fire || h_fire), .ren_ok,
    .dtag(q_dtag), .s1(q_s1), .s2(q_s2), .wb,
    .cm_valid, .cm_rd, .flush, .dbg_reg, .dbg_data
  );

  always_comb begin
    x_lane = '0;
    if (c_out_v) x_lane[COLD_LANE] = c_lane;
    else if (h_out_v) x_lane[HOT_W-1:0] = h_lane;
  end

  dispatch_xbar u_xb (
    .clk, .rst_n, .flush,
    .in_valid(c_out_v || h_out_v), .in_lane(x_lane), .in_n(c_out_v ? 5'd1 : h_n),
    .in_done(x_done),
    .rob_free, .rob_tail, .rob_alloc, .rob_alloc_n, .rob_base,
    .cl_ready, .out(xo)
  );

  // ------------------------------------------------------------ execution core
  rob u_rob (
    .clk, .rst_n,
    .alloc_en(rob_alloc), .alloc_n(rob_alloc_n), .alloc_lane(x_lane),
    .alloc_cold(c_out_v), .alloc_tt(h_tt),
    .free(rob_free), .tail(rob_tail), .head(rob_head),
    .wb_in(wb),
    .cm_valid, .cm_rd, .cm_n(ev_commit), .cm_hot_n(ev_commit_hot),
    .flush, .redirect_pc, .ti_en, .ti_idx,
    .bp_en, .bp_pc, .bp_taken,
    .bk_offer, .bk_valid, .bk_pc, .bk_ins, .bk_next_pc, .bk_ready, .bk_break,
    .halted
  );

  rs_cluster #(.DISP(DISP_SI), .ISS(ISS_SI), .CLS(C_SI)) u_si (
    .clk, .rst_n, .flush, .in(xo[11:0]), .ready(cl_ready[C_SI]), .wb_in(wb),
    .rob_head, .mem_addr(na_addr[0]), .mem_we(na_we[0]), .mem_wdata(na_wdata[0]),
    .mem_rdata('0), .wb_out(wb[11:0])
  );
  rs_cluster #(.DISP(DISP_LS), .ISS(ISS_LS), .CLS(C_LS)) u_ls (
    .clk, .rst_n, .flush, .in(xo[21:12]), .ready(cl_ready[C_LS]), .wb_in(wb),
    .rob_head, .mem_addr(ls_addr), .mem_we(ls_we), .mem_wdata(ls_wdata),
    .mem_rdata(ls_rdata), .wb_out(wb[12:12])
  );
  rs_cluster #(.DISP(DISP_CX), .ISS(ISS_CX), .CLS(C_CX)) u_cx (
    .clk, .rst_n, .flush, .in(xo[23:22]), .ready(cl_ready[C_CX]), .wb_in(wb),
    .rob_head, .mem_addr(na_addr[1]), .mem_we(na_we[1]), .mem_wdata(na_wdata[1]),
    .mem_rdata('0), .wb_out(wb[14:13])
  );
  rs_cluster #(.DISP(DISP_FP), .ISS(ISS_FP), .CLS(C_FP)) u_fp (
    .clk, .rst_n, .flush, .in(xo[24:24]), .ready(cl_ready[C_FP]), .wb_in(wb),
    .rob_head, .mem_addr(na_addr[2]), .mem_we(na_we[2]), .mem_wdata(na_wdata[2]),
    .mem_rdata('0), .wb_out(wb[15:15])
  );
  rs_cluster #(.DISP(DISP_BR), .ISS(ISS_BR), .CLS(C_BR)) u_br (
    .clk, .rst_n, .flush, .in(xo[28:25]), .ready(cl_ready[C_BR]), .wb_in(wb),
    .rob_head, .mem_addr(na_addr[3]), .mem_we(na_we[3]), .mem_wdata(na_wdata[3]),
    .mem_rdata('0), .wb_out(wb[19:16])
  );

  dmem u_dm (
    .clk, .addr(ls_addr), .we(ls_we), .wdata(ls_wdata), .rdata(ls_rdata),
    .ext_we(dm_we), .ext_addr(dm_addr), .ext_wdata(dm_wdata), .ext_rdata(dm_rdata)
  );

  // ------------------------------------------------------------ back-end
  backend u_be (
    .clk, .rst_n, .in_offer(bk_offer), .in_valid(bk_valid), .in_pc(bk_pc), .in_ins(bk_ins),
    .in_next_pc(bk_next_pc), .in_ready(bk_ready), .brk(bk_break),
    .bw_en, .bw_blk, .tw_en, .tw_tr
  );

  // ------------------------------------------------------------ events
  assign ev_flush       = flush;
  assign ev_hot_fetch   = hot_en;
  assign ev_cold_fetch  = cold_en;
  assign ev_disp_stall  = (c_out_v || h_out_v) && !x_done;
  assign ev_silo_stall  = (c_ren.valid || (h_ren[0].valid)) && !ren_ok;
  assign ev_block_built = bw_en;
  assign ev_trace_built = tw_en;
endmodule
