// cold_pipe: the cold pipeline - a conventional, narrow and deep superscalar
// front end (1 instruction wide, 4 stages).
//
//   F  fetch from the instruction cache and predict the successor address
//      (bimodal predictor for conditional branches, predecoded targets);
//   D  decode: register usage and destination of the instruction;
//   R  rename and read: allocate a new silo version for the destination and
//      read the source operands from the silo register file;
//   S  dispatch through the crossbar's cold lane into a reservation station.
//
// Stages hand over with valid/ready; a stage holds when the next is busy, R
// also waits for room in the register file, S waits for the crossbar. The
// instruction held in S keeps capturing results from the writeback lanes.
// The fetch controller decides when this pipeline may fetch (fetch_en with
// fetch_pc); fetch_next_pc is the predicted successor of the instruction
// fetched this cycle. empty tells the fetch controller that every fetched
// instruction has been dispatched (the hot/cold fetch interlock).
// flush empties all stages. The stage split and the predictor are choices of
// this design; width 1 and depth 4 are the configuration the design uses.
module cold_pipe
  import ts_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  // fetch
  input  logic              fetch_en,
  input  logic [PCW-1:0]    fetch_pc,
  output logic              fetch_ready,
  output logic [PCW-1:0]    fetch_next_pc,
  // program load
  input  logic              im_we,
  input  logic [PCW-1:0]    im_addr,
  input  instr_t            im_wdata,
  // predictor training
  input  logic              bp_en,
  input  logic [PCW-1:0]    bp_pc,
  input  logic              bp_taken,
  // register file
  output ren_t              ren,
  output logic              ren_fire,
  input  logic              ren_ok,
  input  tag_t              ren_dtag,
  input  opnd_t             ren_s1,
  input  opnd_t             ren_s2,
  input  wb_t [WB_N-1:0]    wb_in,
  // dispatch
  output logic              out_valid,
  output dlane_t            out_lane,
  input  logic              out_done,
  output logic              empty
);
  instr_t         f_ins;
  logic           f_pt;
  logic           d_v, r_v, s_v;
  logic [PCW-1:0] d_pc, d_pred, r_pc, r_pred;
  instr_t         d_ins, r_ins;
  uop_t           s_u;
  logic           s_free, r_free, d_free, f_go;

  imem u_imem (.clk, .rd_pc(fetch_pc), .rd_ins(f_ins),
               .wr_en(im_we), .wr_pc(im_addr), .wr_ins(im_wdata));

  branch_pred u_bp (.clk, .rst_n, .lk_pc(fetch_pc), .lk_taken(f_pt),
                    .up_en(bp_en), .up_pc(bp_pc), .up_taken(bp_taken));

  always_comb begin
    fetch_next_pc = fetch_pc + 1'b1;
    if (f_ins.cls == C_BR && (!is_cond_br(f_ins) || f_pt))
      fetch_next_pc = br_target(f_ins, fetch_pc);
  end

  always_comb begin
    s_free      = !s_v || out_done;
    ren         = '0;
    ren.valid   = r_v;
    ren.wr      = r_v && has_dest(r_ins);
    ren.rd      = r_ins.rd;
    ren.u1      = uses_rs1(r_ins);
    ren.u2      = uses_rs2(r_ins);
    ren.rs1     = r_ins.rs1;
    ren.rs2     = r_ins.rs2;
    ren_fire    = r_v && s_free && ren_ok;
    r_free      = !r_v || ren_fire;
    d_free      = !d_v || r_free;
    fetch_ready = d_free;
    f_go        = fetch_en && d_free;
    empty       = !d_v && !r_v && !s_v;
    out_valid   = s_v;
    out_lane    = '0;
    out_lane.u  = s_u;
    out_lane.u.valid = s_v;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      d_v <= 1'b0;
      r_v <= 1'b0;
      s_v <= 1'b0;
    end else if (flush) begin
      d_v <= 1'b0;
      r_v <= 1'b0;
      s_v <= 1'b0;
    end else begin
      if (d_free) d_v <= f_go;
      if (r_free) r_v <= d_v;
      if (s_free) s_v <= ren_fire;
    end

  always_ff @(posedge clk) begin
    if (d_free) begin
      d_pc   <= fetch_pc;
      d_ins  <= f_ins;
      d_pred <= fetch_next_pc;
    end
    if (r_free) begin
      r_pc   <= d_pc;
      r_ins  <= d_ins;
      r_pred <= d_pred;
    end
    if (s_free) begin
      s_u          <= '0;
      s_u.valid    <= 1'b1;
      s_u.ins      <= r_ins;
      s_u.pc       <= r_pc;
      s_u.pred_pc  <= r_pred;
      s_u.has_dest <= has_dest(r_ins);
      s_u.dtag     <= ren_dtag;
      s_u.s1       <= ren_s1;
      s_u.s2       <= ren_s2;
    end else begin
      s_u.s1 <= snoop(s_u.s1, wb_in);
      s_u.s2 <= snoop(s_u.s2, wb_in);
    end
  end
endmodule
