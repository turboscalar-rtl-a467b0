// rs_cluster: one execution cluster - a reservation station and its
// functional units.
//
// The execution core groups its units by instruction class; each cluster has
// a 128-entry reservation station that takes up to DISP instructions per
// cycle from the dispatch crossbar and issues out of order. Waiting source
// operands capture results from the writeback lanes by tag (the same lanes
// feed the register file), and the issue selection sees this cycle's
// writebacks too, so a dependent instruction issues in the cycle after its
// producer: single-cycle result forwarding.
//
// Up to ISS ready entries issue per cycle, lowest entry index first, and
// execute in one cycle; the result is registered onto the cluster's ISS
// writeback lanes. The branch cluster resolves the successor address and
// flags a misprediction when it differs from the predicted one. The
// load/store cluster (CLS = C_LS) issues only the oldest instruction of the
// machine (its reorder-buffer entry is the head), so memory is accessed in
// program order and never speculatively; loads read mem_rdata in the issue
// cycle, stores write through mem_we.
//
// A cluster only builds the functional units of its own class (CLS); the
// dispatch crossbar sends it nothing else.
//
// ready is high when at least DISP entries are free. flush empties the
// station and drops the results in flight.
// The description gives the 128 entries and out-of-order issue; the issue
// width (it asks for unbounded functional units), the oldest-first rule for
// memory and the one-cycle latency of every unit are choices of this design.
module rs_cluster
  import ts_pkg::*;
#(
  parameter int   N     = RS_N,
  parameter int   DISP  = DISP_SI,
  parameter int   ISS   = ISS_SI,
  parameter iclass_e CLS = C_SI     // the class whose units this cluster holds
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 flush,
  input  uop_t [DISP-1:0]      in,
  output logic                 ready,
  input  wb_t [WB_N-1:0]       wb_in,
  input  logic [ROBW-1:0]      rob_head,
  output logic [PCW-1:0]       mem_addr,
  output logic                 mem_we,
  output logic [XLEN-1:0]      mem_wdata,
  input  logic [XLEN-1:0]      mem_rdata,
  output wb_t [ISS-1:0]        wb_out
);
  localparam int IW = $clog2(N);
  localparam bit IS_LS = (CLS == C_LS);

  uop_t           ent [N];
  logic [N-1:0]   vld;
  uop_t           cur [N];       // entries with this cycle's results captured
  logic [N-1:0]   iss;
  logic [IW-1:0]  iss_idx [ISS];
  logic [ISS-1:0] iss_v;
  logic [IW-1:0]  ins_idx [DISP];
  logic [DISP-1:0] ins_v;
  wb_t [ISS-1:0]  res;

  // issue: the lowest-numbered ready entries; insert: the lowest free ones
  always_comb begin
    logic [IW:0] ni, nd, nfree;
    ni = '0;
    nd = '0;
    nfree = '0;
    iss = '0;
    for (int k = 0; k < ISS; k++) begin iss_idx[k] = '0; iss_v[k] = 1'b0; end
    for (int k = 0; k < DISP; k++) begin ins_idx[k] = '0; ins_v[k] = 1'b0; end
    for (int i = 0; i < N; i++) begin
      cur[i]    = ent[i];
      cur[i].s1 = snoop(ent[i].s1, wb_in);
      cur[i].s2 = snoop(ent[i].s2, wb_in);
      if (vld[i] && cur[i].s1.rdy && cur[i].s2.rdy && 32'(ni) < ISS &&
          (!IS_LS || ent[i].rob == rob_head)) begin
        iss[i] = 1'b1;
        for (int k = 0; k < ISS; k++)
          if (32'(ni) == k) begin iss_idx[k] = IW'(i); iss_v[k] = 1'b1; end
        ni = ni + 1'b1;
      end
      if (!vld[i]) begin
        for (int k = 0; k < DISP; k++)
          if (32'(nd) == k) begin ins_idx[k] = IW'(i); ins_v[k] = 1'b1; end
        if (32'(nd) < DISP) nd = nd + 1'b1;
        nfree = nfree + 1'b1;
      end
    end
    ready = 32'(nfree) >= DISP;
  end

  // execute: only the units of this cluster's class
  always_comb begin
    mem_addr  = '0;
    mem_we    = 1'b0;
    mem_wdata = '0;
    for (int k = 0; k < ISS; k++) begin
      automatic uop_t u = cur[iss_idx[k]];
      automatic logic t;
      res[k]          = '0;
      res[k].valid    = iss_v[k];
      res[k].has_dest = u.has_dest;
      res[k].tag      = u.dtag;
      res[k].rob      = u.rob;
      case (CLS)
        C_BR: begin
          t               = br_taken(u.ins, u.s1.data, u.s2.data);
          res[k].is_br    = 1'b1;
          res[k].taken    = t;
          res[k].next_pc  = t ? br_target(u.ins, u.pc) : u.pc + 1'b1;
          res[k].mispred  = res[k].next_pc != u.pred_pc;
        end
        C_LS: begin
          if (k == 0) begin
            mem_addr  = PCW'(u.s1.data + XLEN'(signed'(u.ins.imm)));
            mem_we    = iss_v[k] && u.ins.op == LS_ST;
            mem_wdata = u.s2.data;
          end
          res[k].data = mem_rdata;
        end
        C_CX:    res[k].data = (u.ins.op == CX_SLT) ? XLEN'($signed(u.s1.data) < $signed(u.s2.data))
                                                     : u.s1.data * u.s2.data;
        C_FP:    res[k].data = u.s1.data + u.s2.data;
        default: res[k].data = alu(u.ins, u.s1.data, u.s2.data);
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      vld    <= '0;
      wb_out <= '0;
    end else if (flush) begin
      vld    <= '0;
      wb_out <= '0;
    end else begin
      wb_out <= res;
      for (int i = 0; i < N; i++)
        if (iss[i]) vld[i] <= 1'b0;
      for (int k = 0; k < DISP; k++)
        if (in[k].valid && ins_v[k]) vld[ins_idx[k]] <= 1'b1;
    end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) ent[i] <= cur[i];
    for (int k = 0; k < DISP; k++)
      if (in[k].valid && ins_v[k]) begin
        ent[ins_idx[k]]    <= in[k];
        ent[ins_idx[k]].s1 <= snoop(in[k].s1, wb_in);
        ent[ins_idx[k]].s2 <= snoop(in[k].s2, wb_in);
      end
  end

  // dispatch only happens while the station reports room
  always_ff @(posedge clk)
    if (rst_n && !flush)
      for (int k = 0; k < DISP; k++)
        assert (!in[k].valid || ready)
          else $error("rs_cluster: dispatch into a full reservation station");
endmodule
