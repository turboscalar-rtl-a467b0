// fetch_ctrl: chooses, every cycle, which pipeline fetches (hot or cold).
//
// The hot pipeline is used whenever possible. The fetch address is looked up
// in the trace table of the dynamic instruction cache; a hit means the trace
// can be fetched next, a miss sends fetch to the cold pipeline. Before the
// other pipeline takes over, the active one must have dispatched everything
// it fetched (fetch interlock), so that instructions from the two pipelines
// are renamed in program order; the controller waits in a drain state for
// that. After a misprediction flush, fetch restarts at the corrected address
// in cold mode and moves to the hot pipeline as soon as the trace table hits.
//
// States: COLD (cold pipeline fetches, fetch address follows its
// prediction), DRAIN_C (trace hit seen, waiting for the cold pipeline to
// empty), HOT (traces fetched, address follows each trace's successor),
// DRAIN_H (trace miss seen, waiting for the hot pipeline to empty).
// Fetch starts at address 0 once run is high and stops for good at halted.
// to_hot / to_cold pulse when control changes hands.
module fetch_ctrl
  import ts_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic            halted,
  input  logic            flush,
  input  logic [PCW-1:0]  redirect_pc,
  // trace table lookup
  output logic [PCW-1:0]  lk_pc,
  input  logic            lk_hit,
  input  logic [PCW-1:0]  lk_next_pc,
  // cold pipeline
  output logic            cold_en,
  input  logic            cold_ready,
  input  logic [PCW-1:0]  cold_next_pc,
  input  logic            cold_empty,
  // hot pipeline
  output logic            hot_en,
  input  logic            hot_ready,
  input  logic            hot_empty,
  // status
  output logic            hot_mode,
  output logic            to_hot,
  output logic            to_cold
);
  typedef enum logic [1:0] {COLD, DRAIN_C, HOT, DRAIN_H} state_e;
  state_e         st, st_d;
  logic [PCW-1:0] fpc, fpc_d;

  assign lk_pc    = fpc;
  assign hot_mode = (st == HOT);

  always_comb begin
    st_d    = st;
    fpc_d   = fpc;
    cold_en = 1'b0;
    hot_en  = 1'b0;
    to_hot  = 1'b0;
    to_cold = 1'b0;
    if (flush) begin
      st_d  = COLD;
      fpc_d = redirect_pc;
    end else if (run && !halted) begin
      case (st)
        COLD:
          if (lk_hit) st_d = DRAIN_C;
          else if (cold_ready) begin
            cold_en = 1'b1;
            fpc_d   = cold_next_pc;
          end
        DRAIN_C:
          if (cold_empty) begin
            st_d   = HOT;
            to_hot = 1'b1;
          end
        HOT:
          if (!lk_hit) st_d = DRAIN_H;
          else if (hot_ready) begin
            hot_en = 1'b1;
            fpc_d  = lk_next_pc;
          end
        default:
          if (hot_empty) begin
            st_d    = COLD;
            to_cold = 1'b1;
          end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st  <= COLD;
      fpc <= '0;
    end else begin
      st  <= st_d;
      fpc <= fpc_d;
    end

  // the two pipelines never fetch in the same cycle
  always_ff @(posedge clk)
    if (rst_n) assert (!(cold_en && hot_en)) else $error("fetch_ctrl: both pipelines fetch");
endmodule
