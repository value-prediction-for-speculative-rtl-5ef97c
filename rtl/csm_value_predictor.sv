// csm_value_predictor: trace output value prediction unit for a clustered
// speculative multithreaded processor.
//
// In such a processor each speculative thread runs one iteration of an
// innermost loop (a loop trace) on its own thread unit. Registers a trace
// inherits from the trace before it are the values that flow between
// threads; if they are predicted correctly the threads run as if they were
// independent. This unit predicts the value a register holds at the end of
// a trace, which is the value the following thread starts with. The thread
// speculation logic asks for a prediction when it spawns the next thread,
// passing the trace pseudo-identifier (start address and conditional-branch
// outcome vector), the register and the register's value at the start of
// the trace (itself predicted when the previous thread has not finished).
// When a trace completes, its start and end values train the tables.
//
// The tables are indexed by trace and register (trace_index). With HYBRID=1
// (default) the predictor is the hybrid increment-context predictor with
// 1024 entries per table; with HYBRID=0 it is the increment predictor alone
// with 4096 entries. Both are configurations of about 16 KB that were
// evaluated for a 4-thread-unit processor. Output values are always
// predicted; checking a prediction against the produced value and the
// recovery after a miss belong to the thread units.
//
// Timing: ready rises once the tables have been cleared after reset (1024
// or 4096 cycles). A prediction request in cycle t is answered in cycle
// t+1; an update in cycle t takes effect at the end of cycle t and reports
// in cycle t+1 which components had predicted the value. One request of
// each kind per cycle. Two assertions state this answer rule.
module csm_value_predictor
  import vp_pkg::*;
#(
  parameter bit HYBRID = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             ready,

  // prediction request from the thread speculation logic (thread spawn)
  input  logic             pred_req,
  input  logic [PC_W-1:0]  pred_pc,        // first instruction of the trace
  input  logic [BR_W-1:0]  pred_br,        // branch outcome vector of the trace
  input  logic [REG_W-1:0] pred_reg,       // output register to predict
  input  val_t             pred_base,      // register value at trace start
  output logic             pred_vld,
  output val_t             pred_val,       // predicted value at trace end
  output pred_src_e        pred_src,       // component that supplied it

  // training at trace completion
  input  logic             upd_req,
  input  logic [PC_W-1:0]  upd_pc,
  input  logic [BR_W-1:0]  upd_br,
  input  logic [REG_W-1:0] upd_reg,
  input  val_t             upd_base,       // register value at trace start
  input  val_t             upd_actual,     // register value at trace end
  output logic             upd_vld,
  output logic             upd_incr_hit,   // increment component had it right
  output logic             upd_fcm_hit     // context component had it right
);

  localparam int unsigned ENTRIES = HYBRID ? 1024 : 4096;
  localparam int unsigned IDX_W   = $clog2(ENTRIES);

  logic [IDX_W-1:0] p_idx, u_idx;

  trace_index #(.IDX_W(IDX_W)) u_pidx (
    .start_pc(pred_pc), .br_vec(pred_br), .reg_id(pred_reg), .idx(p_idx));

  trace_index #(.IDX_W(IDX_W)) u_uidx (
    .start_pc(upd_pc), .br_vec(upd_br), .reg_id(upd_reg), .idx(u_idx));

  if (HYBRID) begin : g_hyb
    hyb_i_predictor #(.ENTRIES(ENTRIES)) u_pred (
      .clk, .rst_n, .ready,
      .pred_req, .pred_idx(p_idx), .pred_base,
      .pred_vld, .pred_val, .pred_src,
      .upd_req, .upd_idx(u_idx), .upd_base, .upd_actual,
      .upd_vld, .upd_incr_hit, .upd_fcm_hit
    );
  end else begin : g_incr
    conf_t unused_conf;
    incr_predictor #(.ENTRIES(ENTRIES)) u_pred (
      .clk, .rst_n, .ready,
      .pred_req, .pred_idx(p_idx), .pred_base,
      .pred_vld, .pred_val, .pred_conf(unused_conf),
      .upd_req, .upd_idx(u_idx), .upd_base, .upd_actual,
      .upd_vld, .upd_hit(upd_incr_hit)
    );
    assign pred_src    = SRC_INCR;
    assign upd_fcm_hit = 1'b0;
  end

  // Handshake rules: an answer comes exactly one cycle after an accepted
  // request, and nothing is answered while the tables are being cleared.
  a_pred_answer : assert property (@(posedge clk) disable iff (!rst_n)
    pred_vld == $past(pred_req && ready));
  a_upd_answer : assert property (@(posedge clk) disable iff (!rst_n)
    upd_vld == $past(upd_req && ready));

endmodule
